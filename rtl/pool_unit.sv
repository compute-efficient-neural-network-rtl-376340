// pool_unit: element-wise running maximum for max-pooling layers.
//
// The controller streams the N input vectors of one pooling window; 'first'
// marks the first, 'last' the last. On the last vector the lane-wise maximum
// of the whole window leaves on out_* one cycle later with its tag. How
// pooling is executed is this design's choice; the original design only names
// max-pooling layers.
module pool_unit
  import nn_pkg::*;
#(
  parameter int unsigned N     = 96,
  parameter int unsigned TAG_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [SIG_W-1:0]  in_data [N],
  output logic                     out_valid,
  output logic [TAG_W-1:0]         out_tag,
  output logic signed [SIG_W-1:0]  out_data [N]
);
  logic signed [SIG_W-1:0] m [N];
  logic signed [SIG_W-1:0] nxt [N];

  always_comb
    for (int i = 0; i < N; i++)
      nxt[i] = (in_first || in_data[i] > m[i]) ? in_data[i] : m[i];

  always_ff @(posedge clk) begin
    if (in_valid) m <= nxt;
    if (in_valid && in_last) begin
      out_data <= nxt;
      out_tag  <= in_tag;
    end
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid && in_last;
  end
endmodule
