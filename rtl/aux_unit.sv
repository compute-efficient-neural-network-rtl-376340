// aux_unit: auxiliary processing of finished accumulator sums.
//
// Brings each sum back to a block-floating-point significand of the output
// tensor: a rounding arithmetic right shift by the instruction's shift
// amount (round half up), optional ReLU, then saturation to SIG_W bits. The
// shift amount is how the per-tensor shared exponent is handled: firmware
// computes it from the exponents of input, weights and output. One cycle of
// latency; the tag passes along unchanged. Rounding and saturation are this
// design's choice.
module aux_unit
  import nn_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned TAG_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [ACC_W-1:0]  in_acc [N],
  input  logic [5:0]               shift,
  input  logic                     relu,
  output logic                     out_valid,
  output logic [TAG_W-1:0]         out_tag,
  output logic signed [SIG_W-1:0]  out_data [N]
);
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (SIG_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 << (SIG_W-1));

  logic signed [SIG_W-1:0] res [N];

  always_comb
    for (int i = 0; i < N; i++) begin
      logic signed [ACC_W-1:0] rnd, v;
      rnd = (shift == 0) ? '0 : (ACC_W'(1) <<< (shift - 6'd1));
      v   = (in_acc[i] + rnd) >>> shift;
      if (relu && v < 0) v = '0;
      if (v > MAXV)      res[i] = SIG_W'(MAXV);
      else if (v < MINV) res[i] = SIG_W'(MINV);
      else               res[i] = SIG_W'(v);
    end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) begin
      out_data <= res;
      out_tag  <= in_tag;
    end
  end
endmodule
