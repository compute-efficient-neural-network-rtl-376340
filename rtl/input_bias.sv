// input_bias: adds a per-colour-channel bias to the input image on its way
// from the host into the first processor's tensor buffer.
//
// The image arrives as a stream of beats of up to N elements in
// height-width-channel order; element address e belongs to channel
// e mod IMG_CH. Each element gets the bias of its channel added, with
// saturation to a SIG_W-bit significand. The biases are registers written
// over the host configuration bus (target CFG_INBIAS, cfg_addr = channel).
// One register stage with valid/ready; address, count and 'last' pass through.
// Bias width, saturation and the register stage are this design's choice.
module input_bias
  import nn_pkg::*;
#(
  parameter int unsigned N      = 21,
  parameter int unsigned IMG_CH = 3,
  localparam int unsigned CW    = $clog2(N + 1)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_valid,
  input  cfg_target_e              cfg_target,
  input  logic [31:0]              cfg_addr,
  input  logic [CFG_W-1:0]         cfg_data,
  input  logic                     i_valid,
  output logic                     i_ready,
  input  logic [EADDR_W-1:0]       i_eaddr,
  input  logic [CW-1:0]            i_cnt,
  input  logic signed [SIG_W-1:0]  i_data [N],
  input  logic                     i_last,
  output logic                     o_valid,
  input  logic                     o_ready,
  output logic [EADDR_W-1:0]       o_eaddr,
  output logic [CW-1:0]            o_cnt,
  output logic signed [SIG_W-1:0]  o_data [N],
  output logic                     o_last
);
  localparam logic signed [SIG_W:0] MAXV = (SIG_W+1)'((1 << (SIG_W-1)) - 1);
  localparam logic signed [SIG_W:0] MINV = -(SIG_W+1)'(1 << (SIG_W-1));

  logic signed [SIG_W-1:0] bias [IMG_CH];
  logic signed [SIG_W-1:0] sum  [N];

  always_ff @(posedge clk) begin
    if (rst) for (int c = 0; c < IMG_CH; c++) bias[c] <= '0;
    else if (cfg_valid && cfg_target == CFG_INBIAS && cfg_addr < IMG_CH)
      bias[cfg_addr] <= SIG_W'(cfg_data);
  end

  always_comb
    for (int j = 0; j < N; j++) begin
      logic signed [SIG_W:0] s;
      s = (SIG_W+1)'(i_data[j]) + (SIG_W+1)'(bias[(32'(i_eaddr) + j) % IMG_CH]);
      sum[j] = (s > MAXV) ? SIG_W'(MAXV) : (s < MINV) ? SIG_W'(MINV) : SIG_W'(s);
    end

  assign i_ready = !o_valid || o_ready;

  always_ff @(posedge clk) begin
    if (rst) o_valid <= 1'b0;
    else if (i_ready) o_valid <= i_valid;
    if (i_ready && i_valid) begin
      o_eaddr <= i_eaddr;
      o_cnt   <= i_cnt;
      o_data  <= sum;
      o_last  <= i_last;
    end
  end
endmodule
