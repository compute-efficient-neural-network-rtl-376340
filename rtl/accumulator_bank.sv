// accumulator_bank: per-output-lane accumulators behind the MxV, one per
// time-interleaved output channel.
//
// With time interleaving, the MxV works on T output-channel groups in turn
// while one input vector is held, so each output lane needs T running sums.
// A result z of slot t either starts the sum (first, it already carries the
// bias that entered the MxV cascade as r) or is added to it. On the last
// contribution the finished sums of slot t leave on out_* one cycle later,
// together with the tag that travelled with the operands. T is a parameter;
// the original design interleaves four output channels. Keeping the sums here
// rather than in the cascade is this design's choice.
module accumulator_bank
  import nn_pkg::*;
#(
  parameter int unsigned N2    = 16,
  parameter int unsigned T     = 4,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned TW   = (T > 1) ? $clog2(T) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [TW-1:0]            in_slot,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [ACC_W-1:0]  z [N2],
  output logic                     out_valid,
  output logic [TAG_W-1:0]         out_tag,
  output logic signed [ACC_W-1:0]  out_acc [N2]
);
  logic signed [ACC_W-1:0] acc [T][N2];
  logic signed [ACC_W-1:0] sum [N2];

  always_comb
    for (int o = 0; o < N2; o++)
      sum[o] = in_first ? z[o] : acc[in_slot][o] + z[o];

  always_ff @(posedge clk) begin
    if (in_valid) acc[in_slot] <= sum;
    if (in_valid && in_last) begin
      out_acc <= sum;
      out_tag <= in_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid && in_last;
  end
endmodule
