// dsp_cascade_column: one output lane of the matrix-vector multiplier, a chain
// of N1 multiply-add stages joined by the DSP summing cascade.
//
// Stage 0 forms r + w[0]*q[0]; stage i adds w[i]*q[i] to the partial sum
// handed on by stage i-1. Every stage is registered, so there is no adder tree
// and each stage only talks to its neighbour, which is what lets a column of
// physically adjacent DSP tiles run near their maximum clock rate. Because
// stage i sees the partial sum i cycles after stage 0, operand pair i must
// arrive i cycles late: the caller supplies operands already skewed that way
// (see mxv_array). The result z = r + sum_i w[i]*q[i] of operands whose stage-0
// pair entered at cycle c leaves at cycle c + N1. The column never stalls.
// The cascade in place of an adder tree follows the original design; one
// register per stage (no internal DSP pipeline) is this design's choice.
module dsp_cascade_column
  import nn_pkg::*;
#(
  parameter int unsigned N1 = 96
) (
  input  logic                        clk,
  input  logic signed [SIG_W-1:0]     q_skew [N1],  // q[i] delayed by i cycles
  input  logic signed [SIG_W-1:0]     w_skew [N1],  // w[i] delayed by i cycles
  input  logic signed [ACC_W-1:0]     r,            // cascade input of stage 0
  output logic signed [ACC_W-1:0]     z
);
  logic signed [ACC_W-1:0] s [N1];

  always_ff @(posedge clk) begin
    s[0] <= r + ACC_W'(w_skew[0] * q_skew[0]);
    for (int i = 1; i < N1; i++)
      s[i] <= s[i-1] + ACC_W'(w_skew[i] * q_skew[i]);
  end

  assign z = s[N1-1];
endmodule
