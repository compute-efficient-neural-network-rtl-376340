// mxv_array: the DSP supertile array, a matrix-vector multiplier computing
// z = P q + r for an N2 x N1 weight block P every clock cycle.
//
// The input vector q is broadcast to all N2 output lanes (one per output
// channel); each lane is a dsp_cascade_column that sums its N1 products along
// a cascade. This module adds the input skew the cascades need: lane element i
// of q and of every weight row is delayed by i cycles, so the delay lines for q
// are shared by all columns. Inputs presented at cycle c produce z at cycle
// c + LATENCY (LATENCY = N1). Weights change every cycle (they come from the
// operand cache), and so may q. Input lanes N1 and output lanes N2 are the
// shape of the array; the defaults are those of the largest processor (96 x 16). The array and
// its shapes follow the original design; the explicit skew registers are this
// design's choice, and the physical grouping of columns into supertiles is left
// to placement. The packed column wv of lane 0 is not delayed and so not read
// (lint: unused signal); the LATENCY parameter documents the delay for users.
module mxv_array
  import nn_pkg::*;
#(
  parameter int unsigned N1 = 96,
  parameter int unsigned N2 = 16,
  localparam int unsigned LATENCY = N1
) (
  input  logic                     clk,
  input  logic signed [SIG_W-1:0]  q [N1],
  input  logic signed [SIG_W-1:0]  w [N2][N1],
  input  logic signed [ACC_W-1:0]  r [N2],
  output logic signed [ACC_W-1:0]  z [N2]
);
  // Skew: element i passes through i registers. Each lane keeps one packed
  // shift register for its q element and one for its column of P.
  localparam int unsigned VW = N2 * SIG_W;   // one column of P, packed
  logic signed [SIG_W-1:0] q_skew [N1];
  logic signed [SIG_W-1:0] w_skew [N2][N1];

  for (genvar i = 0; i < N1; i++) begin : g_lane
    logic [VW-1:0] wv;                        // column i of P, lane o at o*SIG_W
    for (genvar o = 0; o < N2; o++) begin : g_pack
      assign wv[o*SIG_W +: SIG_W] = w[o][i];
    end
    if (i == 0) begin : g_direct
      assign q_skew[0] = q[0];
      for (genvar o = 0; o < N2; o++) begin : g_w
        assign w_skew[o][0] = w[o][0];
      end
    end else begin : g_delay
      logic [i*SIG_W-1:0] qd;                 // newest value in the low bits
      logic [i*VW-1:0]    wd;
      if (i == 1) begin : g_one
        always_ff @(posedge clk) begin
          qd <= q[i];
          wd <= wv;
        end
      end else begin : g_more
        always_ff @(posedge clk) begin
          qd <= {qd[(i-1)*SIG_W-1:0], q[i]};
          wd <= {wd[(i-1)*VW-1:0], wv};
        end
      end
      assign q_skew[i] = qd[i*SIG_W-1 -: SIG_W];
      for (genvar o = 0; o < N2; o++) begin : g_w
        assign w_skew[o][i] = wd[(i-1)*VW + o*SIG_W +: SIG_W];
      end
    end
  end

  for (genvar o = 0; o < N2; o++) begin : g_col
    logic signed [SIG_W-1:0] wcol [N1];
    for (genvar i = 0; i < N1; i++) begin : g_c
      assign wcol[i] = w_skew[o][i];
    end
    dsp_cascade_column #(.N1(N1)) u_col (
      .clk, .q_skew(q_skew), .w_skew(wcol), .r(r[o]), .z(z[o])
    );
  end
endmodule
