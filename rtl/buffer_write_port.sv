// buffer_write_port: the write side of a processor's tensor buffer.
//
// Two streams may write into a tensor buffer: results of the upstream
// processor (or, for the first processor, the input image) and the
// processor's own results (the self-loop that lets one processor run many
// consecutive layers). Each stream beat carries an element address, a count
// and up to W_S / W_U elements; a beat wider than the buffer's N1 lanes is
// written in several chunks of N1 elements, and the beat is accepted (ready)
// with its final chunk. The own stream wins when both are valid; a beat
// is never interrupted. An upstream beat with 'last' set marks the end of an
// upstream instruction: once written it increments the event count that the
// controller consumes (ev_take). Arbitration and chunking are this design's
// choice.
module buffer_write_port
  import nn_pkg::*;
#(
  parameter int unsigned N1  = 96,
  parameter int unsigned W_S = 96,
  parameter int unsigned W_U = 16,
  localparam int unsigned WM    = (W_S > W_U) ? W_S : W_U,
  localparam int unsigned SCW   = $clog2(W_S + 1),
  localparam int unsigned UCW   = $clog2(W_U + 1),
  localparam int unsigned CNTW  = $clog2(N1 + 1),
  localparam int unsigned KW    = $clog2(WM + 1)
) (
  input  logic                     clk,
  input  logic                     rst,
  // own results
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic [EADDR_W-1:0]       s_eaddr,
  input  logic [SCW-1:0]           s_cnt,
  input  logic signed [SIG_W-1:0]  s_data [W_S],
  // upstream results
  input  logic                     u_valid,
  output logic                     u_ready,
  input  logic [EADDR_W-1:0]       u_eaddr,
  input  logic [UCW-1:0]           u_cnt,
  input  logic signed [SIG_W-1:0]  u_data [W_U],
  input  logic                     u_last,
  // tensor buffer write
  output logic                     wr_en,
  output logic [EADDR_W-1:0]       wr_eaddr,
  output logic [CNTW-1:0]          wr_cnt,
  output logic signed [SIG_W-1:0]  wr_data [N1],
  // events
  output logic [7:0]               ev_count,
  input  logic                     ev_take
);
  logic          busy, sel_q, sel;
  logic [KW-1:0] k;
  logic          cur_valid, fin;
  logic [EADDR_W-1:0] cur_eaddr;
  logic [KW-1:0] cur_cnt, rem;
  logic signed [SIG_W-1:0] cur_data [WM];

  assign sel = busy ? sel_q : !s_valid;   // 0: own stream, 1: upstream

  always_comb begin
    for (int j = 0; j < WM; j++) cur_data[j] = '0;
    if (!sel) begin
      cur_valid = s_valid;
      cur_eaddr = s_eaddr;
      cur_cnt   = KW'(s_cnt);
      for (int j = 0; j < W_S; j++) cur_data[j] = s_data[j];
    end else begin
      cur_valid = u_valid;
      cur_eaddr = u_eaddr;
      cur_cnt   = KW'(u_cnt);
      for (int j = 0; j < W_U; j++) cur_data[j] = u_data[j];
    end
    rem = cur_cnt - k;
    fin = (32'(rem) <= N1);
  end

  assign wr_en    = cur_valid;
  assign wr_eaddr = cur_eaddr + EADDR_W'(k);
  assign wr_cnt   = fin ? CNTW'(rem) : CNTW'(N1);
  always_comb
    for (int j = 0; j < N1; j++)
      wr_data[j] = (32'(k) + j < WM) ? cur_data[32'(k) + j] : '0;

  assign s_ready = cur_valid && fin && !sel;
  assign u_ready = cur_valid && fin && sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      sel_q    <= 1'b0;
      k        <= '0;
      ev_count <= '0;
    end else begin
      if (cur_valid) begin
        if (fin) begin
          busy <= 1'b0;
          k    <= '0;
        end else begin
          busy  <= 1'b1;
          sel_q <= sel;
          k     <= k + KW'(N1);
        end
      end
      ev_count <= ev_count + 8'(u_ready && u_last) - 8'(ev_take);
    end
  end

  assert property (@(posedge clk) disable iff (rst) ev_take |-> ev_count != 0)
    else $error("event taken with none pending");
endmodule
