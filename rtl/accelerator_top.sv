// accelerator_top: the neural-network accelerator, NUM_CHAINS independent
// processor chains side by side (one per super logic region of the FPGA).
//
// Each chain has its own weights, its own image input and its own logits
// output, so three images are processed at once, one per chain. The host
// link itself (PCIe) is outside this module: its traffic appears here as
// plain streams. The configuration bus is shared; cfg_chain selects the chain
// written. Everything runs on one clock in this RTL (see the README for the
// two clock rates of the original implementation). Three chains follow the
// original design; the shared configuration bus with a chain select is this
// design's choice. The top's ports are per chain: image stream i_*, logits
// stream l_* (valid/ready, element address, count, data, last), start/busy,
// and the five activity counters of every processor.
module accelerator_top
  import nn_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 3,
  localparam int unsigned IN_W  = 21,   // P1 input lanes
  localparam int unsigned OUT_W = 8,    // P4 output stream width
  localparam int unsigned CHW   = (NUM_CHAINS > 1) ? $clog2(NUM_CHAINS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NUM_CHAINS-1:0]    start,
  output logic [3:0]               busy [NUM_CHAINS],
  // host configuration
  input  logic                     cfg_valid,
  input  logic [CHW-1:0]           cfg_chain,
  input  logic [1:0]               cfg_proc,
  input  cfg_target_e              cfg_target,
  input  logic [31:0]              cfg_addr,
  input  logic [CFG_W-1:0]         cfg_data,
  // input images, one stream per chain
  input  logic                     i_valid [NUM_CHAINS],
  output logic                     i_ready [NUM_CHAINS],
  input  logic [EADDR_W-1:0]       i_eaddr [NUM_CHAINS],
  input  logic [$clog2(IN_W+1)-1:0] i_cnt [NUM_CHAINS],
  input  logic signed [SIG_W-1:0]  i_data  [NUM_CHAINS][IN_W],
  input  logic                     i_last  [NUM_CHAINS],
  // logits, one stream per chain
  output logic                     l_valid [NUM_CHAINS],
  input  logic                     l_ready [NUM_CHAINS],
  output logic [EADDR_W-1:0]       l_eaddr [NUM_CHAINS],
  output logic [$clog2(OUT_W+1)-1:0] l_cnt [NUM_CHAINS],
  output logic signed [SIG_W-1:0]  l_data  [NUM_CHAINS][OUT_W],
  output logic                     l_last  [NUM_CHAINS],
  // activity counters per chain and processor (P1..P4): cycles spent waiting
  // for a weight fill, for output credits and for upstream events; MxV busy
  // cycles; executed instructions
  output logic [31:0]              cnt_fill_stall [NUM_CHAINS][4],
  output logic [31:0]              cnt_out_stall  [NUM_CHAINS][4],
  output logic [31:0]              cnt_ev_wait    [NUM_CHAINS][4],
  output logic [31:0]              cnt_mxv_cycles [NUM_CHAINS][4],
  output logic [31:0]              cnt_instr      [NUM_CHAINS][4]
);
  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    processor_chain u_chain (
      .clk, .rst, .start(start[c]), .busy(busy[c]),
      .cfg_valid(cfg_valid && cfg_chain == CHW'(c)), .cfg_proc, .cfg_target, .cfg_addr, .cfg_data,
      .i_valid(i_valid[c]), .i_ready(i_ready[c]), .i_eaddr(i_eaddr[c]), .i_cnt(i_cnt[c]),
      .i_data(i_data[c]), .i_last(i_last[c]),
      .l_valid(l_valid[c]), .l_ready(l_ready[c]), .l_eaddr(l_eaddr[c]), .l_cnt(l_cnt[c]),
      .l_data(l_data[c]), .l_last(l_last[c]),
      .cnt_fill_stall(cnt_fill_stall[c]), .cnt_out_stall(cnt_out_stall[c]), .cnt_ev_wait(cnt_ev_wait[c]),
      .cnt_mxv_cycles(cnt_mxv_cycles[c]), .cnt_instr(cnt_instr[c]));
  end
endmodule
