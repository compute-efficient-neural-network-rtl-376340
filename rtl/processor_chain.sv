// processor_chain: input bias plus four neural-net processors in a chain,
// P1 -> P2 -> P3 -> P4, as one SLR of the accelerator holds it.
//
// The host streams an image into P1 through input_bias; every processor runs
// its own instruction list, event-driven, with no central controller. A
// processor sends its results either to the next processor's tensor buffer
// or back into its own (the self-loops that let P2 and P3 run several layers
// each). P4's results, the logits, leave on the l_* stream. All four share one
// host configuration bus: cfg_proc selects the processor (0..3 = P1..P4) whose
// instruction memory, weight store or bias store is written; target CFG_INBIAS
// writes the input-bias registers whatever cfg_proc is.
//
// The MxV shapes N1 x N2 are 21 x 8, 32 x 16, 96 x 16 and 8 x 1, chosen so
// that the four processors need about the same number of cycles per image.
// The shapes, the chain with its two self-loops, the input bias and the
// interleave factor T = 4 follow the original design; the memory depths are
// this design's choice, sized for GoogLeNet (see the README).
module processor_chain
  import nn_pkg::*;
#(
  parameter int unsigned IMG_CH = 3,
  parameter int unsigned T      = 4,
  // P1
  parameter int unsigned P1_N1 = 21, parameter int unsigned P1_N2 = 8,
  parameter int unsigned P1_TB = 8192, parameter int unsigned P1_CACHE = 32,
  parameter int unsigned P1_WS = 64, parameter int unsigned P1_BS = 16,
  // P2
  parameter int unsigned P2_N1 = 32, parameter int unsigned P2_N2 = 16,
  parameter int unsigned P2_TB = 65536, parameter int unsigned P2_CACHE = 128,
  parameter int unsigned P2_WS = 256, parameter int unsigned P2_BS = 64,
  // P3
  parameter int unsigned P3_N1 = 96, parameter int unsigned P3_N2 = 16,
  parameter int unsigned P3_TB = 16384, parameter int unsigned P3_CACHE = 128,
  parameter int unsigned P3_WS = 6144, parameter int unsigned P3_BS = 512,
  // P4
  parameter int unsigned P4_N1 = 8, parameter int unsigned P4_N2 = 1,
  parameter int unsigned P4_TB = 256, parameter int unsigned P4_CACHE = 512,
  parameter int unsigned P4_WS = 131072, parameter int unsigned P4_BS = 1024,
  parameter int unsigned IM_DEPTH = 128,
  localparam int unsigned OW1 = (P1_N1 > P1_N2) ? P1_N1 : P1_N2,
  localparam int unsigned OW2 = (P2_N1 > P2_N2) ? P2_N1 : P2_N2,
  localparam int unsigned OW3 = (P3_N1 > P3_N2) ? P3_N1 : P3_N2,
  localparam int unsigned OW4 = (P4_N1 > P4_N2) ? P4_N1 : P4_N2,
  localparam int unsigned ICW = $clog2(P1_N1 + 1),
  localparam int unsigned LCW = $clog2(OW4 + 1)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,         // start all four processors
  output logic [3:0]               busy,
  // host configuration
  input  logic                     cfg_valid,
  input  logic [1:0]               cfg_proc,
  input  cfg_target_e              cfg_target,
  input  logic [31:0]              cfg_addr,
  input  logic [CFG_W-1:0]         cfg_data,
  // input image
  input  logic                     i_valid,
  output logic                     i_ready,
  input  logic [EADDR_W-1:0]       i_eaddr,
  input  logic [ICW-1:0]           i_cnt,
  input  logic signed [SIG_W-1:0]  i_data [P1_N1],
  input  logic                     i_last,
  // logits
  output logic                     l_valid,
  input  logic                     l_ready,
  output logic [EADDR_W-1:0]       l_eaddr,
  output logic [LCW-1:0]           l_cnt,
  output logic signed [SIG_W-1:0]  l_data [OW4],
  output logic                     l_last,
  // activity counters per processor
  output logic [31:0]              cnt_fill_stall [4],
  output logic [31:0]              cnt_out_stall  [4],
  output logic [31:0]              cnt_ev_wait    [4],
  output logic [31:0]              cnt_mxv_cycles [4],
  output logic [31:0]              cnt_instr      [4]
);
  logic cfg_p [4];
  for (genvar p = 0; p < 4; p++) begin : g_cfg
    assign cfg_p[p] = cfg_valid && cfg_proc == 2'(p) && cfg_target != CFG_INBIAS;
  end

  // input bias -> P1
  logic                    b_valid, b_ready, b_last;
  logic [EADDR_W-1:0]      b_eaddr;
  logic [ICW-1:0]          b_cnt;
  logic signed [SIG_W-1:0] b_data [P1_N1];

  input_bias #(.N(P1_N1), .IMG_CH(IMG_CH)) u_inbias (
    .clk, .rst, .cfg_valid, .cfg_target, .cfg_addr, .cfg_data,
    .i_valid, .i_ready, .i_eaddr, .i_cnt, .i_data, .i_last,
    .o_valid(b_valid), .o_ready(b_ready), .o_eaddr(b_eaddr), .o_cnt(b_cnt),
    .o_data(b_data), .o_last(b_last));

  // links P1->P2, P2->P3, P3->P4
  logic                    v12, r12, l12, v23, r23, l23, v34, r34, l34;
  logic [EADDR_W-1:0]      a12, a23, a34;
  logic [$clog2(OW1+1)-1:0] c12;
  logic [$clog2(OW2+1)-1:0] c23;
  logic [$clog2(OW3+1)-1:0] c34;
  logic signed [SIG_W-1:0] d12 [OW1];
  logic signed [SIG_W-1:0] d23 [OW2];
  logic signed [SIG_W-1:0] d34 [OW3];

  nn_processor #(.N1(P1_N1), .N2(P1_N2), .T(T), .W_U(P1_N1), .TB_DEPTH(P1_TB),
    .CACHE_DEPTH(P1_CACHE), .WS_DEPTH(P1_WS), .BS_DEPTH(P1_BS), .IM_DEPTH(IM_DEPTH)) u_p1 (
    .clk, .rst, .start, .busy(busy[0]),
    .cfg_valid(cfg_p[0]), .cfg_target, .cfg_addr, .cfg_data,
    .u_valid(b_valid), .u_ready(b_ready), .u_eaddr(b_eaddr), .u_cnt(b_cnt), .u_data(b_data), .u_last(b_last),
    .d_valid(v12), .d_ready(r12), .d_eaddr(a12), .d_cnt(c12), .d_data(d12), .d_last(l12),
    .cnt_fill_stall(cnt_fill_stall[0]), .cnt_out_stall(cnt_out_stall[0]),
    .cnt_ev_wait(cnt_ev_wait[0]), .cnt_mxv_cycles(cnt_mxv_cycles[0]), .cnt_instr(cnt_instr[0]));

  nn_processor #(.N1(P2_N1), .N2(P2_N2), .T(T), .W_U(OW1), .TB_DEPTH(P2_TB),
    .CACHE_DEPTH(P2_CACHE), .WS_DEPTH(P2_WS), .BS_DEPTH(P2_BS), .IM_DEPTH(IM_DEPTH)) u_p2 (
    .clk, .rst, .start, .busy(busy[1]),
    .cfg_valid(cfg_p[1]), .cfg_target, .cfg_addr, .cfg_data,
    .u_valid(v12), .u_ready(r12), .u_eaddr(a12), .u_cnt(c12), .u_data(d12), .u_last(l12),
    .d_valid(v23), .d_ready(r23), .d_eaddr(a23), .d_cnt(c23), .d_data(d23), .d_last(l23),
    .cnt_fill_stall(cnt_fill_stall[1]), .cnt_out_stall(cnt_out_stall[1]),
    .cnt_ev_wait(cnt_ev_wait[1]), .cnt_mxv_cycles(cnt_mxv_cycles[1]), .cnt_instr(cnt_instr[1]));

  nn_processor #(.N1(P3_N1), .N2(P3_N2), .T(T), .W_U(OW2), .TB_DEPTH(P3_TB),
    .CACHE_DEPTH(P3_CACHE), .WS_DEPTH(P3_WS), .BS_DEPTH(P3_BS), .IM_DEPTH(IM_DEPTH)) u_p3 (
    .clk, .rst, .start, .busy(busy[2]),
    .cfg_valid(cfg_p[2]), .cfg_target, .cfg_addr, .cfg_data,
    .u_valid(v23), .u_ready(r23), .u_eaddr(a23), .u_cnt(c23), .u_data(d23), .u_last(l23),
    .d_valid(v34), .d_ready(r34), .d_eaddr(a34), .d_cnt(c34), .d_data(d34), .d_last(l34),
    .cnt_fill_stall(cnt_fill_stall[2]), .cnt_out_stall(cnt_out_stall[2]),
    .cnt_ev_wait(cnt_ev_wait[2]), .cnt_mxv_cycles(cnt_mxv_cycles[2]), .cnt_instr(cnt_instr[2]));

  nn_processor #(.N1(P4_N1), .N2(P4_N2), .T(T), .W_U(OW3), .TB_DEPTH(P4_TB),
    .CACHE_DEPTH(P4_CACHE), .WS_DEPTH(P4_WS), .BS_DEPTH(P4_BS), .IM_DEPTH(IM_DEPTH)) u_p4 (
    .clk, .rst, .start, .busy(busy[3]),
    .cfg_valid(cfg_p[3]), .cfg_target, .cfg_addr, .cfg_data,
    .u_valid(v34), .u_ready(r34), .u_eaddr(a34), .u_cnt(c34), .u_data(d34), .u_last(l34),
    .d_valid(l_valid), .d_ready(l_ready), .d_eaddr(l_eaddr), .d_cnt(l_cnt), .d_data(l_data), .d_last(l_last),
    .cnt_fill_stall(cnt_fill_stall[3]), .cnt_out_stall(cnt_out_stall[3]),
    .cnt_ev_wait(cnt_ev_wait[3]), .cnt_mxv_cycles(cnt_mxv_cycles[3]), .cnt_instr(cnt_instr[3]));
endmodule
