// nn_processor: one neural-net processor of the chain.
//
// Datapath, in the order data flow through it:
//   tensor_buffer  -> input vector q (N1 elements, held for T cycles)
//   operand_cache  -> weight block P (N2 x N1), a new one every cycle
//   bias store     -> r (bias of the output channels, first contribution only)
//   mxv_array      -> z = P q + r after N1 cycles (DSP summing cascades)
//   accumulator_bank -> T interleaved running sums per output lane
//   aux_unit       -> shift/round, ReLU, saturate to a significand
//   output FIFO    -> own tensor buffer (self-loop) or the next processor
// Max pooling bypasses the MxV: tensor buffer -> pool_unit -> output FIFO.
// proc_controller sequences all of it from the instruction memory; the
// weight store, bias store and instruction memory are loaded by the host over
// the cfg_* chunk bus (cfg_addr is a chunk address, see chunk_ram).
//
// Timing: an MxV beat issued in cycle c reads its operands at c+1, produces z
// at c+1+N1, a finished sum at c+2+N1 and a FIFO entry at c+3+N1. The output
// stream carries up to OW = max(N1, N2) elements per beat; 'd_last' marks the
// final result of an instruction (an event for the receiver). N1, N2 and T are
// the array shape and interleave factor; memory depths are this design's choice.
// The operand cache's active-bank flag is not needed here (the controller tracks
// its own bank) and stays unconnected; only the low configuration-address bits
// that the memories need are used.
module nn_processor
  import nn_pkg::*;
#(
  parameter int unsigned N1          = 96,
  parameter int unsigned N2          = 16,
  parameter int unsigned T           = 4,
  parameter int unsigned W_U         = 16,    // upstream stream width
  parameter int unsigned TB_DEPTH    = 16384, // tensor buffer words (of N1 elements)
  parameter int unsigned CACHE_DEPTH = 256,
  parameter int unsigned WS_DEPTH    = 4096,  // weight store words (of N2 x N1 weights)
  parameter int unsigned BS_DEPTH    = 512,   // bias store words (of N2 biases)
  parameter int unsigned IM_DEPTH    = 64,
  parameter int unsigned FIFO_DEPTH  = 16,
  localparam int unsigned OW   = (N1 > N2) ? N1 : N2,
  localparam int unsigned OCW  = $clog2(OW + 1),
  localparam int unsigned UCW  = $clog2(W_U + 1),
  localparam int unsigned TW   = (T > 1) ? $clog2(T) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  output logic                     busy,
  // host configuration
  input  logic                     cfg_valid,
  input  cfg_target_e              cfg_target,
  input  logic [31:0]              cfg_addr,
  input  logic [CFG_W-1:0]         cfg_data,
  // upstream results / input image
  input  logic                     u_valid,
  output logic                     u_ready,
  input  logic [EADDR_W-1:0]       u_eaddr,
  input  logic [UCW-1:0]           u_cnt,
  input  logic signed [SIG_W-1:0]  u_data [W_U],
  input  logic                     u_last,
  // downstream results
  output logic                     d_valid,
  input  logic                     d_ready,
  output logic [EADDR_W-1:0]       d_eaddr,
  output logic [OCW-1:0]           d_cnt,
  output logic signed [SIG_W-1:0]  d_data [OW],
  output logic                     d_last,
  // activity counters
  output logic [31:0]              cnt_fill_stall,
  output logic [31:0]              cnt_out_stall,
  output logic [31:0]              cnt_ev_wait,
  output logic [31:0]              cnt_mxv_cycles,
  output logic [31:0]              cnt_instr
);
  localparam int unsigned WW  = N2 * N1 * SIG_W;
  localparam int unsigned BW  = N2 * BIAS_W;
  localparam int unsigned CAW = (CACHE_DEPTH > 1) ? $clog2(CACHE_DEPTH) : 1;
  localparam int unsigned WAW = (WS_DEPTH > 1) ? $clog2(WS_DEPTH) : 1;
  localparam int unsigned BAW = (BS_DEPTH > 1) ? $clog2(BS_DEPTH) : 1;
  localparam int unsigned IAW = (IM_DEPTH > 1) ? $clog2(IM_DEPTH) : 1;
  localparam int unsigned FAW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  localparam int unsigned CNTW = $clog2(N1 + 1);
  localparam int unsigned TAG_W = 1 + EADDR_W;

  // ---------------- configuration memories ----------------
  localparam int unsigned I_NCH = (INSTR_W + CFG_W - 1) / CFG_W;
  localparam int unsigned W_NCH = (WW + CFG_W - 1) / CFG_W;
  localparam int unsigned B_NCH = (BW + CFG_W - 1) / CFG_W;

  logic                im_rd_en;
  logic [IAW-1:0]      im_addr;
  logic [INSTR_W-1:0]  im_word;
  logic                ws_rd_en;
  logic [WAW-1:0]      ws_addr;
  logic [WW-1:0]       ws_word;
  logic                bs_rd_en;
  logic [BAW-1:0]      bs_addr;
  logic [BW-1:0]       bs_word;

  chunk_ram #(.WORD_W(INSTR_W), .DEPTH(IM_DEPTH), .CW(CFG_W)) u_imem (
    .clk, .wr_en(cfg_valid && cfg_target == CFG_INSTR),
    .wr_chunk_addr($clog2(IM_DEPTH*I_NCH+1)'(cfg_addr)), .wr_data(cfg_data),
    .rd_en(im_rd_en), .rd_addr(im_addr), .rd_data(im_word));

  chunk_ram #(.WORD_W(WW), .DEPTH(WS_DEPTH), .CW(CFG_W)) u_wstore (
    .clk, .wr_en(cfg_valid && cfg_target == CFG_WEIGHT),
    .wr_chunk_addr($clog2(WS_DEPTH*W_NCH+1)'(cfg_addr)), .wr_data(cfg_data),
    .rd_en(ws_rd_en), .rd_addr(ws_addr), .rd_data(ws_word));

  chunk_ram #(.WORD_W(BW), .DEPTH(BS_DEPTH), .CW(CFG_W)) u_bstore (
    .clk, .wr_en(cfg_valid && cfg_target == CFG_BIAS),
    .wr_chunk_addr($clog2(BS_DEPTH*B_NCH+1)'(cfg_addr)), .wr_data(cfg_data),
    .rd_en(bs_rd_en), .rd_addr(bs_addr), .rd_data(bs_word));

  // ---------------- controller ----------------
  logic                oc_swap, oc_wr_en, oc_rd_en, oc_active;
  logic [CAW-1:0]      oc_wr_addr, oc_rd_addr;
  logic                tb_rd_en;
  logic [EADDR_W-1:0]  tb_rd_eaddr;
  logic                iss_valid, iss_pool, iss_first, iss_last, iss_end;
  logic [TW-1:0]       iss_slot;
  logic [EADDR_W-1:0]  iss_out_eaddr;
  logic                dest_next, relu;
  logic [5:0]          shift;
  logic [7:0]          ev_count;
  logic                ev_take, out_pop;

  proc_controller #(
    .N1(N1), .N2(N2), .T(T), .CACHE_DEPTH(CACHE_DEPTH), .WS_DEPTH(WS_DEPTH),
    .BS_DEPTH(BS_DEPTH), .IM_DEPTH(IM_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_ctrl (
    .clk, .rst, .start, .busy,
    .im_rd_en, .im_addr, .im_data(instr_t'(im_word)),
    .ev_count, .ev_take,
    .ws_rd_en, .ws_addr, .oc_swap, .oc_wr_en, .oc_wr_addr, .oc_rd_en, .oc_rd_addr,
    .bs_rd_en, .bs_addr, .tb_rd_en, .tb_rd_eaddr,
    .iss_valid, .iss_pool, .iss_first, .iss_last, .iss_slot, .iss_out_eaddr, .iss_end,
    .dest_next, .shift, .relu, .out_pop,
    .cnt_fill_stall, .cnt_out_stall, .cnt_ev_wait, .cnt_mxv_cycles, .cnt_instr);

  // ---------------- operand memories ----------------
  logic [WW-1:0] oc_word;
  operand_cache #(.WORD_W(WW), .DEPTH(CACHE_DEPTH)) u_cache (
    .clk, .rst, .swap(oc_swap), .active_bank(oc_active),
    .wr_en(oc_wr_en), .wr_addr(oc_wr_addr), .wr_data(ws_word),
    .rd_en(oc_rd_en), .rd_addr(oc_rd_addr), .rd_data(oc_word));

  logic                    tw_en;
  logic [EADDR_W-1:0]      tw_eaddr;
  logic [CNTW-1:0]         tw_cnt;
  logic signed [SIG_W-1:0] tw_data [N1];
  logic signed [SIG_W-1:0] q [N1];

  tensor_buffer #(.N1(N1), .DEPTH(TB_DEPTH)) u_tbuf (
    .clk, .rd_en(tb_rd_en), .rd_eaddr(tb_rd_eaddr), .rd_data(q),
    .wr_en(tw_en), .wr_eaddr(tw_eaddr), .wr_cnt(tw_cnt), .wr_data(tw_data));

  // ---------------- side-band pipeline ----------------
  typedef struct packed {
    logic               valid;
    logic               pool;
    logic               first;
    logic               last;
    logic [TW-1:0]      slot;
    logic               fin;
    logic [EADDR_W-1:0] eaddr;
  } sb_t;

  sb_t sb_d1;
  sb_t sb_pipe [N1];

  always_ff @(posedge clk) begin
    if (rst) sb_d1 <= '0;
    else     sb_d1 <= '{valid: iss_valid, pool: iss_pool, first: iss_first, last: iss_last,
                        slot: iss_slot, fin: iss_end, eaddr: iss_out_eaddr};
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < N1; i++) sb_pipe[i] <= '0;
    else begin
      sb_pipe[0] <= sb_d1.pool ? '0 : sb_d1;
      for (int i = 1; i < N1; i++) sb_pipe[i] <= sb_pipe[i-1];
    end
  end

  // ---------------- MxV ----------------
  logic signed [SIG_W-1:0] w [N2][N1];
  logic signed [ACC_W-1:0] r [N2];
  logic signed [ACC_W-1:0] z [N2];

  always_comb
    for (int o = 0; o < N2; o++) begin
      for (int i = 0; i < N1; i++) w[o][i] = oc_word[(o*N1+i)*SIG_W +: SIG_W];
      r[o] = sb_d1.first ? ACC_W'($signed(bs_word[o*BIAS_W +: BIAS_W])) : '0;
    end

  mxv_array #(.N1(N1), .N2(N2)) u_mxv (.clk, .q, .w, .r, .z);

  // ---------------- accumulators and auxiliary processing ----------------
  logic                    acc_valid, aux_valid, pool_valid;
  logic [TAG_W-1:0]        acc_tag, aux_tag, pool_tag;
  logic signed [ACC_W-1:0] acc [N2];
  logic signed [SIG_W-1:0] aux_data [N2];
  logic signed [SIG_W-1:0] pool_data [N1];

  accumulator_bank #(.N2(N2), .T(T), .TAG_W(TAG_W)) u_acc (
    .clk, .rst, .in_valid(sb_pipe[N1-1].valid), .in_first(sb_pipe[N1-1].first),
    .in_last(sb_pipe[N1-1].last), .in_slot(sb_pipe[N1-1].slot),
    .in_tag({sb_pipe[N1-1].fin, sb_pipe[N1-1].eaddr}), .z,
    .out_valid(acc_valid), .out_tag(acc_tag), .out_acc(acc));

  aux_unit #(.N(N2), .TAG_W(TAG_W)) u_aux (
    .clk, .rst, .in_valid(acc_valid), .in_tag(acc_tag), .in_acc(acc),
    .shift, .relu, .out_valid(aux_valid), .out_tag(aux_tag), .out_data(aux_data));

  pool_unit #(.N(N1), .TAG_W(TAG_W)) u_pool (
    .clk, .rst, .in_valid(sb_d1.valid && sb_d1.pool), .in_first(sb_d1.first),
    .in_last(sb_d1.last), .in_tag({sb_d1.fin, sb_d1.eaddr}), .in_data(q),
    .out_valid(pool_valid), .out_tag(pool_tag), .out_data(pool_data));

  // ---------------- output FIFO ----------------
  logic                    f_fin   [FIFO_DEPTH];
  logic [EADDR_W-1:0]      f_eaddr [FIFO_DEPTH];
  logic [OCW-1:0]          f_cnt   [FIFO_DEPTH];
  logic signed [SIG_W-1:0] f_data  [FIFO_DEPTH][OW];
  logic [FAW-1:0]          f_wp, f_rp;
  logic [FAW:0]            f_n;
  logic                    f_push, f_empty;
  logic                    s_ready;

  assign f_push  = aux_valid || pool_valid;
  assign f_empty = (f_n == 0);

  always_ff @(posedge clk) begin
    if (f_push) begin
      if (pool_valid) begin
        {f_fin[f_wp], f_eaddr[f_wp]} <= pool_tag;
        f_cnt[f_wp] <= OCW'(N1);
        for (int j = 0; j < OW; j++) f_data[f_wp][j] <= (j < N1) ? pool_data[j] : '0;
      end else begin
        {f_fin[f_wp], f_eaddr[f_wp]} <= aux_tag;
        f_cnt[f_wp] <= OCW'(N2);
        for (int j = 0; j < OW; j++) f_data[f_wp][j] <= (j < N2) ? aux_data[j] : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      f_wp <= '0;
      f_rp <= '0;
      f_n  <= '0;
    end else begin
      if (f_push) f_wp <= (32'(f_wp) == FIFO_DEPTH - 1) ? '0 : f_wp + 1'b1;
      if (out_pop) f_rp <= (32'(f_rp) == FIFO_DEPTH - 1) ? '0 : f_rp + 1'b1;
      f_n <= f_n + (FAW+1)'(f_push) - (FAW+1)'(out_pop);
    end
  end

  assign out_pop = !f_empty && (dest_next ? d_ready : s_ready);

  assign d_valid = !f_empty && dest_next;
  assign d_eaddr = f_eaddr[f_rp];
  assign d_cnt   = f_cnt[f_rp];
  assign d_data  = f_data[f_rp];
  assign d_last  = f_fin[f_rp];

  // ---------------- tensor buffer write side ----------------
  buffer_write_port #(.N1(N1), .W_S(OW), .W_U(W_U)) u_wport (
    .clk, .rst,
    .s_valid(!f_empty && !dest_next), .s_ready, .s_eaddr(f_eaddr[f_rp]),
    .s_cnt(f_cnt[f_rp]), .s_data(f_data[f_rp]),
    .u_valid, .u_ready, .u_eaddr, .u_cnt, .u_data, .u_last,
    .wr_en(tw_en), .wr_eaddr(tw_eaddr), .wr_cnt(tw_cnt), .wr_data(tw_data),
    .ev_count, .ev_take);

  assert property (@(posedge clk) disable iff (rst) !(f_push && f_n == (FAW+1)'(FIFO_DEPTH)))
    else $error("output FIFO overflow");
endmodule
