// proc_controller: the instruction sequencer ("neural-net firmware" engine) of
// one processor.
//
// There is no central controller in the chain: each processor runs its own
// instruction list and is driven by events. An instruction first waits for
// wait_ev events from the upstream processor (one event = one finished
// upstream instruction whose results were written into this processor's
// tensor buffer), then runs, then waits until all its results have been
// written before the next instruction is fetched.
//
// Convolution (OP_CONV). The weight matrix of a layer is cut into blocks of N2
// output channels x N1 input elements, and output channels are time
// interleaved T ways, so one group covers N2*T output channels. For each group
// the controller sweeps all output pixels; for each pixel it visits every
// filter tap (fy, fx) and input channel block cb (kb = (fy*fx_n+fx)*cb_n+cb),
// and for each kb it issues T consecutive MxV cycles, one per interleaved slot
// t. The input vector is read from the tensor buffer only on slot 0 and is
// reused for the remaining T-1 cycles, so the input address moves at 1/T of the
// rate of the weight address (operand cache word kb*T+t). The bias of slot t
// enters the MxV cascade on the first kb. Weights of a group are copied from
// the weight store into the inactive operand-cache bank while the previous
// group computes; a group starts only when its fill has finished (fill stall).
//
// Max pooling (OP_POOL) sweeps pixels, channel blocks and the pooling window,
// one tensor buffer read per cycle, into the pool unit.
//
// Issue is throttled by a credit count: at most FIFO_DEPTH results may be in
// flight between issue and the processor's output FIFO (output stall).
// Issued control signals describe cycle c; memory data return at c+1, where
// the processor lines them up with the delayed side-band (iss_*).
module proc_controller
  import nn_pkg::*;
#(
  parameter int unsigned N1          = 96,
  parameter int unsigned N2          = 16,
  parameter int unsigned T           = 4,
  parameter int unsigned CACHE_DEPTH = 256,
  parameter int unsigned WS_DEPTH    = 4096,
  parameter int unsigned BS_DEPTH    = 512,
  parameter int unsigned IM_DEPTH    = 64,
  parameter int unsigned FIFO_DEPTH  = 16,
  localparam int unsigned TW  = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned CAW = (CACHE_DEPTH > 1) ? $clog2(CACHE_DEPTH) : 1,
  localparam int unsigned WAW = (WS_DEPTH > 1) ? $clog2(WS_DEPTH) : 1,
  localparam int unsigned BAW = (BS_DEPTH > 1) ? $clog2(BS_DEPTH) : 1,
  localparam int unsigned IAW = (IM_DEPTH > 1) ? $clog2(IM_DEPTH) : 1,
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,          // begin at instruction 0
  output logic                busy,
  // instruction memory
  output logic                im_rd_en,
  output logic [IAW-1:0]      im_addr,
  input  instr_t              im_data,
  // upstream events
  input  logic [7:0]          ev_count,
  output logic                ev_take,
  // weight store -> operand cache fill
  output logic                ws_rd_en,
  output logic [WAW-1:0]      ws_addr,
  output logic                oc_swap,
  output logic                oc_wr_en,
  output logic [CAW-1:0]      oc_wr_addr,
  output logic                oc_rd_en,
  output logic [CAW-1:0]      oc_rd_addr,
  // bias store
  output logic                bs_rd_en,
  output logic [BAW-1:0]      bs_addr,
  // tensor buffer read
  output logic                tb_rd_en,
  output logic [EADDR_W-1:0]  tb_rd_eaddr,
  // issue side-band for cycle c
  output logic                iss_valid,
  output logic                iss_pool,
  output logic                iss_first,
  output logic                iss_last,
  output logic [TW-1:0]       iss_slot,
  output logic [EADDR_W-1:0]  iss_out_eaddr,
  output logic                iss_end,
  // current instruction settings for the back end
  output logic                dest_next,
  output logic [5:0]          shift,
  output logic                relu,
  // output credits
  input  logic                out_pop,        // one result left the output FIFO
  // activity counters
  output logic [31:0]         cnt_fill_stall,
  output logic [31:0]         cnt_out_stall,
  output logic [31:0]         cnt_ev_wait,
  output logic [31:0]         cnt_mxv_cycles,
  output logic [31:0]         cnt_instr
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_WAIT, S_GSTART, S_RUN, S_DRAIN} state_e;
  state_e state;

  instr_t ins;
  logic [IAW-1:0] pc;

  // loop counters
  logic [9:0]  y, x;
  logic [3:0]  fy, fx;
  logic [7:0]  cb, g;
  logic [TW-1:0] t;
  logic [CAW-1:0] caddr;
  logic [7:0]  ev_left;

  // credits
  logic [FCW-1:0] inflight;

  // fill engine
  logic           fill_busy;
  logic [CAW:0]   fill_n, fill_i;
  logic [WAW-1:0] fill_src;
  logic           fill_wr_d;
  logic [CAW-1:0] fill_dst_d;
  logic [CAW:0]   kbt;         // cache words per group = KB * T

  assign kbt = (CAW+1)'(ins.fy_n * ins.fx_n * ins.cb_n * T);

  logic is_pool, can_issue;
  logic w_first, w_last, kb_first, kb_last, pix_last, grp_last;
  assign is_pool  = (ins.op == OP_POOL);
  assign can_issue = (state == S_RUN) && (inflight < FCW'(FIFO_DEPTH));

  // end-of-loop conditions
  logic fy_e, fx_e, cb_e, t_e, x_e, y_e, g_e;
  assign fy_e = (fy == ins.fy_n - 4'd1);
  assign fx_e = (fx == ins.fx_n - 4'd1);
  assign cb_e = (cb == ins.cb_n - 8'd1);
  assign t_e  = is_pool || (32'(t) == T - 1);
  assign x_e  = (x == ins.out_w - 10'd1);
  assign y_e  = (y == ins.out_h - 10'd1);
  assign g_e  = is_pool || (g == ins.groups - 8'd1);
  assign w_first = (fy == 0) && (fx == 0);
  assign w_last  = fy_e && fx_e;
  assign kb_first = w_first && (cb == 0);
  assign kb_last  = w_last && cb_e;
  // last beat of a pixel (conv) / of a pixel's last channel block (pool)
  assign pix_last = is_pool ? (kb_last) : (kb_last && t_e);
  assign grp_last = pix_last && x_e && y_e;

  // addresses of the current beat
  logic [EADDR_W-1:0] in_ea, out_ea;
  always_comb begin
    in_ea = ins.in_base
          + EADDR_W'((32'(y) * ins.conv_stride + 32'(fy)) * ins.in_row_stride)
          + EADDR_W'(32'(x) * ins.conv_stride * ins.in_pix_stride)
          + EADDR_W'(32'(fx) * ins.fx_stride)
          + EADDR_W'(32'(cb) * N1);
    out_ea = ins.out_base
           + EADDR_W'(32'(y) * ins.out_row_stride)
           + EADDR_W'(32'(x) * ins.out_pix_stride)
           + (is_pool ? EADDR_W'(32'(cb) * N1)
                      : EADDR_W'((32'(g) * T + 32'(t)) * N2));
  end

  // memory and issue outputs
  assign im_rd_en      = (state == S_FETCH);
  assign im_addr       = pc;
  assign tb_rd_en      = can_issue && (is_pool || t == 0);
  assign tb_rd_eaddr   = in_ea;
  assign oc_rd_en      = can_issue && !is_pool;
  assign oc_rd_addr    = caddr;
  assign bs_rd_en      = can_issue && !is_pool;
  assign bs_addr       = BAW'(32'(ins.b_base) + 32'(g) * T + 32'(t));
  assign iss_valid     = can_issue;
  assign iss_pool      = is_pool;
  assign iss_first     = is_pool ? w_first : kb_first;
  assign iss_last      = is_pool ? w_last  : kb_last;
  assign iss_slot      = is_pool ? '0 : t;
  assign iss_out_eaddr = out_ea;
  assign iss_end       = (is_pool ? (w_last && cb_e && x_e && y_e) : (grp_last && g_e));
  assign dest_next     = ins.dest_next;
  assign shift         = ins.shift;
  assign relu          = ins.relu;
  assign busy          = (state != S_IDLE);
  assign ev_take       = (state == S_WAIT) && (ev_left != 0) && (ev_count != 0);

  // results leaving the issue stage: conv on the last kb of every slot, pool
  // at the end of each window
  logic result_issued;
  assign result_issued = can_issue && iss_last;

  always_ff @(posedge clk) begin
    if (rst) inflight <= '0;
    else     inflight <= inflight + FCW'(result_issued) - FCW'(out_pop);
  end

  // fill engine: weight store -> inactive operand cache bank
  logic fill_go;
  logic [7:0] fill_grp;
  assign ws_rd_en   = fill_busy;
  assign ws_addr    = fill_src;
  assign oc_wr_en   = fill_wr_d;
  assign oc_wr_addr = fill_dst_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      fill_busy <= 1'b0;
      fill_wr_d <= 1'b0;
    end else begin
      fill_wr_d  <= fill_busy;
      fill_dst_d <= CAW'(fill_i);
      if (fill_go) begin
        fill_busy <= 1'b1;
        fill_i    <= '0;
        fill_n    <= kbt;
        fill_src  <= WAW'(32'(ins.w_base) + 32'(fill_grp) * 32'(kbt));
      end else if (fill_busy) begin
        fill_i   <= fill_i + 1'b1;
        fill_src <= fill_src + 1'b1;
        if (fill_i + 1'b1 == fill_n) fill_busy <= 1'b0;
      end
    end
  end

  // fill_pending: a fill was started and its last write has not landed yet
  logic fill_pending;
  assign fill_pending = fill_busy || fill_wr_d;

  // main sequencer
  always_comb begin
    fill_go  = 1'b0;
    fill_grp = '0;
    oc_swap  = 1'b0;
    if (state == S_DECODE && im_data.op == OP_CONV) begin
      // handled in S_WAIT exit below
    end
    if (state == S_WAIT && ev_left == 0 && ins.op == OP_CONV && !fill_pending) begin
      fill_go  = 1'b1;          // group 0
      fill_grp = '0;
    end
    if (state == S_GSTART && !fill_pending) begin
      oc_swap = 1'b1;
      if (!g_e) begin
        fill_go  = 1'b1;        // prefetch group g+1 while g computes
        fill_grp = g + 8'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      pc             <= '0;
      cnt_fill_stall <= '0;
      cnt_out_stall  <= '0;
      cnt_ev_wait    <= '0;
      cnt_mxv_cycles <= '0;
      cnt_instr      <= '0;
      ins            <= '0;
      {y, x, fy, fx, cb, g, t, caddr, ev_left} <= '0;
    end else begin
      if (state == S_RUN && !can_issue) cnt_out_stall <= cnt_out_stall + 1;
      if (can_issue && !is_pool)       cnt_mxv_cycles <= cnt_mxv_cycles + 1;
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          ins <= im_data;
          unique case (im_data.op)
            OP_HALT: state <= S_IDLE;
            OP_JUMP: begin
              pc    <= IAW'(im_data.jump_to);
              state <= S_FETCH;
            end
            default: begin
              ev_left <= im_data.wait_ev;
              state   <= S_WAIT;
            end
          endcase
        end
        S_WAIT: begin
          if (ev_left != 0) begin
            cnt_ev_wait <= cnt_ev_wait + 1;
            if (ev_count != 0) ev_left <= ev_left - 8'd1;
          end else begin
            {y, x, fy, fx, cb, g, t, caddr} <= '0;
            state <= is_pool ? S_RUN : (fill_pending ? S_WAIT : S_GSTART);
          end
        end
        S_GSTART: begin
          if (fill_pending) begin
            // the first group of a layer waits for its initial fill; count
            // only waits between groups, where a fill failed to hide
            if (g != 0) cnt_fill_stall <= cnt_fill_stall + 1;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: if (can_issue) begin
          caddr <= caddr + 1'b1;
          // innermost loop first
          if (!is_pool) begin
            if (!t_e) t <= t + 1'b1;
            else begin
              t <= '0;
              if (!cb_e) cb <= cb + 8'd1;
              else begin
                cb <= '0;
                if (!fx_e) fx <= fx + 4'd1;
                else begin
                  fx <= '0;
                  if (!fy_e) fy <= fy + 4'd1;
                  else begin
                    fy    <= '0;
                    caddr <= '0;
                    if (!x_e) x <= x + 10'd1;
                    else begin
                      x <= '0;
                      if (!y_e) y <= y + 10'd1;
                      else begin
                        y <= '0;
                        if (!g_e) begin
                          g     <= g + 8'd1;
                          state <= S_GSTART;
                        end else state <= S_DRAIN;
                      end
                    end
                  end
                end
              end
            end
          end else begin
            // pool: window innermost, then channel block, then pixel
            if (!fx_e) fx <= fx + 4'd1;
            else begin
              fx <= '0;
              if (!fy_e) fy <= fy + 4'd1;
              else begin
                fy <= '0;
                if (!cb_e) cb <= cb + 8'd1;
                else begin
                  cb <= '0;
                  if (!x_e) x <= x + 10'd1;
                  else begin
                    x <= '0;
                    if (!y_e) y <= y + 10'd1;
                    else state <= S_DRAIN;
                  end
                end
              end
            end
          end
        end
        S_DRAIN: if (inflight == 0 && !out_pop) begin
          cnt_instr <= cnt_instr + 1;
          pc        <= pc + 1'b1;
          state     <= S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The operand cache holds one group; a layer whose group does not fit is a
  // firmware error.
  assert property (@(posedge clk) disable iff (rst)
    (state == S_GSTART) |-> (32'(kbt) <= CACHE_DEPTH))
    else $error("operand cache too small for this layer");
endmodule
