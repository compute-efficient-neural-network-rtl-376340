// tb_proc_controller: runs the controller alone on a strided convolution
// and a max pooling, with a modelled instruction memory, upstream events and
// an output FIFO that drains slowly. Every issued beat (tensor buffer
// address, operand cache address, first/last, slot, output address, end)
// is compared in order with a loop nest written here; the input vector must
// be read once per T beats, operand-cache fills must copy the right weight
// store words, one swap per group, and the instruction must wait for its
// event.
// Time interleaving (input read once per T weight words) follows the original
// design; the loop order, address formulas and credits are this design's own.
module tb_proc_controller;
  import nn_pkg::*;
  localparam int N1 = 4, N2 = 2, T = 2, FD = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, im_rd_en, ev_take, ws_rd_en, oc_swap, oc_wr_en, oc_rd_en, bs_rd_en, tb_rd_en;
  logic [5:0] im_addr;
  instr_t im_data;
  logic [7:0] ev_count;
  logic [11:0] ws_addr;
  logic [7:0] oc_wr_addr, oc_rd_addr;
  logic [8:0] bs_addr;
  logic [EADDR_W-1:0] tb_rd_eaddr, iss_out_eaddr;
  logic iss_valid, iss_pool, iss_first, iss_last, iss_end, dest_next, relu, out_pop;
  logic [0:0] iss_slot;
  logic [5:0] shift;
  logic [31:0] cnt_fill_stall, cnt_out_stall, cnt_ev_wait, cnt_mxv_cycles, cnt_instr;

  proc_controller #(.N1(N1), .N2(N2), .T(T), .CACHE_DEPTH(256), .WS_DEPTH(4096), .BS_DEPTH(512),
    .IM_DEPTH(64), .FIFO_DEPTH(FD)) dut (.*);

  instr_t prog [4];
  always_ff @(posedge clk) if (im_rd_en) im_data <= prog[im_addr];

  typedef struct { longint in_ea; int caddr; bit rd; bit first, last, fin; int slot; longint out_ea; bit pool; } beat_t;
  beat_t expq [$];
  int checks = 0, failures = 0, beats = 0, reads = 0, swaps = 0, fills = 0, fill_err = 0;
  int pending = 0, fifo_n = 0, delay_ctr = 0;

  // expected fill source for the conv: w_base + g*KBT + i, KBT = 2*3*2*T = 24
  int fill_expect [$];

  // side effects of the controller
  always @(posedge clk) if (!rst) begin
    if (oc_swap) swaps++;
    if (ws_rd_en) begin
      fills++;
      if (fill_expect.size() == 0 || int'(ws_addr) != fill_expect[0]) fill_err++;
      if (fill_expect.size() != 0) void'(fill_expect.pop_front());
    end
    if (iss_valid) begin
      beat_t e;
      beats++;
      if (tb_rd_en) reads++;
      if (expq.size() == 0) begin failures++; $display("unexpected beat"); end
      else begin
        e = expq.pop_front();
        checks++;
        if (tb_rd_en !== e.rd || (e.rd && tb_rd_eaddr != EADDR_W'(e.in_ea)) ||
            (!e.pool && oc_rd_addr != 8'(e.caddr)) || iss_first !== e.first || iss_last !== e.last ||
            (!e.pool && iss_slot != 1'(e.slot)) || iss_end !== e.fin || iss_pool !== e.pool ||
            (e.last && iss_out_eaddr != EADDR_W'(e.out_ea))) begin
          failures++;
          if (failures < 10) $display("beat %0d: rd %0d@%0d (exp %0d@%0d) c %0d (exp %0d) f/l %0d%0d (exp %0d%0d) out %0d (exp %0d)",
            beats, tb_rd_en, tb_rd_eaddr, e.rd, e.in_ea, oc_rd_addr, e.caddr, iss_first, iss_last, e.first, e.last, iss_out_eaddr, e.out_ea);
        end
      end
      if (iss_last) pending++;
    end
  end

  // results reach the FIFO some cycles later and drain one every 16 cycles
  always_ff @(posedge clk) begin
    if (rst) begin fifo_n <= 0; delay_ctr <= 0; end
    else begin
      delay_ctr <= delay_ctr + 1;
      fifo_n <= fifo_n + (iss_valid && iss_last ? 1 : 0) - (out_pop ? 1 : 0);
    end
  end
  assign out_pop = (fifo_n > 0) && (delay_ctr % 16 == 0);

  always @(posedge clk) if (!rst && fifo_n > FD) begin failures++; $display("credit overflow"); end

  initial begin
    instr_t a;
    start = 0; ev_count = 0;
    // conv: 2x3 output, stride 2, 2x3 filter, 2 channel blocks, 3 groups
    a = '0;
    a.op = OP_CONV; a.wait_ev = 1; a.in_base = 7; a.in_row_stride = 100; a.in_pix_stride = 8;
    a.fx_stride = 8; a.conv_stride = 2; a.out_h = 2; a.out_w = 3; a.fy_n = 2; a.fx_n = 3; a.cb_n = 2;
    a.groups = 3; a.w_base = 50; a.b_base = 3; a.out_base = 1000; a.out_row_stride = 40; a.out_pix_stride = 12;
    prog[0] = a;
    for (int g = 0; g < 3; g++) begin
      for (int i = 0; i < 24; i++) fill_expect.push_back(50 + g*24 + i);
      for (int y = 0; y < 2; y++) for (int x = 0; x < 3; x++)
        for (int fy = 0; fy < 2; fy++) for (int fx = 0; fx < 3; fx++) for (int cb = 0; cb < 2; cb++)
          for (int t = 0; t < T; t++) begin
            beat_t e;
            int kb;
            kb = (fy*3 + fx)*2 + cb;
            e.pool = 0;
            e.in_ea = 7 + (y*2 + fy)*100 + x*2*8 + fx*8 + cb*N1;
            e.caddr = kb*T + t; e.rd = (t == 0);
            e.first = (kb == 0); e.last = (kb == 11); e.slot = t;
            e.out_ea = 1000 + y*40 + x*12 + (g*T + t)*N2;
            e.fin = (g == 2 && y == 1 && x == 2 && kb == 11 && t == T-1);
            expq.push_back(e);
          end
    end
    // pool: 2x2 output, 3x3 window stride 2, 2 channel blocks
    a = '0;
    a.op = OP_POOL; a.in_base = 0; a.in_row_stride = 50; a.in_pix_stride = 8; a.fx_stride = 8;
    a.conv_stride = 2; a.out_h = 2; a.out_w = 2; a.fy_n = 3; a.fx_n = 3; a.cb_n = 2;
    a.out_base = 500; a.out_row_stride = 16; a.out_pix_stride = 8; a.dest_next = 1;
    prog[1] = a;
    for (int y = 0; y < 2; y++) for (int x = 0; x < 2; x++) for (int cb = 0; cb < 2; cb++)
      for (int fy = 0; fy < 3; fy++) for (int fx = 0; fx < 3; fx++) begin
        beat_t e;
        e.pool = 1; e.rd = 1; e.caddr = 0; e.slot = 0;
        e.in_ea = (y*2 + fy)*50 + x*2*8 + fx*8 + cb*N1;
        e.first = (fy == 0 && fx == 0); e.last = (fy == 2 && fx == 2);
        e.out_ea = 500 + y*16 + x*8 + cb*N1;
        e.fin = (y == 1 && x == 1 && cb == 1 && e.last);
        expq.push_back(e);
      end
    a = '0; a.op = OP_JUMP; a.jump_to = 3; prog[2] = a;
    a = '0; a.op = OP_HALT; prog[3] = a;

    repeat (2) @(posedge clk);
    #1 rst = 0;
    start = 1; @(posedge clk); #1 start = 0;
    repeat (30) @(posedge clk);
    #1;
    checks++; if (beats != 0) failures++;          // still waiting for the event
    ev_count = 1;
    @(posedge clk); #1;
    ev_count = 0;
    wait (!busy);
    @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d beats missing", expq.size()); end
    checks++; if (reads != 3*6*12 + 2*2*2*9) begin failures++; $display("reads %0d", reads); end
    checks++; if (swaps != 3) begin failures++; $display("swaps %0d", swaps); end
    checks++; if (fills != 72 || fill_err != 0) begin failures++; $display("fills %0d errors %0d", fills, fill_err); end
    checks++; if (cnt_mxv_cycles != 3*6*12*T) begin failures++; $display("mxv %0d", cnt_mxv_cycles); end
    checks++; if (cnt_instr != 2) begin failures++; $display("instr %0d", cnt_instr); end
    checks++; if (cnt_out_stall == 0 || cnt_ev_wait < 25) begin failures++; $display("stall %0d wait %0d", cnt_out_stall, cnt_ev_wait); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
