// tb_nn_processor: one small processor (4 x 2 MxV, two-way interleave) runs
// a three-instruction program against a reference model computed here:
//   I0  3x3 convolution, 8 -> 8 channels, 5x5 input, ReLU, result kept in the
//       own tensor buffer (self-loop); waits for one upstream event (the image)
//   I1  2x2 max pooling, stride 1, of that result, sent downstream
//   I2  fully connected layer over the 72 conv outputs -> 8 outputs, sent
//       downstream (one pixel per group, so the weight fill cannot hide)
//   I3  halt
// The image arrives late (event wait), the output FIFO is tiny and the
// downstream side drops ready at random (output stalls). Checks: every
// downstream element, the MxV cycle count (groups x pixels x kb x T), the
// instruction count, 'last' on the final beat of each instruction, and that
// each mechanism occurred.
// The datapath order (buffer, MxV, accumulators, auxiliary unit) follows the
// original design; the instruction set is this design's own.
module tb_nn_processor;
  import nn_pkg::*;
  localparam int N1 = 4, N2 = 2, T = 2, W_U = 4;
  localparam int H = 5, C = 8, CO = 8, F = 3, HO = H - F + 1;   // conv
  localparam int SH0 = 4, SH2 = 6;
  localparam int OW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, cfg_valid;
  cfg_target_e cfg_target;
  logic [31:0] cfg_addr;
  logic [CFG_W-1:0] cfg_data;
  logic u_valid, u_ready, u_last, d_valid, d_ready, d_last;
  logic [EADDR_W-1:0] u_eaddr, d_eaddr;
  logic [2:0] u_cnt, d_cnt;
  logic signed [SIG_W-1:0] u_data [W_U], d_data [OW];
  logic [31:0] cnt_fill_stall, cnt_out_stall, cnt_ev_wait, cnt_mxv_cycles, cnt_instr;

  nn_processor #(.N1(N1), .N2(N2), .T(T), .W_U(W_U), .TB_DEPTH(128), .CACHE_DEPTH(64),
    .WS_DEPTH(256), .BS_DEPTH(16), .IM_DEPTH(8), .FIFO_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  int img [H][H][C];
  int wc [CO][F][F][C];
  int bc [CO];
  int conv_o [HO][HO][CO];
  int wf [8][72];
  int bf [8];
  int exp_out [2000];
  int got_out [2000];
  int n_last = 0;

  function automatic int aux(longint a, int sh, bit rl);
    longint v;
    v = (a + (64'sd1 <<< (sh - 1))) >>> sh;
    if (rl && v < 0) v = 0;
    return (v > 127) ? 127 : (v < -128) ? -128 : int'(v);
  endfunction

  task automatic cfg_write(cfg_target_e tg, int addr, logic [CFG_W-1:0] data);
    cfg_valid = 1; cfg_target = tg; cfg_addr = addr; cfg_data = data;
    @(posedge clk); #1;
    cfg_valid = 0;
  endtask

  task automatic put_instr(int idx, instr_t ins);
    logic [4*CFG_W-1:0] wide;
    wide = (4*CFG_W)'(ins);
    for (int c = 0; c < (INSTR_W + CFG_W - 1) / CFG_W; c++)
      cfg_write(CFG_INSTR, idx * ((INSTR_W + CFG_W - 1) / CFG_W) + c, wide[c*CFG_W +: CFG_W]);
  endtask

  // downstream sink with random ready
  always @(posedge clk) if (!rst) begin
    if (d_valid && d_ready) begin
      for (int j = 0; j < int'(d_cnt); j++) got_out[int'(d_eaddr) + j] = int'(d_data[j]);
      if (d_last) n_last++;
    end
  end
  always @(negedge clk) d_ready <= ($urandom_range(0, 3) == 0);

  initial begin
    instr_t ins;
    longint acc;
    start = 0; cfg_valid = 0; cfg_target = CFG_INSTR; cfg_addr = 0; cfg_data = 0;
    u_valid = 0; u_eaddr = 0; u_cnt = 0; u_last = 0;
    for (int j = 0; j < W_U; j++) u_data[j] = 0;
    for (int e = 0; e < 2000; e++) begin exp_out[e] = -999; got_out[e] = -999; end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // ---- data and reference ----
    foreach (img[y, x, c]) img[y][x][c] = $urandom_range(0, 255) - 128;
    foreach (wc[o, fy, fx, c]) wc[o][fy][fx][c] = $urandom_range(0, 255) - 128;
    foreach (bc[o]) bc[o] = $urandom_range(0, 4000) - 2000;
    foreach (wf[o, i]) wf[o][i] = $urandom_range(0, 255) - 128;
    foreach (bf[o]) bf[o] = $urandom_range(0, 4000) - 2000;
    for (int y = 0; y < HO; y++) for (int x = 0; x < HO; x++) for (int o = 0; o < CO; o++) begin
      acc = bc[o];
      for (int fy = 0; fy < F; fy++) for (int fx = 0; fx < F; fx++) for (int c = 0; c < C; c++)
        acc += img[y+fy][x+fx][c] * wc[o][fy][fx][c];
      conv_o[y][x][o] = aux(acc, SH0, 1);
    end
    // pooled -> downstream addresses 0.., HWC 2x2x8
    for (int y = 0; y < 2; y++) for (int x = 0; x < 2; x++) for (int c = 0; c < CO; c++) begin
      int m;
      m = -1000;
      for (int fy = 0; fy < 2; fy++) for (int fx = 0; fx < 2; fx++)
        if (conv_o[y+fy][x+fx][c] > m) m = conv_o[y+fy][x+fx][c];
      exp_out[(y*2 + x)*CO + c] = m;
    end
    // fully connected over the conv output flattened in HWC order -> 100..
    for (int o = 0; o < 8; o++) begin
      acc = bf[o];
      for (int i = 0; i < 72; i++) acc += wf[o][i] * conv_o[i/24][(i/8)%3][i%8];
      exp_out[100 + o] = aux(acc, SH2, 0);
    end

    // ---- weights: word = w_base + g*KB*T + kb*T + t, lane (o,i) ----
    // conv: KB = 9 taps x 2 channel blocks = 18, groups 2 -> words 0..71
    for (int g = 0; g < 2; g++) for (int fy = 0; fy < F; fy++) for (int fx = 0; fx < F; fx++)
      for (int cb = 0; cb < 2; cb++) for (int t = 0; t < T; t++) begin
        logic [63:0] wd;
        int kb;
        kb = (fy*F + fx)*2 + cb;
        for (int o = 0; o < N2; o++) for (int i = 0; i < N1; i++)
          wd[(o*N1+i)*8 +: 8] = 8'(wc[(g*T+t)*N2+o][fy][fx][cb*N1+i]);
        cfg_write(CFG_WEIGHT, g*36 + kb*T + t, wd);
      end
    // fully connected: KB = 18 blocks of 4 inputs, groups 2 -> words 72..143
    for (int g = 0; g < 2; g++) for (int cb = 0; cb < 18; cb++) for (int t = 0; t < T; t++) begin
      logic [63:0] wd;
      for (int o = 0; o < N2; o++) for (int i = 0; i < N1; i++)
        wd[(o*N1+i)*8 +: 8] = 8'(wf[(g*T+t)*N2+o][cb*N1+i]);
      cfg_write(CFG_WEIGHT, 72 + g*36 + cb*T + t, wd);
    end
    // biases: word = b_base + g*T + t, lane o
    for (int k = 0; k < 4; k++) begin
      cfg_write(CFG_BIAS, k, {32'(bc[k*2+1]), 32'(bc[k*2])});
      cfg_write(CFG_BIAS, 4 + k, {32'(bf[k*2+1]), 32'(bf[k*2])});
    end

    // ---- program ----
    ins = '0;
    ins.op = OP_CONV; ins.wait_ev = 1; ins.dest_next = 0;
    ins.in_base = 0; ins.in_row_stride = 16'(H*C); ins.in_pix_stride = 16'(C); ins.fx_stride = 16'(C);
    ins.conv_stride = 1; ins.out_h = HO; ins.out_w = HO; ins.fy_n = F; ins.fx_n = F; ins.cb_n = 2;
    ins.groups = 2; ins.w_base = 0; ins.b_base = 0;
    ins.out_base = 256; ins.out_row_stride = 16'(HO*CO); ins.out_pix_stride = 16'(CO);
    ins.shift = SH0; ins.relu = 1;
    put_instr(0, ins);
    ins = '0;
    ins.op = OP_POOL; ins.dest_next = 1;
    ins.in_base = 256; ins.in_row_stride = 16'(HO*CO); ins.in_pix_stride = 16'(CO); ins.fx_stride = 16'(CO);
    ins.conv_stride = 1; ins.out_h = 2; ins.out_w = 2; ins.fy_n = 2; ins.fx_n = 2; ins.cb_n = 2;
    ins.out_base = 0; ins.out_row_stride = 16'(2*CO); ins.out_pix_stride = 16'(CO);
    put_instr(1, ins);
    ins = '0;
    ins.op = OP_CONV; ins.dest_next = 1;
    ins.in_base = 256; ins.in_row_stride = 0; ins.in_pix_stride = 0; ins.fx_stride = 0;
    ins.conv_stride = 1; ins.out_h = 1; ins.out_w = 1; ins.fy_n = 1; ins.fx_n = 1; ins.cb_n = 18;
    ins.groups = 2; ins.w_base = 72; ins.b_base = 4;
    ins.out_base = 100; ins.out_row_stride = 0; ins.out_pix_stride = 0;
    ins.shift = SH2; ins.relu = 0;
    put_instr(2, ins);
    ins = '0; ins.op = OP_HALT;
    put_instr(3, ins);

    // ---- run: start, then deliver the image late ----
    start = 1; @(posedge clk); #1; start = 0;
    repeat (40) @(posedge clk);
    #1;
    for (int p = 0; p < H*H; p++)
      for (int cb = 0; cb < 2; cb++) begin
        u_valid = 1; u_eaddr = EADDR_W'(p*C + cb*N1); u_cnt = 3'(N1);
        u_last = (p == H*H - 1) && (cb == 1);
        for (int j = 0; j < N1; j++) u_data[j] = SIG_W'(img[p/H][p%H][cb*N1+j]);
        do begin #1; end while (!u_ready);
        @(posedge clk); #1;
      end
    u_valid = 0; u_last = 0;
    wait (!busy);
    repeat (5) @(posedge clk);

    for (int e = 0; e < 2000; e++) if (exp_out[e] != -999) begin
      checks++;
      if (got_out[e] != exp_out[e]) begin
        failures++;
        if (failures < 12) $display("out[%0d] = %0d, expected %0d", e, got_out[e], exp_out[e]);
      end
    end
    checks++; if (cnt_mxv_cycles != 2*HO*HO*18*T + 2*1*18*T) begin failures++; $display("mxv cycles %0d", cnt_mxv_cycles); end
    checks++; if (cnt_instr != 3) failures++;
    checks++; if (n_last != 2) begin failures++; $display("last beats %0d", n_last); end
    checks++; if (cnt_ev_wait == 0)    begin failures++; $display("no event wait"); end
    checks++; if (cnt_out_stall == 0)  begin failures++; $display("no output stall"); end
    checks++; if (cnt_fill_stall == 0) begin failures++; $display("no fill stall"); end
    $display("event-wait cycles %0d, output-stall cycles %0d, fill-stall cycles %0d, MxV cycles %0d",
             cnt_ev_wait, cnt_out_stall, cnt_fill_stall, cnt_mxv_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
