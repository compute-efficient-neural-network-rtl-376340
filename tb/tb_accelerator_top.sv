// tb_accelerator_top: the whole accelerator at its default sizes (three
// chains, GoogLeNet-sized memories). Each chain gets its own random instance
// of the small network of tb_nn_pkg (own weights, own image, own input
// biases); the three chains run at the same time and each must produce its
// own reference logits. Also checked per chain and processor: MxV cycle
// counts, instruction counts, and that the configuration of one chain never
// leaks into another. Every mechanism must occur at least once in every chain
// and is counted: event waits (all processors), fill stalls and output stalls
// (P4, whose logits port is held not-ready in long windows), self-loop writes
// (P2, P3), chunked writes (16-wide P3 results into 8-lane P4) and max pooling
// (P2). The logits port is ready for 512 of every 2048 cycles.
// Three independent chains follow the original design; the small network
// stands in for GoogLeNet, which is far too slow to simulate here.
module tb_accelerator_top;
  import nn_pkg::*;
  import tb_nn_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NC-1:0] start;
  logic [3:0] busy [NC];
  logic cfg_valid;
  logic [1:0] cfg_chain, cfg_proc;
  cfg_target_e cfg_target;
  logic [31:0] cfg_addr;
  logic [CFG_W-1:0] cfg_data;
  logic i_valid [NC], i_ready [NC], i_last [NC], l_valid [NC], l_ready [NC], l_last [NC];
  logic [EADDR_W-1:0] i_eaddr [NC], l_eaddr [NC];
  logic [4:0] i_cnt [NC];
  logic [3:0] l_cnt [NC];
  logic signed [SIG_W-1:0] i_data [NC][21], l_data [NC][8];
  logic [31:0] cnt_fill_stall [NC][4], cnt_out_stall [NC][4], cnt_ev_wait [NC][4];
  logic [31:0] cnt_mxv_cycles [NC][4], cnt_instr [NC][4];

  accelerator_top dut (.*);

  int checks = 0, failures = 0;
  int got [NC][64];
  int cyc = 0;
  int self_wr [NC][2], chunked [NC], pooled [NC];
  mini_net net [NC];
  int bias [NC][3];

  always @(posedge clk) if (!rst)
    for (int c = 0; c < NC; c++)
      if (l_valid[c] && l_ready[c])
        for (int j = 0; j < int'(l_cnt[c]); j++) got[c][int'(l_eaddr[c]) + j] = int'(l_data[c][j]);
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) for (int c = 0; c < NC; c++) l_ready[c] <= ((cyc + 300 * c) % 2048 >= 1536);

  // mechanism monitors (hierarchical, per chain)
  for (genvar c = 0; c < NC; c++) begin : g_mon
    initial begin self_wr[c][0] = 0; self_wr[c][1] = 0; chunked[c] = 0; pooled[c] = 0; end
    always @(posedge clk) if (!rst) begin
      if (dut.g_chain[c].u_chain.u_p2.u_wport.wr_en && !dut.g_chain[c].u_chain.u_p2.u_wport.sel) self_wr[c][0]++;
      if (dut.g_chain[c].u_chain.u_p3.u_wport.wr_en && !dut.g_chain[c].u_chain.u_p3.u_wport.sel) self_wr[c][1]++;
      if (dut.g_chain[c].u_chain.u_p4.u_wport.busy) chunked[c]++;
      if (dut.g_chain[c].u_chain.u_p2.u_pool.out_valid) pooled[c]++;
    end
  end

  task automatic send_image(int c);
    for (int e = 0; e < IMG*IMG*3; e += 21) begin
      i_valid[c] = 1; i_eaddr[c] = EADDR_W'(e);
      i_cnt[c] = 5'((IMG*IMG*3 - e < 21) ? IMG*IMG*3 - e : 21);
      i_last[c] = (e + 21 >= IMG*IMG*3);
      for (int j = 0; j < 21; j++) i_data[c][j] = (e + j < IMG*IMG*3) ? SIG_W'(net[c].image[e + j]) : '0;
      #1;
      while (!i_ready[c]) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    i_valid[c] = 0;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      int img [];
      net[c] = new();
      for (int k = 0; k < 3; k++) bias[c][k] = $urandom_range(0, 16) - 8;
      img = new[net[c].image.size()];
      foreach (net[c].image[e]) begin
        net[c].image[e] = net[c].image[e] < -120 ? -120 : (net[c].image[e] > 120 ? 120 : net[c].image[e]);
        img[e] = net[c].image[e] + bias[c][e % 3];
      end
      net[c].a1 = conv_ref(img, IMG, IMG, 3, net[c].w1, net[c].b1, 32, 7, 7, 2, 7, 1);
      net[c].a2 = conv_ref(net[c].a1, 2, 2, 32, net[c].w2, net[c].b2, 64, 1, 1, 1, 6, 1);
      net[c].a3 = pool_ref(net[c].a2, 2, 2, 64, 2, 1);
      net[c].a4 = conv_ref(net[c].a3, 1, 1, 64, net[c].w3, net[c].b3, 64, 1, 1, 1, 6, 1);
      net[c].a5 = conv_ref(net[c].a4, 1, 1, 64, net[c].w4, net[c].b4, 64, 1, 1, 1, 6, 1);
      net[c].a6 = conv_ref(net[c].a3, 1, 1, 64, net[c].w6, net[c].b6, 64, 1, 1, 1, 6, 1);
      foreach (net[c].a5[i]) begin net[c].cat[i] = net[c].a5[i]; net[c].cat[64 + i] = net[c].a6[i]; end
      net[c].logits = conv_ref(net[c].cat, 1, 1, 128, net[c].w5, net[c].b5, NLOGIT, 1, 1, 1, 5, 0);
      foreach (got[c][i]) got[c][i] = -999;
      i_valid[c] = 0; i_eaddr[c] = 0; i_cnt[c] = 0; i_last[c] = 0;
      for (int j = 0; j < 21; j++) i_data[c][j] = 0;
    end
    start = 0; cfg_valid = 0; cfg_chain = 0; cfg_proc = 0; cfg_target = CFG_INSTR; cfg_addr = 0; cfg_data = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < NC; c++) begin
      foreach (net[c].q[k]) begin
        cfg_valid = 1; cfg_chain = 2'(c); cfg_proc = 2'(net[c].q[k].proc); cfg_target = net[c].q[k].tg;
        cfg_addr = net[c].q[k].addr; cfg_data = net[c].q[k].data;
        @(posedge clk); #1;
      end
      for (int k = 0; k < 3; k++) begin
        cfg_valid = 1; cfg_chain = 2'(c); cfg_target = CFG_INBIAS; cfg_addr = k; cfg_data = CFG_W'(bias[c][k]);
        @(posedge clk); #1;
      end
    end
    cfg_valid = 0;
    start = '1; @(posedge clk); #1; start = '0;
    fork
      send_image(0);
      send_image(1);
      send_image(2);
    join
    for (int c = 0; c < NC; c++) wait (busy[c] == 4'b0000);
    repeat (5) @(posedge clk);

    for (int c = 0; c < NC; c++) begin
      for (int i = 0; i < NLOGIT; i++) begin
        checks++;
        if (got[c][i] != net[c].logits[i]) begin
          failures++;
          $display("chain %0d logit %0d = %0d, expected %0d", c, i, got[c][i], net[c].logits[i]);
        end
      end
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(cnt_mxv_cycles[c][p]) != net[c].mxv_cycles[p]) begin
          failures++;
          $display("chain %0d P%0d MxV cycles %0d, expected %0d", c, p + 1, cnt_mxv_cycles[c][p], net[c].mxv_cycles[p]);
        end
      end
      checks++;
      if (cnt_instr[c][0] != 1 || cnt_instr[c][1] != 2 || cnt_instr[c][2] != 3 || cnt_instr[c][3] != 1) begin
        failures++;
        $display("chain %0d instruction counts wrong", c);
      end
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (cnt_ev_wait[c][p] == 0) begin failures++; $display("chain %0d P%0d never waited for an event", c, p + 1); end
      end
      checks++; if (cnt_fill_stall[c][3] == 0) begin failures++; $display("chain %0d: no fill stall", c); end
      checks++; if (cnt_out_stall[c][3] == 0) begin failures++; $display("chain %0d: no output stall", c); end
      checks++; if (self_wr[c][0] == 0 || self_wr[c][1] == 0) begin failures++; $display("chain %0d: self-loop unused", c); end
      checks++; if (chunked[c] == 0) begin failures++; $display("chain %0d: no chunked write", c); end
      checks++; if (pooled[c] == 0) begin failures++; $display("chain %0d: no pooling", c); end
      $display("chain %0d: fill stalls %0d, output stalls %0d, event waits %0d/%0d/%0d/%0d, self-loop writes %0d/%0d, chunked %0d, pooled %0d",
               c, cnt_fill_stall[c][3], cnt_out_stall[c][3], cnt_ev_wait[c][0], cnt_ev_wait[c][1], cnt_ev_wait[c][2],
               cnt_ev_wait[c][3], self_wr[c][0], self_wr[c][1], chunked[c], pooled[c]);
      $display("chain %0d logits %0d %0d %0d ... MxV cycles P1..P4 %0d %0d %0d %0d", c,
               got[c][0], got[c][1], got[c][2], cnt_mxv_cycles[c][0], cnt_mxv_cycles[c][1],
               cnt_mxv_cycles[c][2], cnt_mxv_cycles[c][3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
