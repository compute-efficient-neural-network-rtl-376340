// tb_processor_chain: a whole chain (input bias, P1..P4) runs the small
// network of tb_nn_pkg end to end, with reduced memory depths. The host
// configures all four processors over the shared bus, starts them, then
// streams the image while the processors already wait for it. The logits
// must match the reference; per processor the MxV cycle count must equal
// groups x pixels x kb x T of its layers, and every mechanism of the chain
// must have occurred: event waits in each processor, the P2 and P3
// self-loops, max pooling, the concatenation of two P3 branches in P4,
// chunked writes of 16-wide P3 results into 8-lane P4, and fill stalls.
// The chain, its shapes and self-loops follow the original design; the
// network is a small stand-in for GoogLeNet, not the original workload.
module tb_processor_chain;
  import nn_pkg::*;
  import tb_nn_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, cfg_valid, i_valid, i_ready, i_last, l_valid, l_ready, l_last;
  logic [3:0] busy;
  logic [1:0] cfg_proc;
  cfg_target_e cfg_target;
  logic [31:0] cfg_addr;
  logic [CFG_W-1:0] cfg_data;
  logic [EADDR_W-1:0] i_eaddr, l_eaddr;
  logic [4:0] i_cnt;
  logic [3:0] l_cnt;
  logic signed [SIG_W-1:0] i_data [21], l_data [8];
  logic [31:0] cnt_fill_stall [4], cnt_out_stall [4], cnt_ev_wait [4], cnt_mxv_cycles [4], cnt_instr [4];

  processor_chain #(.P1_TB(64), .P2_TB(512), .P3_TB(64), .P4_TB(64),
    .P1_WS(64), .P2_WS(64), .P3_WS(64), .P4_WS(1024), .P1_BS(16), .P2_BS(16), .P3_BS(16),
    .P4_BS(64), .P4_CACHE(64), .IM_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  int got [64];
  int nlast = 0, chunked = 0, p2_self = 0, p3_self = 0;
  mini_net net;
  int bias [3] = '{5, -7, 3};

  always @(posedge clk) if (!rst) begin
    if (l_valid && l_ready) begin
      for (int j = 0; j < int'(l_cnt); j++) got[int'(l_eaddr) + j] = int'(l_data[j]);
      if (l_last) nlast++;
    end
    if (dut.u_p4.u_wport.busy) chunked++;
    if (dut.u_p2.u_wport.wr_en && !dut.u_p2.u_wport.sel) p2_self++;
    if (dut.u_p3.u_wport.wr_en && !dut.u_p3.u_wport.sel) p3_self++;
  end
  always @(negedge clk) l_ready <= ($urandom_range(0, 2) != 0);

  initial begin
    int img [];
    net = new();
    // the image seen by P1 is the host image plus the channel bias
    img = new[net.image.size()];
    foreach (net.image[e]) begin
      net.image[e] = net.image[e] < -120 ? -120 : (net.image[e] > 120 ? 120 : net.image[e]);
      img[e] = net.image[e] + bias[e % 3];
    end
    begin
      mini_net ref_net;
      ref_net = net;
      ref_net.a1 = conv_ref(img, IMG, IMG, 3, net.w1, net.b1, 32, 7, 7, 2, 7, 1);
      ref_net.a2 = conv_ref(net.a1, 2, 2, 32, net.w2, net.b2, 64, 1, 1, 1, 6, 1);
      ref_net.a3 = pool_ref(net.a2, 2, 2, 64, 2, 1);
      ref_net.a4 = conv_ref(net.a3, 1, 1, 64, net.w3, net.b3, 64, 1, 1, 1, 6, 1);
      ref_net.a5 = conv_ref(net.a4, 1, 1, 64, net.w4, net.b4, 64, 1, 1, 1, 6, 1);
      ref_net.a6 = conv_ref(net.a3, 1, 1, 64, net.w6, net.b6, 64, 1, 1, 1, 6, 1);
      foreach (net.a5[i]) begin net.cat[i] = net.a5[i]; net.cat[64 + i] = net.a6[i]; end
      ref_net.logits = conv_ref(net.cat, 1, 1, 128, net.w5, net.b5, NLOGIT, 1, 1, 1, 5, 0);
    end
    foreach (got[i]) got[i] = -999;
    start = 0; cfg_valid = 0; cfg_proc = 0; cfg_target = CFG_INSTR; cfg_addr = 0; cfg_data = 0;
    i_valid = 0; i_eaddr = 0; i_cnt = 0; i_last = 0;
    foreach (i_data[j]) i_data[j] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (net.q[k]) begin
      cfg_valid = 1; cfg_proc = 2'(net.q[k].proc); cfg_target = net.q[k].tg;
      cfg_addr = net.q[k].addr; cfg_data = net.q[k].data;
      @(posedge clk); #1;
    end
    for (int c = 0; c < 3; c++) begin
      cfg_valid = 1; cfg_target = CFG_INBIAS; cfg_addr = c; cfg_data = CFG_W'(bias[c]);
      @(posedge clk); #1;
    end
    cfg_valid = 0;
    start = 1; @(posedge clk); #1; start = 0;
    repeat (20) @(posedge clk); #1;
    for (int e = 0; e < IMG*IMG*3; e += 21) begin
      i_valid = 1; i_eaddr = EADDR_W'(e); i_cnt = 5'((IMG*IMG*3 - e < 21) ? IMG*IMG*3 - e : 21);
      i_last = (e + 21 >= IMG*IMG*3);
      foreach (i_data[j]) i_data[j] = (e + j < IMG*IMG*3) ? SIG_W'(net.image[e + j]) : '0;
      #1;
      while (!i_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    i_valid = 0;
    wait (busy == 4'b0000);
    repeat (5) @(posedge clk);

    for (int i = 0; i < NLOGIT; i++) begin
      checks++;
      if (got[i] != net.logits[i]) begin
        failures++;
        $display("logit %0d = %0d, expected %0d", i, got[i], net.logits[i]);
      end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (int'(cnt_mxv_cycles[p]) != net.mxv_cycles[p]) begin
        failures++;
        $display("P%0d MxV cycles %0d, expected %0d", p + 1, cnt_mxv_cycles[p], net.mxv_cycles[p]);
      end
      checks++;
      if (cnt_ev_wait[p] == 0) begin failures++; $display("P%0d never waited for an event", p + 1); end
      $display("P%0d: instr %0d, MxV cycles %0d, event-wait %0d, fill-stall %0d, output-stall %0d",
               p + 1, cnt_instr[p], cnt_mxv_cycles[p], cnt_ev_wait[p], cnt_fill_stall[p], cnt_out_stall[p]);
    end
    checks++; if (cnt_instr[0] != 1 || cnt_instr[1] != 2 || cnt_instr[2] != 3 || cnt_instr[3] != 1) begin failures++; $display("instruction counts"); end
    checks++; if (nlast != 1) begin failures++; $display("logit 'last' beats %0d", nlast); end
    checks++; if (chunked == 0) begin failures++; $display("no chunked write"); end
    checks++; if (p2_self == 0 || p3_self == 0) begin failures++; $display("self-loop unused"); end
    checks++; if (cnt_fill_stall[3] == 0) begin failures++; $display("no fill stall"); end
    $display("self-loop writes P2 %0d, P3 %0d; chunked-write cycles %0d", p2_self, p3_self, chunked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
