// tb_buffer_write_port: random beats on both input streams (own beats wider
// than the buffer, upstream beats narrower) with random validity; checks
// that every element lands at its address exactly once, that beats are
// accepted only with their final chunk, and that upstream 'last' beats are
// counted as events.
// Arbitration, chunking and the event count are this design's own; the
// two writers (upstream and self-loop) follow the original chain.
module tb_buffer_write_port;
  import nn_pkg::*;
  localparam int N1 = 4, W_S = 6, W_U = 3, NE = 4096;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic s_valid, s_ready, u_valid, u_ready, u_last, wr_en, ev_take;
  logic [EADDR_W-1:0] s_eaddr, u_eaddr, wr_eaddr;
  logic [2:0] s_cnt, wr_cnt;
  logic [1:0] u_cnt;
  logic signed [SIG_W-1:0] s_data [W_S], u_data [W_U], wr_data [N1];
  logic [7:0] ev_count;
  int checks = 0, failures = 0;
  int written [NE];
  int expv [NE];
  int s_sent = 0, u_sent = 0, ev_exp = 0;
  logic s_fire, u_fire;
  localparam int NB = 150;

  buffer_write_port #(.N1(N1), .W_S(W_S), .W_U(W_U)) dut (.*);

  // capture writes
  always @(posedge clk)
    if (!rst && wr_en)
      for (int j = 0; j < N1; j++)
        if (j < int'(wr_cnt)) begin
          written[int'(wr_eaddr) + j]++;
          checks++;
          if (int'(wr_data[j]) != expv[int'(wr_eaddr) + j]) failures++;
        end

  initial begin
    for (int e = 0; e < NE; e++) begin written[e] = 0; expv[e] = -1000; end
    {s_valid, u_valid, u_last, ev_take} = '0;
    s_eaddr = '0; u_eaddr = '0; s_cnt = '0; u_cnt = '0;
    for (int j = 0; j < W_S; j++) s_data[j] = '0;
    for (int j = 0; j < W_U; j++) u_data[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // own beats cover 0..NB*8, upstream beats 2048..
    while (s_sent < NB || u_sent < NB) begin
      if (!s_valid && s_sent < NB && $urandom_range(0, 1)) begin
        s_valid = 1; s_eaddr = EADDR_W'(s_sent * 8); s_cnt = 3'($urandom_range(1, W_S));
        for (int j = 0; j < W_S; j++) begin
          s_data[j] = SIG_W'($urandom);
          if (j < int'(s_cnt)) expv[s_sent*8 + j] = int'(s_data[j]);
        end
      end
      if (!u_valid && u_sent < NB && $urandom_range(0, 1)) begin
        u_valid = 1; u_eaddr = EADDR_W'(2048 + u_sent * 4); u_cnt = 2'($urandom_range(1, W_U));
        u_last = (u_sent % 10 == 9);
        for (int j = 0; j < W_U; j++) begin
          u_data[j] = SIG_W'($urandom);
          if (j < int'(u_cnt)) expv[2048 + u_sent*4 + j] = int'(u_data[j]);
        end
      end
      ev_take = (ev_count != 0) && $urandom_range(0, 1);
      #1;
      s_fire = s_valid && s_ready;
      u_fire = u_valid && u_ready;
      @(posedge clk);
      #1;
      if (ev_take) ev_exp--;
      if (s_fire) begin s_valid = 0; s_sent++; end
      if (u_fire) begin
        if (u_last) ev_exp++;
        u_valid = 0; u_sent++;
      end
      ev_take = 0;
      checks++;
      if (int'(ev_count) != ev_exp) begin
        failures++;
        $display("event count %0d exp %0d", ev_count, ev_exp);
      end
    end
    @(posedge clk);
    for (int e = 0; e < NE; e++) begin
      checks++;
      if (written[e] != ((expv[e] != -1000) ? 1 : 0)) begin
        failures++;
        if (failures < 10) $display("element %0d written %0d times", e, written[e]);
      end
    end
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
