// tb_input_bias: programs three channel biases, streams random image beats
// with random back-pressure and checks every element against
// saturate(pixel + bias[channel]), with channel = element address mod 3.
// The input bias in front of P1 follows the original design; per-channel
// biasing by address and saturation are this design's own.
module tb_input_bias;
  import nn_pkg::*;
  localparam int N = 6, IMG_CH = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cfg_valid;
  cfg_target_e cfg_target;
  logic [31:0] cfg_addr;
  logic [CFG_W-1:0] cfg_data;
  logic i_valid, i_ready, i_last, o_valid, o_ready, o_last;
  logic [EADDR_W-1:0] i_eaddr, o_eaddr;
  logic [2:0] i_cnt, o_cnt;
  logic signed [SIG_W-1:0] i_data [N], o_data [N];
  int checks = 0, failures = 0;
  int bias [IMG_CH];
  int sent = 0, got = 0;
  logic o_fire, i_fire;
  localparam int NB = 200;
  logic signed [SIG_W-1:0] hist [NB][N];
  logic [EADDR_W-1:0] haddr [NB];

  input_bias #(.N(N), .IMG_CH(IMG_CH)) dut (.*);

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    cfg_valid = 0; cfg_target = CFG_INBIAS; cfg_addr = 0; cfg_data = 0;
    i_valid = 0; i_eaddr = 0; i_cnt = 0; i_last = 0;
    for (int j = 0; j < N; j++) i_data[j] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < IMG_CH; c++) begin
      bias[c] = $urandom_range(0, 160) - 80;
      cfg_valid = 1; cfg_addr = c; cfg_data = CFG_W'($signed(bias[c]));
      @(posedge clk); #1;
    end
    cfg_valid = 0;
    for (int b = 0; b < NB; b++) begin
      haddr[b] = EADDR_W'($urandom_range(0, 5000));
      for (int j = 0; j < N; j++) hist[b][j] = SIG_W'($urandom);
    end
    while (got < NB) begin
      i_valid = (sent < NB) && ($urandom_range(0, 3) != 0);
      if (sent < NB) begin
        i_eaddr = haddr[sent]; i_cnt = 3'(N); i_last = (sent == NB - 1);
        for (int j = 0; j < N; j++) i_data[j] = hist[sent][j];
      end
      o_ready = ($urandom_range(0, 2) != 0);
      #1;
      o_fire = o_valid && o_ready;
      i_fire = i_valid && i_ready;
      @(posedge clk);
      if (o_fire) begin
        checks++;
        if (o_eaddr !== haddr[got] || o_last !== (got == NB - 1)) failures++;
        for (int j = 0; j < N; j++) begin
          checks++;
          if (int'(o_data[j]) != sat(int'(hist[got][j]) + bias[(int'(haddr[got]) + j) % IMG_CH])) failures++;
        end
        got++;
      end
      if (i_fire) sent++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
