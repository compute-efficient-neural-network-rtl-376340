// tb_mxv_array: streams a fresh random vector q, weight block P and r into
// the MxV every cycle and checks that z = P q + r of cycle c appears exactly
// N1 cycles later, for every output lane.
// z = P q + r follows the original design; the latency of N1 cycles is this
// design's own (one register per cascade stage).
module tb_mxv_array;
  import nn_pkg::*;
  localparam int N1 = 7, N2 = 3, CYC = 300;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [SIG_W-1:0] q [N1];
  logic signed [SIG_W-1:0] w [N2][N1];
  logic signed [ACC_W-1:0] r [N2], z [N2];
  int checks = 0, failures = 0;

  mxv_array #(.N1(N1), .N2(N2)) dut (.clk, .q, .w, .r, .z);

  logic signed [ACC_W-1:0] exp_z [CYC][N2];

  initial begin
    for (int c = 0; c < CYC + N1; c++) begin
      for (int i = 0; i < N1; i++) q[i] = SIG_W'($urandom);
      for (int o = 0; o < N2; o++) begin
        r[o] = ACC_W'($signed($urandom_range(0, 100000)) - 50000);
        for (int i = 0; i < N1; i++) w[o][i] = SIG_W'($urandom);
      end
      if (c < CYC)
        for (int o = 0; o < N2; o++) begin
          exp_z[c][o] = r[o];
          for (int i = 0; i < N1; i++) exp_z[c][o] += ACC_W'(w[o][i]) * ACC_W'(q[i]);
        end
      @(posedge clk); #1;
      if (c + 1 - N1 >= 0 && c + 1 - N1 < CYC)
        for (int o = 0; o < N2; o++) begin
          checks++;
          if (z[o] !== exp_z[c+1-N1][o]) begin
            failures++;
            if (failures < 10) $display("mismatch c=%0d o=%0d z=%0d exp=%0d", c+1-N1, o, z[o], exp_z[c+1-N1][o]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
