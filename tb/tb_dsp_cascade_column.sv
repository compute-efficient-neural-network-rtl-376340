// tb_dsp_cascade_column: checks one cascade column against a direct dot
// product. Random operands are held for a new value every cycle, skewed the
// way the column expects (lane i sees the value of cycle c at cycle c+i);
// the result for the operands of cycle c must appear at exactly c + N1.
// The summing cascade follows the original design; the one-register-per-
// stage timing checked here is this design's own.
module tb_dsp_cascade_column;
  import nn_pkg::*;
  localparam int N1 = 5;
  localparam int CYC = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [SIG_W-1:0] q_skew [N1], w_skew [N1];
  logic signed [ACC_W-1:0] r, z;
  int checks = 0, failures = 0;

  dsp_cascade_column #(.N1(N1)) dut (.clk, .q_skew, .w_skew, .r, .z);

  logic signed [SIG_W-1:0] qh [CYC][N1], wh [CYC][N1];
  logic signed [ACC_W-1:0] rh [CYC], exp_z [CYC];

  initial begin
    for (int c = 0; c < CYC; c++) begin
      exp_z[c] = 0;
      rh[c] = ACC_W'($signed($urandom_range(0, 2000)) - 1000);
      exp_z[c] = rh[c];
      for (int i = 0; i < N1; i++) begin
        qh[c][i] = SIG_W'($urandom);
        wh[c][i] = SIG_W'($urandom);
        exp_z[c] += ACC_W'(qh[c][i]) * ACC_W'(wh[c][i]);
      end
    end
    for (int c = 0; c < CYC + N1; c++) begin
      for (int i = 0; i < N1; i++) begin
        q_skew[i] = (c - i >= 0 && c - i < CYC) ? qh[c-i][i] : '0;
        w_skew[i] = (c - i >= 0 && c - i < CYC) ? wh[c-i][i] : '0;
      end
      r = (c < CYC) ? rh[c] : '0;
      @(posedge clk); #1;
      // z now holds the result of the operands that entered stage 0 at c+1-N1
      if (c + 1 - N1 >= 0 && c + 1 - N1 < CYC) begin
        checks++;
        if (z !== exp_z[c+1-N1]) begin
          failures++;
          $display("mismatch cycle %0d: z=%0d exp=%0d", c+1-N1, z, exp_z[c+1-N1]);
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
