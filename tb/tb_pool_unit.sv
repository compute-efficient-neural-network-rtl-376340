// tb_pool_unit: random windows of 1..9 vectors; the lane-wise maximum must
// leave one cycle after the last vector of each window, and nothing else.
// Max pooling is a layer type of the original network; the pool unit and its
// timing are this design's own.
module tb_pool_unit;
  import nn_pkg::*;
  localparam int N = 6, TAG_W = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_first, in_last, out_valid;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic signed [SIG_W-1:0] in_data [N], out_data [N];
  int checks = 0, failures = 0;
  int mx [N];

  pool_unit #(.N(N), .TAG_W(TAG_W)) dut (.*);

  initial begin
    {in_valid, in_first, in_last, in_tag} = '0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int w = 0; w < 100; w++) begin
      int K;
      K = $urandom_range(1, 9);
      for (int k = 0; k < K; k++) begin
        in_valid = 1; in_first = (k == 0); in_last = (k == K-1); in_tag = TAG_W'(w);
        for (int i = 0; i < N; i++) begin
          in_data[i] = SIG_W'($urandom);
          if (k == 0 || int'(in_data[i]) > mx[i]) mx[i] = int'(in_data[i]);
        end
        @(posedge clk); #1;
        checks++;
        if (out_valid !== (k == K-1)) failures++;
      end
      in_valid = 0;
      checks++;
      if (out_tag !== TAG_W'(w)) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(out_data[i]) != mx[i]) begin
          failures++;
          $display("window %0d lane %0d: %0d exp %0d", w, i, out_data[i], mx[i]);
        end
      end
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
