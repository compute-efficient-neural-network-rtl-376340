// tb_accumulator_bank: random interleaved accumulation sequences (T slots,
// K contributions per sum) against a model; every finished sum must appear
// one cycle after its last contribution, with its tag.
// The T-slot interleave follows the original design; the first/last/tag
// protocol checked here is this design's own.
module tb_accumulator_bank;
  import nn_pkg::*;
  localparam int N2 = 3, T = 3, TAG_W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_first, in_last, out_valid;
  logic [1:0] in_slot;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic signed [ACC_W-1:0] z [N2], out_acc [N2];
  int checks = 0, failures = 0;
  logic signed [ACC_W-1:0] m [T][N2];

  accumulator_bank #(.N2(N2), .T(T), .TAG_W(TAG_W)) dut (.*);

  initial begin
    {in_valid, in_first, in_last, in_slot, in_tag} = '0;
    for (int o = 0; o < N2; o++) z[o] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int run = 0; run < 40; run++) begin
      int K;
      K = $urandom_range(1, 5);
      for (int k = 0; k < K; k++)
        for (int t = 0; t < T; t++) begin
          in_valid = 1; in_first = (k == 0); in_last = (k == K-1);
          in_slot = 2'(t); in_tag = TAG_W'(run * T + t);
          for (int o = 0; o < N2; o++) begin
            z[o] = ACC_W'($signed($urandom_range(0, 200000)) - 100000);
            m[t][o] = (k == 0) ? z[o] : m[t][o] + z[o];
          end
          @(posedge clk); #1;
          checks++;
          if (out_valid !== (k == K-1)) failures++;
          if (k == K-1) begin
            checks++;
            if (out_tag !== TAG_W'(run * T + t)) failures++;
            for (int o = 0; o < N2; o++) begin
              checks++;
              if (out_acc[o] !== m[t][o]) begin
                failures++;
                $display("run %0d slot %0d lane %0d: %0d exp %0d", run, t, o, out_acc[o], m[t][o]);
              end
            end
          end
        end
      in_valid = 0;
      // an idle cycle between runs must not disturb anything
      @(posedge clk); #1;
      checks++;
      if (out_valid !== 1'b0) failures++;
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
