// tb_operand_cache: fills the inactive bank while reading the active one,
// swaps, and checks that reads return the right bank's words one cycle after
// rd_en, that writes never disturb the active bank and that the output holds.
// Double buffering follows the original design; the swap and timing are
// this design's own.
module tb_operand_cache;
  localparam int W = 24, D = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic swap, active_bank, wr_en, rd_en;
  logic [2:0] wr_addr, rd_addr;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [2][D];

  operand_cache #(.WORD_W(W), .DEPTH(D)) dut (.*);

  task automatic chk(input logic [W-1:0] exp);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("mismatch: got %h exp %h", rd_data, exp);
    end
  endtask

  initial begin
    {swap, wr_en, rd_en, wr_addr, rd_addr, wr_data} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 6; round++) begin
      // fill the inactive bank, reading the active one in the same cycles
      for (int a = 0; a < D; a++) begin
        wr_en = 1; wr_addr = 3'(a); wr_data = W'($urandom);
        model[~active_bank][a] = wr_data;
        rd_en = (round > 0); rd_addr = 3'(D-1-a);
        @(posedge clk); #1;
        if (round > 0) chk(model[active_bank][D-1-a]);
      end
      wr_en = 0; rd_en = 0;
      @(posedge clk); #1;
      if (round > 0) chk(model[active_bank][0]);   // output held
      swap = 1;
      @(posedge clk); #1;
      swap = 0;
      checks++;
      if (active_bank !== 1'(round + 1)) failures++;
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
