// tb_chunk_ram: writes random chunks in random order (including a partial
// last chunk) and reads whole words back against a model.
// The chunked host write path is this design's own choice.
module tb_chunk_ram;
  localparam int WORD_W = 150, DEPTH = 10, CW = 64, NCH = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en;
  logic [$clog2(DEPTH*NCH+1)-1:0] wr_chunk_addr;
  logic [CW-1:0] wr_data;
  logic [3:0] rd_addr;
  logic [WORD_W-1:0] rd_data;
  logic [NCH*CW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  chunk_ram #(.WORD_W(WORD_W), .DEPTH(DEPTH), .CW(CW)) dut (.*);

  initial begin
    wr_en = 0; rd_en = 0; wr_chunk_addr = '0; wr_data = '0; rd_addr = '0;
    for (int a = 0; a < DEPTH * NCH; a++) begin
      wr_en = 1; wr_chunk_addr = 5'(a); wr_data = {$urandom, $urandom};
      model[a / NCH][(a % NCH) * CW +: CW] = wr_data;
      @(posedge clk); #1;
    end
    for (int it = 0; it < 300; it++) begin
      int a;
      a = $urandom_range(0, DEPTH * NCH - 1);
      wr_en = 1; wr_chunk_addr = 5'(a); wr_data = {$urandom, $urandom};
      model[a / NCH][(a % NCH) * CW +: CW] = wr_data;
      @(posedge clk); #1;
      wr_en = 0;
      rd_en = 1; rd_addr = 4'($urandom_range(0, DEPTH - 1));
      @(posedge clk); #1;
      rd_en = 0;
      checks++;
      if (rd_data !== model[rd_addr][WORD_W-1:0]) begin
        failures++;
        $display("word %0d mismatch", rd_addr);
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
