// tb_tensor_buffer: random unaligned vector writes of 1..N1 elements and
// random unaligned vector reads against an element-level model; also checks
// that the read data are held while rd_en is low.
// The lane-banked, element-addressed organisation is this design's own; the
// original only says tensors stay in on-chip RAM.
module tb_tensor_buffer;
  import nn_pkg::*;
  localparam int N1 = 5, D = 16, NE = N1 * D;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [EADDR_W-1:0] rd_eaddr, wr_eaddr;
  logic [2:0] wr_cnt;
  logic signed [SIG_W-1:0] rd_data [N1], wr_data [N1];
  int checks = 0, failures = 0;
  logic [SIG_W-1:0] model [NE];

  tensor_buffer #(.N1(N1), .DEPTH(D)) dut (.*);

  initial begin
    rd_en = 0; wr_en = 0; rd_eaddr = '0; wr_eaddr = '0; wr_cnt = '0;
    for (int j = 0; j < N1; j++) wr_data[j] = '0;
    // initialise everything with aligned full writes
    for (int a = 0; a < D; a++) begin
      wr_en = 1; wr_eaddr = EADDR_W'(a * N1); wr_cnt = 3'(N1);
      for (int j = 0; j < N1; j++) begin wr_data[j] = SIG_W'($urandom); model[a*N1+j] = wr_data[j]; end
      @(posedge clk); #1;
    end
    for (int it = 0; it < 400; it++) begin
      int e, n;
      n = $urandom_range(1, N1);
      e = $urandom_range(0, NE - N1);
      wr_en = 1; wr_eaddr = EADDR_W'(e); wr_cnt = 3'(n);
      for (int j = 0; j < N1; j++) begin
        wr_data[j] = SIG_W'($urandom);
        if (j < n) model[e+j] = wr_data[j];
      end
      rd_en = 0;
      @(posedge clk); #1;
      wr_en = 0;
      e = $urandom_range(0, NE - N1);
      rd_en = 1; rd_eaddr = EADDR_W'(e);
      @(posedge clk); #1;
      rd_en = 0;
      for (int k = 0; k < 2; k++) begin
        for (int j = 0; j < N1; j++) begin
          checks++;
          if (rd_data[j] !== model[e+j]) begin
            failures++;
            if (failures < 10) $display("read e=%0d lane %0d: %h exp %h", e, j, rd_data[j], model[e+j]);
          end
        end
        @(posedge clk); #1;   // held
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
