// tb_aux_unit: random sums, shifts and ReLU settings against a reference of
// round-half-up arithmetic shift, ReLU and saturation; latency one cycle.
// Rounding half up and saturation are this design's own choices; the shift
// stands for the block-floating-point exponent handling of the original.
module tb_aux_unit;
  import nn_pkg::*;
  localparam int N = 4, TAG_W = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, out_valid, relu;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic signed [ACC_W-1:0] in_acc [N];
  logic signed [SIG_W-1:0] out_data [N];
  logic [5:0] shift;
  int checks = 0, failures = 0;

  aux_unit #(.N(N), .TAG_W(TAG_W)) dut (.*);

  function automatic int ref_fn(longint a, int sh, bit rl);
    longint v;
    v = (sh == 0) ? a : (a + (64'sd1 <<< (sh - 1))) >>> sh;
    if (rl && v < 0) v = 0;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return int'(v);
  endfunction

  initial begin
    in_valid = 0; relu = 0; shift = 0; in_tag = 0;
    for (int i = 0; i < N; i++) in_acc[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int it = 0; it < 500; it++) begin
      int sh;
      sh = $urandom_range(0, 12);
      shift = 6'(sh); relu = 1'($urandom); in_valid = 1; in_tag = TAG_W'(it);
      for (int i = 0; i < N; i++)
        in_acc[i] = ACC_W'($signed($urandom_range(0, 1 << (sh + 9))) - (1 << (sh + 8)));
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_tag !== TAG_W'(it)) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(out_data[i]) != ref_fn(longint'(in_acc[i]), sh, relu)) begin
          failures++;
          if (failures < 10) $display("acc %0d sh %0d relu %0d -> %0d exp %0d", in_acc[i], sh, relu, out_data[i], ref_fn(longint'(in_acc[i]), sh, relu));
        end
      end
    end
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
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
