// tensor_buffer: on-chip activation memory of one processor, addressed by
// tensor element and accessed N1 consecutive elements at a time.
//
// Tensors are kept entirely on chip (UltraRAM and block RAM on the FPGA), so
// the MxV never waits for external memory. The buffer is split into N1 lane
// banks; element e lives in bank e mod N1 at word e / N1. A read of element
// address e returns elements e .. e+N1-1 in lane order, whatever the alignment
// of e: each bank reads its own word and the lanes are rotated. This lets a
// processor gather a convolution window row (for example 7 pixels x 3 colour
// channels = 21 elements) with one read. A write stores wr_cnt (1..N1)
// consecutive elements from wr_data[0..wr_cnt-1] at wr_eaddr in one cycle.
// Reads are synchronous: data appear one cycle after rd_en and are held while
// rd_en is low, so an input vector can be reused for several cycles.
// DEPTH (words per bank) is this design's choice. Lint reports the lane
// comparisons as constant for lane 0 (l < offset never holds there); that is
// the generate loop's first lane, not a fault.
module tensor_buffer
  import nn_pkg::*;
#(
  parameter int unsigned N1    = 96,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW   = (N1 > 1) ? $clog2(N1) : 1,
  localparam int unsigned CNTW = $clog2(N1 + 1)
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [EADDR_W-1:0]       rd_eaddr,
  output logic signed [SIG_W-1:0]  rd_data [N1],
  input  logic                     wr_en,
  input  logic [EADDR_W-1:0]       wr_eaddr,
  input  logic [CNTW-1:0]          wr_cnt,
  input  logic signed [SIG_W-1:0]  wr_data [N1]
);
  logic [SIG_W-1:0] bank_q [N1];
  logic [LW-1:0]    rd_off_q;

  logic [EADDR_W-1:0] rd_word, wr_word;
  logic [LW-1:0]      rd_off, wr_off;
  assign rd_word = rd_eaddr / EADDR_W'(N1);
  assign rd_off  = LW'(rd_eaddr % EADDR_W'(N1));
  assign wr_word = wr_eaddr / EADDR_W'(N1);
  assign wr_off  = LW'(wr_eaddr % EADDR_W'(N1));

  for (genvar l = 0; l < N1; l++) begin : g_bank
    logic [SIG_W-1:0] mem [DEPTH];
    logic [AW-1:0]    ra, wa;
    logic [LW-1:0]    wj;     // index of the written element that lands here
    logic             wsel;
    assign ra   = AW'(rd_word + ((LW'(l) < rd_off) ? 1 : 0));
    assign wa   = AW'(wr_word + ((LW'(l) < wr_off) ? 1 : 0));
    assign wj   = (LW'(l) >= wr_off) ? LW'(LW'(l) - wr_off) : LW'(N1 - 32'(wr_off) + l);
    assign wsel = wr_en && (32'(wj) < 32'(wr_cnt));
    always_ff @(posedge clk) begin
      if (wsel)  mem[wa] <= wr_data[wj];
      if (rd_en) bank_q[l] <= mem[ra];
    end
  end

  always_ff @(posedge clk)
    if (rd_en) rd_off_q <= rd_off;

  always_comb
    for (int j = 0; j < N1; j++)
      rd_data[j] = (32'(rd_off_q) + j < N1) ? bank_q[32'(rd_off_q) + j]
                                            : bank_q[32'(rd_off_q) + j - N1];
endmodule
