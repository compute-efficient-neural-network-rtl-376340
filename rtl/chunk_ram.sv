// chunk_ram: on-chip memory written from the host in CFG_W-bit chunks and read
// one full word per cycle.
//
// Weights, biases and instructions reach every processor over one narrow
// broadcast path from the host, but the datapath reads them one wide word at a
// time (a whole N1 x N2 weight block in one cycle). The memory is therefore
// organised as NCH chunk columns that share a word address: a write carries a
// chunk address (word * NCH + chunk) and updates one chunk; a read returns all
// chunks of a word one cycle after rd_en (synchronous read, output held while
// rd_en is low). On the FPGA this maps to UltraRAM or block RAM; the chunking
// is this design's choice.
module chunk_ram #(
  parameter int unsigned WORD_W = 512,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned CW     = 64,
  localparam int unsigned NCH   = (WORD_W + CW - 1) / CW,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CAW   = $clog2(DEPTH * NCH + 1),
  localparam int unsigned CHW   = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic              clk,
  // chunk write port
  input  logic              wr_en,
  input  logic [CAW-1:0]    wr_chunk_addr,
  input  logic [CW-1:0]     wr_data,
  // word read port
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [WORD_W-1:0] rd_data
);
  logic [CW-1:0] mem [DEPTH][NCH];
  logic [NCH*CW-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (wr_en && (wr_chunk_addr / CAW'(NCH)) < CAW'(DEPTH))
      mem[AW'(wr_chunk_addr / CAW'(NCH))][CHW'(wr_chunk_addr % CAW'(NCH))] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int c = 0; c < NCH; c++) rd_q[c*CW +: CW] <= mem[rd_addr][c];
  end

  assign rd_data = rd_q[WORD_W-1:0];
endmodule
