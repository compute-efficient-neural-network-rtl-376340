// operand_cache: double-buffered filter-weight cache next to the MxV.
//
// Each word is one N2 x N1 weight block, so the MxV can take a new block every
// cycle. There are two banks: the MxV reads the active bank while the
// controller fills the other with the weights of the next output-channel
// group from the weight store; a swap pulse exchanges the roles. Reads are
// synchronous (data one cycle after rd_en, held while rd_en is low); a write
// always goes to the inactive bank. On the FPGA this is distributed (LUT) RAM,
// which runs at the DSP clock. DEPTH words per bank is this design's choice.
module operand_cache #(
  parameter int unsigned WORD_W = 16*96*8,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              swap,        // exchange active and fill banks
  output logic              active_bank, // bank read by the MxV
  input  logic              wr_en,       // write into the fill bank
  input  logic [AW-1:0]     wr_addr,
  input  logic [WORD_W-1:0] wr_data,
  input  logic              rd_en,       // read from the active bank
  input  logic [AW-1:0]     rd_addr,
  output logic [WORD_W-1:0] rd_data
);
  logic [WORD_W-1:0] bank [2][DEPTH];

  always_ff @(posedge clk) begin
    if (rst)       active_bank <= 1'b0;
    else if (swap) active_bank <= ~active_bank;
  end

  always_ff @(posedge clk) begin
    if (wr_en) bank[~active_bank][wr_addr] <= wr_data;
    if (rd_en) rd_data <= bank[active_bank][rd_addr];
  end
endmodule
