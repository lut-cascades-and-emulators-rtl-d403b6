// lut_cell: one cell of an LUT cascade, a programmable look-up table.
//
// The cell is a 2**IN_W x OUT_W memory. Its address is the cell's input
// vector (primary inputs and rails from the previous cell) and its word is
// the cell's output vector (rails to the next cell and primary outputs).
// The read is asynchronous: rd_data follows rd_addr combinationally, so a
// cascade of cells is a combinational circuit, as in the document. The
// default size, 12 inputs and 16 outputs (a 64K-bit table), lies inside the
// 10-15 input / 8-16 output range the document gives for cascade cells; the
// exact pair is this design's choice.
//
// Programming: a synchronous write port (wr_en, wr_addr, wr_data) loads one
// word per clock. Contents are not reset; they must be written before use.
module lut_cell #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IN_W-1:0]  wr_addr,
  input  logic [OUT_W-1:0] wr_data,
  input  logic [IN_W-1:0]  rd_addr,
  output logic [OUT_W-1:0] rd_data
);

  logic [OUT_W-1:0] table_q [2**IN_W];

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_addr] <= wr_data;
  end

  assign rd_data = table_q[rd_addr];

endmodule
