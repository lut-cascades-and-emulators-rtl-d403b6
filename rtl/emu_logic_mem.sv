// emu_logic_mem: the memory for logic of an emulator unit.
//
// A 2**ADDR_W x DATA_W memory that holds the tables of the emulated cells,
// one or more cells per page. The high address bits choose the page and the
// low ones come from the cell's inputs, all supplied by the programmable
// interconnection network. The read is synchronous: with en high the word
// at rd_addr appears on rd_data after the next rising clock edge. With en
// low (stand-by mode) the memory is not read and rd_data keeps its last
// value, which is how the outputs of one step stay available as rails for
// the next step. The default size (64 words of 4 bits, four 16-word pages)
// is the memory of the document's packing example; the synchronous read and
// the enable are this design's choices.
//
// Programming: synchronous write port (wr_en, wr_addr, wr_data).
module emu_logic_mem #(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem_q [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem_q[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd_data <= '0;
    else if (en) rd_data <= mem_q[rd_addr];
  end

endmodule
