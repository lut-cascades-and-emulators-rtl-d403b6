// lut_cascade: an LUT cascade, a series connection of CELLS look-up tables.
//
// Cell 0 is addressed by the first IN_W primary inputs. Every later cell i
// is addressed by RAILS rail bits, the low RAILS bits of cell i-1's output
// word, on its low address bits, and by IN_W-RAILS new primary inputs on its
// high address bits. Interconnection exists only between adjacent cells.
// The whole cascade is combinational: y settles one cell delay per stage
// after x changes, so its delay is CELLS memory reads, easy to predict.
//
//   x : N_IN = IN_W + (CELLS-1)*(IN_W-RAILS) primary inputs, x[0] first
//   y : all cell output words, cell i at y[i*OUT_W +: OUT_W]; the rail bits
//       are included so that any cell's outputs can serve as primary outputs
//   prog_* : writes one word of cell prog_cell per clock
//
// From the document: the series structure, the rails between adjacent cells
// and the cell count of the fabricated prototype (8). This design's choices:
// the uniform cell size, 8 rails, rails on the low address bits (as in the
// document's four-cell example) and the exposure of every cell word.
module lut_cascade
  import lut_pkg::*;
#(
  parameter int unsigned CELLS = 8,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned RAILS = 8,
  localparam int unsigned N_IN  = cascade_n_in(CELLS, IN_W, RAILS),
  localparam int unsigned NEW_W = IN_W - RAILS,
  localparam int unsigned CSEL_W = (CELLS > 1) ? $clog2(CELLS) : 1
) (
  input  logic                   clk,
  input  logic [N_IN-1:0]        x,
  output logic [CELLS*OUT_W-1:0] y,
  input  logic                   prog_en,
  input  logic [CSEL_W-1:0]      prog_cell,
  input  logic [IN_W-1:0]        prog_addr,
  input  logic [OUT_W-1:0]       prog_data
);

  initial begin
    assert (RAILS < IN_W && RAILS <= OUT_W && RAILS > 0)
      else $error("lut_cascade: need 0 < RAILS < IN_W and RAILS <= OUT_W");
  end

  logic [IN_W-1:0]  addr [CELLS];
  logic [OUT_W-1:0] data [CELLS];

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    if (i == 0) begin : g_first
      assign addr[i] = x[IN_W-1:0];
    end else begin : g_next
      assign addr[i] = {x[IN_W + (i-1)*NEW_W +: NEW_W], data[i-1][RAILS-1:0]};
    end

    lut_cell #(.IN_W(IN_W), .OUT_W(OUT_W)) u_cell (
      .clk    (clk),
      .wr_en  (prog_en && (prog_cell == CSEL_W'(i))),
      .wr_addr(prog_addr),
      .wr_data(prog_data),
      .rd_addr(addr[i]),
      .rd_data(data[i])
    );

    assign y[i*OUT_W +: OUT_W] = data[i];
  end

endmodule
