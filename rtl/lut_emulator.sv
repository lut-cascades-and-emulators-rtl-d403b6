// lut_emulator: emulator of an LUT cascade with a single unit.
//
// Instead of one memory per cell, one large memory for logic holds the
// tables of all cells, a page (or part of a page, with memory packing) per
// cell, and the cells are evaluated one after another. In step i the
// programmable interconnection network puts the page number of cell i on
// the high address bits, its primary inputs on the middle bits and the
// rails (cell i-1's outputs, read back from the memory's own output
// through the feedback shifter) on the low bits; the word read is cell i's
// output. The output shifter moves each cell's primary outputs into the
// output register. The unit's output feeds its own feedback shifter.
//
//   start/x : start one evaluation of the primary inputs x (sampled at
//             the start edge); ignored while busy
//   done    : one-cycle pulse when y holds all primary outputs; for an
//             emulated cascade of s cells, s+1 clocks after the start edge
//   lm_*    : write the memory for logic; icn_*: write step word icn_idx
//
// Defaults follow the document's packing example: 8 inputs, 6 address bits
// (four 16-word pages), 4 data bits, 5 outputs, four cells. The output
// register width and step count are taken from that example; the timing
// is this design's choice.
module lut_emulator
  import lut_pkg::*;
#(
  parameter int unsigned N_IN   = 8,
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 4,
  parameter int unsigned OUT_W  = 5,
  parameter int unsigned STEPS  = 4,
  localparam int unsigned IDX_W = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned CFG_W = cfg_w(ADDR_W, N_IN, DATA_W, OUT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_IN-1:0]   x,
  output logic              busy,
  output logic              done,
  output logic [OUT_W-1:0]  y,
  input  logic              lm_we,
  input  logic [ADDR_W-1:0] lm_addr,
  input  logic [DATA_W-1:0] lm_data,
  input  logic              icn_we,
  input  logic [IDX_W-1:0]  icn_idx,
  input  logic [CFG_W-1:0]  icn_data
);

  logic              load, last;
  logic [0:0]        unit_en;
  logic [0:0]        unit_sel;   // always 0 with a single unit; left unread
  logic [IDX_W-1:0]  step_idx;
  logic [DATA_W-1:0] rd_data;

  emu_control #(.UNITS(1), .STEPS(STEPS)) u_control (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .last    (last),
    .busy    (busy),
    .load    (load),
    .unit_en (unit_en),
    .unit_sel(unit_sel),
    .step_idx(step_idx),
    .done    (done)
  );

  emu_unit #(
    .N_IN(N_IN), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .OUT_W(OUT_W), .STEPS(STEPS)
  ) u_unit (
    .clk     (clk),
    .rst_n   (rst_n),
    .x       (x),
    .x_load  (load),
    .out_clr (load),
    .en      (unit_en[0]),
    .step_idx(step_idx),
    .fb_in   (rd_data),
    .rd_data (rd_data),
    .last    (last),
    .y       (y),
    .lm_we   (lm_we),
    .lm_addr (lm_addr),
    .lm_data (lm_data),
    .icn_we  (icn_we),
    .icn_idx (icn_idx),
    .icn_data(icn_data)
  );

endmodule
