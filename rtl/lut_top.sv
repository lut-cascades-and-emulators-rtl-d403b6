// lut_top: the LUT-based programmable logic devices side by side.
//
// Four independent subsystems, each with its own ports (prefix):
//   c_  lut_cascade        8-cell LUT cascade, combinational, 40 inputs
//   e_  lut_emulator       single-unit emulator of an LUT cascade
//   r_  lut_ring_emulator  two-unit emulator connected as an LUT ring,
//                          sequential (low power) or streaming mode
//   w_  ws_arith_decomp    16-input, 16-output weighted-sum function
//                          from two cascades and an adder
// They share only the clock (programming writes and emulator steps) and the
// active-low asynchronous reset (emulator control and registers). Every
// subsystem keeps its default sizes; see each module for its interface and
// timing.
module lut_top
  import lut_pkg::*;
#(
  localparam int unsigned C_CELLS = 8,
  localparam int unsigned C_IN_W  = 12,
  localparam int unsigned C_OUT_W = 16,
  localparam int unsigned C_RAILS = 8,
  localparam int unsigned C_N_IN  = cascade_n_in(C_CELLS, C_IN_W, C_RAILS),
  localparam int unsigned E_N_IN  = 8,
  localparam int unsigned E_ADDR_W = 6,
  localparam int unsigned E_DATA_W = 4,
  localparam int unsigned E_OUT_W  = 5,
  localparam int unsigned E_STEPS  = 4,
  localparam int unsigned E_CFG_W  = cfg_w(E_ADDR_W, E_N_IN, E_DATA_W, E_OUT_W),
  localparam int unsigned R_UNITS  = 2,
  localparam int unsigned W_N = 16,
  localparam int unsigned W_Q = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // LUT cascade
  input  logic [C_N_IN-1:0]          c_x,
  output logic [C_CELLS*C_OUT_W-1:0] c_y,
  input  logic                       c_prog_en,
  input  logic [2:0]                 c_prog_cell,
  input  logic [C_IN_W-1:0]          c_prog_addr,
  input  logic [C_OUT_W-1:0]         c_prog_data,
  // single-unit emulator
  input  logic                       e_start,
  input  logic [E_N_IN-1:0]          e_x,
  output logic                       e_busy,
  output logic                       e_done,
  output logic [E_OUT_W-1:0]         e_y,
  input  logic                       e_lm_we,
  input  logic [E_ADDR_W-1:0]        e_lm_addr,
  input  logic [E_DATA_W-1:0]        e_lm_data,
  input  logic                       e_icn_we,
  input  logic [$clog2(E_STEPS)-1:0] e_icn_idx,
  input  logic [E_CFG_W-1:0]         e_icn_data,
  // two-unit ring emulator
  input  logic                       r_stream,
  input  logic                       r_start,
  input  logic                       r_in_valid,
  input  logic [R_UNITS*E_N_IN-1:0]  r_x,
  output logic                       r_busy,
  output logic                       r_done,
  output logic                       r_out_valid,
  output logic [R_UNITS-1:0]         r_unit_active,
  output logic [R_UNITS*E_OUT_W-1:0] r_y,
  input  logic [0:0]                 r_prog_unit,
  input  logic                       r_lm_we,
  input  logic [E_ADDR_W-1:0]        r_lm_addr,
  input  logic [E_DATA_W-1:0]        r_lm_data,
  input  logic                       r_icn_we,
  input  logic [$clog2(E_STEPS)-1:0] r_icn_idx,
  input  logic [E_CFG_W-1:0]         r_icn_data,
  // WS function by arithmetic decomposition
  input  logic [W_N-1:0]             w_x,
  output logic [2*W_Q-1:0]           w_f,
  input  logic                       w_pa_en,
  input  logic [0:0]                 w_pa_cell,
  input  logic [11:0]                w_pa_addr,
  input  logic [7:0]                 w_pa_data,
  input  logic                       w_pb_en,
  input  logic [1:0]                 w_pb_cell,
  input  logic [12:0]                w_pb_addr,
  input  logic [11:0]                w_pb_data
);

  lut_cascade u_cascade (
    .clk      (clk),
    .x        (c_x),
    .y        (c_y),
    .prog_en  (c_prog_en),
    .prog_cell(c_prog_cell),
    .prog_addr(c_prog_addr),
    .prog_data(c_prog_data)
  );

  lut_emulator u_emulator (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (e_start),
    .x       (e_x),
    .busy    (e_busy),
    .done    (e_done),
    .y       (e_y),
    .lm_we   (e_lm_we),
    .lm_addr (e_lm_addr),
    .lm_data (e_lm_data),
    .icn_we  (e_icn_we),
    .icn_idx (e_icn_idx),
    .icn_data(e_icn_data)
  );

  lut_ring_emulator u_ring (
    .clk        (clk),
    .rst_n      (rst_n),
    .stream     (r_stream),
    .start      (r_start),
    .in_valid   (r_in_valid),
    .x          (r_x),
    .busy       (r_busy),
    .done       (r_done),
    .out_valid  (r_out_valid),
    .unit_active(r_unit_active),
    .y          (r_y),
    .prog_unit  (r_prog_unit),
    .lm_we      (r_lm_we),
    .lm_addr    (r_lm_addr),
    .lm_data    (r_lm_data),
    .icn_we     (r_icn_we),
    .icn_idx    (r_icn_idx),
    .icn_data   (r_icn_data)
  );

  ws_arith_decomp u_ws (
    .clk    (clk),
    .x      (w_x),
    .f      (w_f),
    .pa_en  (w_pa_en),
    .pa_cell(w_pa_cell),
    .pa_addr(w_pa_addr),
    .pa_data(w_pa_data),
    .pb_en  (w_pb_en),
    .pb_cell(w_pb_cell),
    .pb_addr(w_pb_addr),
    .pb_data(w_pb_data)
  );

endmodule
