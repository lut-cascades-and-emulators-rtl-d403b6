// emu_unit: one unit of an LUT cascade emulator.
//
// A unit holds the whole datapath of a single-unit emulator: an input
// register for the primary inputs, the memory for interconnection, the
// programmable interconnection network, the memory for logic, the feedback
// shifter, the output shifter and the output register. The control network
// is outside, so that one unit can form a single-unit emulator (fb_in tied
// to its own rd_data) or several units can form an LUT ring (fb_in taken
// from the previous unit's rd_data).
//
// Timing of a step, when en is high in a cycle:
//   * cfg = configuration word step_idx (asynchronous read);
//   * the feedback shifter shifts fb_in right by cfg.fb_shift, the network
//     forms the address from x_q, the shifted rails and page constants;
//   * at the rising edge the memory for logic registers the word (rd_data)
//     and the unit registers cfg's output fields;
//   * at the following edge the output shifter writes cfg.out_cnt bits of
//     rd_data, taken from bit out_off, into the output register at out_pos.
// x_load latches x into x_q; out_clr clears the output register (both are
// pulsed at the start of a sequential evaluation; in the ring's streaming
// mode x_load follows the input pipeline and the register is never cleared).
// last reports cfg.last of the current step to the control network.
// Programming: lm_* writes the memory for logic, icn_* a configuration word
// (layout in lut_pkg::cfg_w). Every block and connection follows the
// document's figure; the field encoding and the timing are this design's.
module emu_unit
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
  input  logic [N_IN-1:0]   x,
  input  logic              x_load,
  input  logic              out_clr,
  input  logic              en,
  input  logic [IDX_W-1:0]  step_idx,
  input  logic [DATA_W-1:0] fb_in,
  output logic [DATA_W-1:0] rd_data,
  output logic              last,
  output logic [OUT_W-1:0]  y,
  input  logic              lm_we,
  input  logic [ADDR_W-1:0] lm_addr,
  input  logic [DATA_W-1:0] lm_data,
  input  logic              icn_we,
  input  logic [IDX_W-1:0]  icn_idx,
  input  logic [CFG_W-1:0]  icn_data
);

  localparam int unsigned SEL_W = pin_sel_w(N_IN, DATA_W);
  localparam int unsigned DPW   = pos_w(DATA_W);
  localparam int unsigned OPW   = pos_w(OUT_W);
  localparam int unsigned CNTW  = cnt_w(DATA_W);

  typedef struct packed {
    logic                            last;
    logic [CNTW-1:0]                 out_cnt;
    logic [OPW-1:0]                  out_pos;
    logic [DPW-1:0]                  out_off;
    logic [DPW-1:0]                  fb_shift;
    logic [ADDR_W-1:0][SEL_W-1:0]    sel;
  } cfg_t;

  cfg_t              cfg;
  logic [CFG_W-1:0]  cfg_raw;
  logic [N_IN-1:0]   x_q;
  logic [DATA_W-1:0] fb_sh;
  logic [DATA_W-1:0] fb_unused_mask;
  logic [ADDR_W-1:0] addr;

  // Output fields of the step whose word is now on rd_data.
  logic              cap_v;
  logic [CNTW-1:0]   cap_cnt;
  logic [OPW-1:0]    cap_pos;
  logic [DPW-1:0]    cap_off;
  logic [OUT_W-1:0]  out_data, out_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x_q <= '0;
    else if (x_load) x_q <= x;
  end

  emu_icn_mem #(.DEPTH(STEPS), .CFG_W(CFG_W)) u_icn_mem (
    .clk    (clk),
    .rst_n  (rst_n),
    .rd_idx (step_idx),
    .cfg    (cfg_raw),
    .wr_en  (icn_we),
    .wr_idx (icn_idx),
    .wr_data(icn_data)
  );
  assign cfg  = cfg_t'(cfg_raw);
  assign last = cfg.last;

  // Feedback shifter: rails stored in upper data bits by memory packing are
  // moved down to bit 0. Its mask output is not needed here.
  emu_shifter #(.IN_W(DATA_W), .OUT_W(DATA_W)) u_fb_shifter (
    .din (fb_in),
    .rsh (cfg.fb_shift),
    .lsh ('0),
    .cnt (CNTW'(DATA_W)),
    .dout(fb_sh),
    .mask(fb_unused_mask)
  );

  emu_pin #(.N_IN(N_IN), .W(DATA_W), .ADDR_W(ADDR_W)) u_pin (
    .x   (x_q),
    .fb  (fb_sh),
    .sel (cfg.sel),
    .addr(addr)
  );

  emu_logic_mem #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_logic_mem (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .rd_addr(addr),
    .rd_data(rd_data),
    .wr_en  (lm_we),
    .wr_addr(lm_addr),
    .wr_data(lm_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_v   <= 1'b0;
      cap_cnt <= '0;
      cap_pos <= '0;
      cap_off <= '0;
    end else begin
      cap_v <= en;
      if (en) begin
        cap_cnt <= cfg.out_cnt;
        cap_pos <= cfg.out_pos;
        cap_off <= cfg.out_off;
      end
    end
  end

  emu_shifter #(.IN_W(DATA_W), .OUT_W(OUT_W)) u_out_shifter (
    .din (rd_data),
    .rsh (cap_off),
    .lsh (cap_pos),
    .cnt (cap_cnt),
    .dout(out_data),
    .mask(out_mask)
  );

  emu_out_reg #(.OUT_W(OUT_W)) u_out_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (out_clr),
    .wr_en  (cap_v),
    .wr_data(out_data),
    .wr_mask(out_mask),
    .q      (y)
  );

endmodule
