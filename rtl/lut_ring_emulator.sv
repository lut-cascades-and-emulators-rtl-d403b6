// lut_ring_emulator: emulator with several units connected as an LUT ring.
//
// UNITS units, each with its own primary inputs, interconnection network,
// memories, shifters and output register, are connected in a ring: the
// memory output (rails) of unit u feeds the feedback shifter of unit u+1,
// and the last unit feeds unit 0. Two modes, chosen by `stream`:
//
// Sequential mode (stream = 0), low power. A cascade of s cells is emulated
// with cell i on unit i mod UNITS, using that unit's configuration word
// i / UNITS, so a unit may hold several cells (pages). One step is done per
// clock and only the unit of the current step reads its memory
// (unit_active one-hot); the others are in stand-by.
//   start/x : start one evaluation; x sampled at the start edge
//   done    : one-cycle pulse s+1 clocks after the start edge, y valid
//
// Streaming mode (stream = 1), high throughput, for a cascade of exactly
// UNITS cells (cell u on unit u, configuration word 0 of each unit). All
// units work at once on successive input vectors, like a pipelined
// cascade: a new vector may enter every clock.
//   in_valid/x : a vector is sampled at every edge with in_valid high; unit
//                u uses its inputs u clocks later, so all units' inputs of
//                one vector are applied together
//   out_valid  : y holds the outputs of the vector sampled UNITS+1 clocks
//                earlier (the same delay as a sequential evaluation of
//                UNITS cells); output bits that no cell writes keep the
//                value they had (zero after reset or a sequential start)
// Switch modes only when idle and the stream pipeline is empty (asserted).
//
//   x    : primary inputs, unit u at x[u*N_IN +: N_IN]
//   y    : primary outputs, unit u at y[u*OUT_W +: OUT_W]
//   prog_unit selects the unit written by lm_* and icn_*
//
// From the document: the units, their contents, the ring connection, the
// one-active-unit stand-by operation and the statement that several units
// can work simultaneously for higher throughput; the default of two units
// is its figure. This design's choices: round-robin cell placement, the
// timing, and the form of the streaming mode (input skew and output
// alignment registers, one cell per unit).
module lut_ring_emulator
  import lut_pkg::*;
#(
  parameter int unsigned UNITS  = 2,
  parameter int unsigned N_IN   = 8,
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 4,
  parameter int unsigned OUT_W  = 5,
  parameter int unsigned STEPS  = 4,
  localparam int unsigned IDX_W  = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned USEL_W = (UNITS > 1) ? $clog2(UNITS) : 1,
  localparam int unsigned CFG_W  = cfg_w(ADDR_W, N_IN, DATA_W, OUT_W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   stream,
  input  logic                   start,
  input  logic                   in_valid,
  input  logic [UNITS*N_IN-1:0]  x,
  output logic                   busy,
  output logic                   done,
  output logic                   out_valid,
  output logic [UNITS-1:0]       unit_active,
  output logic [UNITS*OUT_W-1:0] y,
  input  logic [USEL_W-1:0]      prog_unit,
  input  logic                   lm_we,
  input  logic [ADDR_W-1:0]      lm_addr,
  input  logic [DATA_W-1:0]      lm_data,
  input  logic                   icn_we,
  input  logic [IDX_W-1:0]       icn_idx,
  input  logic [CFG_W-1:0]       icn_data
);

  logic                load;
  logic [UNITS-1:0]    unit_en, unit_last, en;
  logic [USEL_W-1:0]   unit_sel;
  logic [IDX_W-1:0]    step_idx, unit_idx;
  logic [DATA_W-1:0]   rails [UNITS];
  logic [OUT_W-1:0]    y_unit [UNITS];

  // Streaming pipeline: vd[k] = in_valid delayed k clocks (vd[0] = in_valid),
  // xd[u] = unit u's inputs delayed u clocks.
  logic [UNITS+2:0]    vd;
  logic [N_IN-1:0]     xd [UNITS];

  emu_control #(.UNITS(UNITS), .STEPS(STEPS)) u_control (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start && !stream),
    .last    (unit_last[unit_sel]),
    .busy    (busy),
    .load    (load),
    .unit_en (unit_en),
    .unit_sel(unit_sel),
    .step_idx(step_idx),
    .done    (done)
  );

  assign vd[0] = stream && in_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vd[UNITS+2:1] <= '0;
    else        vd[UNITS+2:1] <= vd[UNITS+1:0];
  end
  assign out_valid = vd[UNITS+2];

  assign en       = stream ? vd[UNITS:1] : unit_en;
  assign unit_idx = stream ? '0 : step_idx;

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    // input skew: unit u sees a vector's inputs u clocks after it entered
    if (u == 0) begin : g_x0
      assign xd[u] = x[u*N_IN +: N_IN];
    end else begin : g_xd
      logic [N_IN-1:0] skew_q [u];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < u; k++) skew_q[k] <= '0;
        end else begin
          skew_q[0] <= x[u*N_IN +: N_IN];
          for (int k = 1; k < u; k++) skew_q[k] <= skew_q[k-1];
        end
      end
      assign xd[u] = stream ? skew_q[u-1] : x[u*N_IN +: N_IN];
    end

    emu_unit #(
      .N_IN(N_IN), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .OUT_W(OUT_W), .STEPS(STEPS)
    ) u_unit (
      .clk     (clk),
      .rst_n   (rst_n),
      .x       (xd[u]),
      .x_load  (stream ? vd[u] : load),
      .out_clr (load),
      .en      (en[u]),
      .step_idx(unit_idx),
      .fb_in   (rails[(u + UNITS - 1) % UNITS]),
      .rd_data (rails[u]),
      .last    (unit_last[u]),
      .y       (y_unit[u]),
      .lm_we   (lm_we && (prog_unit == USEL_W'(u))),
      .lm_addr (lm_addr),
      .lm_data (lm_data),
      .icn_we  (icn_we && (prog_unit == USEL_W'(u))),
      .icn_idx (icn_idx),
      .icn_data(icn_data)
    );

    // output alignment: unit u's part of a vector is ready UNITS-1-u clocks
    // before the last unit's part and is held that long
    if (u == UNITS - 1) begin : g_ylast
      assign y[u*OUT_W +: OUT_W] = y_unit[u];
    end else begin : g_yd
      localparam int unsigned D = UNITS - 1 - u;
      logic [OUT_W-1:0] align_q [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < D; k++) align_q[k] <= '0;
        end else begin
          align_q[0] <= y_unit[u];
          for (int k = 1; k < D; k++) align_q[k] <= align_q[k-1];
        end
      end
      assign y[u*OUT_W +: OUT_W] = stream ? align_q[D-1] : y_unit[u];
    end
  end

  assign unit_active = en;

  a_mode_switch_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (stream != $past(stream)) |-> (!busy && vd[UNITS+2:1] == '0));

endmodule
