// emu_control: control network of an emulator.
//
// Sequences one evaluation of the emulated cascade (or ring). A start in
// IDLE raises load for one cycle (the units latch their primary inputs and
// clear their output registers) and enters RUN. In RUN one step is done per
// clock: unit_en is one-hot on the unit that emulates the current cell, and
// step_idx is that unit's local step (its page / configuration word). The
// units take turns in ring order 0,1,..,UNITS-1,0,... so only one unit is
// active (reads its memory) at any time and the others stay in stand-by.
// The step that carries the last flag, or the UNITS*STEPS-th step, ends RUN;
// one FLUSH cycle lets the last memory word reach the output register, and
// done pulses for one cycle in the cycle after that, when all primary
// outputs are valid. An evaluation of s cells thus takes s+1 clocks from
// the start edge to the done cycle.
//
// The document gives the control network's role and the one-active-unit
// rule of the multi-unit emulator; the state machine and its timing are
// this design's choices.
module emu_control #(
  parameter int unsigned UNITS = 2,
  parameter int unsigned STEPS = 4,
  localparam int unsigned IDX_W  = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned USEL_W = (UNITS > 1) ? $clog2(UNITS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              last,
  output logic              busy,
  output logic              load,
  output logic [UNITS-1:0]  unit_en,
  output logic [USEL_W-1:0] unit_sel,
  output logic [IDX_W-1:0]  step_idx,
  output logic              done
);

  typedef enum logic [1:0] {IDLE, RUN, FLUSH} state_e;

  state_e            state_q;
  logic [USEL_W-1:0] unit_q;
  logic [IDX_W-1:0]  idx_q;
  logic              final_step;

  assign final_step = last || ((32'(unit_q) == UNITS - 1) && (32'(idx_q) == STEPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      unit_q  <= '0;
      idx_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          state_q <= RUN;
          unit_q  <= '0;
          idx_q   <= '0;
        end
        RUN: if (final_step) begin
          state_q <= FLUSH;
        end else if (32'(unit_q) == UNITS - 1) begin
          unit_q <= '0;
          idx_q  <= idx_q + 1'b1;
        end else begin
          unit_q <= unit_q + 1'b1;
        end
        FLUSH: begin
          state_q <= IDLE;
          done    <= 1'b1;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy     = (state_q != IDLE);
  assign load     = (state_q == IDLE) && start;
  assign unit_sel = unit_q;
  assign step_idx = idx_q;

  always_comb begin
    unit_en = '0;
    if (state_q == RUN) unit_en[unit_q] = 1'b1;
  end

  a_one_active: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(unit_en));

endmodule
