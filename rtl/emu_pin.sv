// emu_pin: programmable interconnection network of an emulator unit.
//
// Every address bit j of the memory for logic is driven by a multiplexer
// whose select code sel[j] comes from the memory for interconnection. The
// sources are the constants 0 and 1 (to form the page number in the high
// address bits), the N_IN primary inputs, and the W rail bits coming back
// from the feedback shifter (the previous cell's outputs). Code layout:
// see lut_pkg. Purely combinational.
// The document gives the network's function (route inputs, rails and page
// bits to the address); the full multiplexer per address bit is
// the simplest network that does it, and is this design's choice.
module emu_pin
  import lut_pkg::*;
#(
  parameter int unsigned N_IN   = 8,
  parameter int unsigned W      = 4,
  parameter int unsigned ADDR_W = 6,
  localparam int unsigned SEL_W = pin_sel_w(N_IN, W)
) (
  input  logic [N_IN-1:0]              x,
  input  logic [W-1:0]                 fb,
  input  logic [ADDR_W-1:0][SEL_W-1:0] sel,
  output logic [ADDR_W-1:0]            addr
);

  // All selectable sources in code order.
  logic [N_IN+W+1:0] src;
  always_comb begin
    src                          = '0;
    src[PIN_CONST0]              = 1'b0;
    src[PIN_CONST1]              = 1'b1;
    src[PIN_X_BASE +: N_IN]      = x;
    src[PIN_X_BASE + N_IN +: W]  = fb;
  end

  always_comb begin
    for (int j = 0; j < ADDR_W; j++) begin
      addr[j] = (32'(sel[j]) < N_IN + W + 2) ? src[sel[j]] : 1'b0;
    end
  end

endmodule
