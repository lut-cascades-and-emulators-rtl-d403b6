// emu_out_reg: output register of an emulator unit.
//
// Collects the primary outputs of an evaluation: each step writes the bits
// that the output shifter marks in wr_mask and leaves the others, so the
// outputs of all emulated cells accumulate here over the steps. clr (at the
// start of an evaluation) zeroes the register. Both act at the rising edge;
// q drives the primary outputs. The document gives the register and its
// purpose; the masked write and the clear are this design's choices.
module emu_out_reg #(
  parameter int unsigned OUT_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [OUT_W-1:0] wr_data,
  input  logic [OUT_W-1:0] wr_mask,
  output logic [OUT_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clr)    q <= '0;
    else if (wr_en)  q <= (q & ~wr_mask) | (wr_data & wr_mask);
  end

endmodule
