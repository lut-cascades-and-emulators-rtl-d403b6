// emu_shifter: barrel shifter of an emulator unit.
//
// Takes CNT consecutive bits of din starting at bit RSH and places them at
// bit LSH of an OUT_W-bit result; mask marks the bits placed. Bits outside
// the field are zero. Purely combinational.
//   * As the feedback shifter (RSH = packing offset, LSH = 0, CNT = IN_W) it
//     moves rails that memory packing stored in upper data bits down to
//     where the interconnection network expects them.
//   * As the output shifter it moves a cell's primary outputs from the
//     data bits they occupy to their place in the output register.
// The document gives the two shifters and their purposes (packing and
// output accumulation); the offset/position/count form is this design's.
module emu_shifter
  import lut_pkg::*;
#(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 5
) (
  input  logic [IN_W-1:0]          din,
  input  logic [pos_w(IN_W)-1:0]   rsh,
  input  logic [pos_w(OUT_W)-1:0]  lsh,
  input  logic [cnt_w(IN_W)-1:0]   cnt,
  output logic [OUT_W-1:0]         dout,
  output logic [OUT_W-1:0]         mask
);

  localparam int unsigned WIDE = IN_W + OUT_W;

  logic [WIDE-1:0] field, field_mask;

  always_comb begin
    field_mask = '0;
    for (int i = 0; i < IN_W; i++) begin
      if (32'(cnt) > i) field_mask[i] = 1'b1;
    end
    field = WIDE'(din >> rsh) & field_mask;
    dout  = OUT_W'(field << lsh);
    mask  = OUT_W'(field_mask << lsh);
  end

endmodule
