// ws_adder: the adder of the arithmetic decomposition of a WS function.
//
// Adds the Q-bit output of cascade A to the L = ceil(log2 N) carry bits of
// cascade B (bits Q..Q+L-1 of B's sum), zero-extended by Q-L bits, giving
// the upper Q bits of the 2Q-bit weighted sum. The carry out of bit Q-1 is
// dropped: the document's structure has a Q-bit adder output. Purely
// combinational. Shape and widths follow the document's figure.
module ws_adder #(
  parameter int unsigned Q = 8,
  parameter int unsigned L = 4
) (
  input  logic [Q-1:0] a,
  input  logic [L-1:0] b_hi,
  output logic [Q-1:0] sum
);

  initial begin
    assert (L <= Q) else $error("ws_adder: need L <= Q");
  end

  assign sum = a + Q'(b_hi);

endmodule
