// ws_arith_decomp: 2Q-output weighted-sum (WS) function realized by
// arithmetic decomposition.
//
// WS(x) = sum_i w_i * x_i over N binary inputs, with 2Q-bit weights split
// as w_i = 2**Q * wA_i + wB_i. Cascade A computes sum wA_i x_i mod 2**Q
// (Q outputs), cascade B computes sum wB_i x_i exactly (Q + L outputs,
// L = ceil(log2 N)). B's low Q bits are the low half of the result; the
// upper half is A plus B's top L bits (ws_adder). Each cascade carries the
// running partial sum on its rails, so its cells need only a few more
// inputs than rails; the tables that make this so are loaded through
// pa_* (cascade A) and pb_* (cascade B). The result f is combinational in x.
//
// From the document: the A/B/adder structure, the output widths and the
// use of LUT cascades for the two WS functions. This design's choices: the
// defaults N = 16, Q = 8, and the cell sizes (A: 12-input cells with 8
// rails, 2 cells; B: 13-input cells with 12 rails, 4 cells).
module ws_arith_decomp
  import lut_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned Q      = 8,
  parameter int unsigned A_IN_W = 12,
  parameter int unsigned B_IN_W = 13,
  localparam int unsigned L       = $clog2(N),
  localparam int unsigned A_RAILS = Q,
  localparam int unsigned B_RAILS = Q + L,
  localparam int unsigned A_CELLS = 1 + (N - A_IN_W) / (A_IN_W - A_RAILS),
  localparam int unsigned B_CELLS = 1 + (N - B_IN_W) / (B_IN_W - B_RAILS),
  localparam int unsigned A_CSEL_W = (A_CELLS > 1) ? $clog2(A_CELLS) : 1,
  localparam int unsigned B_CSEL_W = (B_CELLS > 1) ? $clog2(B_CELLS) : 1
) (
  input  logic                clk,
  input  logic [N-1:0]        x,
  output logic [2*Q-1:0]      f,
  input  logic                pa_en,
  input  logic [A_CSEL_W-1:0] pa_cell,
  input  logic [A_IN_W-1:0]   pa_addr,
  input  logic [A_RAILS-1:0]  pa_data,
  input  logic                pb_en,
  input  logic [B_CSEL_W-1:0] pb_cell,
  input  logic [B_IN_W-1:0]   pb_addr,
  input  logic [B_RAILS-1:0]  pb_data
);

  initial begin
    assert (cascade_n_in(A_CELLS, A_IN_W, A_RAILS) == N &&
            cascade_n_in(B_CELLS, B_IN_W, B_RAILS) == N)
      else $error("ws_arith_decomp: cell sizes do not cover exactly N inputs");
  end

  // All cell words of both cascades; only the last cell of each is used,
  // the earlier ones are partial sums that stay internal.
  logic [A_CELLS*A_RAILS-1:0] ya;
  logic [B_CELLS*B_RAILS-1:0] yb;
  logic [A_RAILS-1:0]         fa;
  logic [B_RAILS-1:0]         fb;

  lut_cascade #(.CELLS(A_CELLS), .IN_W(A_IN_W), .OUT_W(A_RAILS), .RAILS(A_RAILS)) u_casc_a (
    .clk      (clk),
    .x        (x),
    .y        (ya),
    .prog_en  (pa_en),
    .prog_cell(pa_cell),
    .prog_addr(pa_addr),
    .prog_data(pa_data)
  );

  lut_cascade #(.CELLS(B_CELLS), .IN_W(B_IN_W), .OUT_W(B_RAILS), .RAILS(B_RAILS)) u_casc_b (
    .clk      (clk),
    .x        (x),
    .y        (yb),
    .prog_en  (pb_en),
    .prog_cell(pb_cell),
    .prog_addr(pb_addr),
    .prog_data(pb_data)
  );

  assign fa = ya[(A_CELLS-1)*A_RAILS +: A_RAILS];
  assign fb = yb[(B_CELLS-1)*B_RAILS +: B_RAILS];

  ws_adder #(.Q(Q), .L(L)) u_adder (
    .a   (fa),
    .b_hi(fb[B_RAILS-1:Q]),
    .sum (f[2*Q-1:Q])
  );

  assign f[Q-1:0] = fb[Q-1:0];

endmodule
