// tb_cascade_sie: a segment index encoder function on the default LUT
// cascade (8 cells of 12 inputs and 16 outputs, 8 rails, 40 inputs).
//
// The 40 inputs are read as an integer a, most significant bits first in
// cascade order: a = {x[11:0], x[15:12], x[19:16], ..., x[39:36]}, so cell 0
// sees the top 12 bits and every later cell the next 4. NB = 99 sorted
// boundaries b_0 < ... < b_98 split the integers into p = 100 segments, and
// SIE(a) = number of boundaries <= a, a monotone function as the definition
// requires. Boundaries come in clusters so that several share long prefixes.
//
// Rail code after a prefix P of a: if no boundary starts with P, the
// remaining function is the constant c = number of boundaries below P, code
// c (0..NB); otherwise it is fixed by the first boundary j starting with P,
// code NB+1+j. At most 2*NB+1 = 199 codes, within the 8 rails. Each table is
// computed here from that rule; the last cell writes SIE(a) on its low 8
// bits. Checked on random integers, on every b_j - 1, b_j and b_j + 1, and
// on 0 and 2^40 - 1; a watchdog ends a hung run.
module tb_cascade_sie;
  localparam int CELLS = 8, IN_W = 12, OUT_W = 16, RAILS = 8;
  localparam int NEW_W = IN_W - RAILS;
  localparam int N_IN = IN_W + (CELLS - 1) * NEW_W;
  localparam int NB = 99;

  logic clk = 1'b0;
  logic [N_IN-1:0] x = '0;
  logic [CELLS*OUT_W-1:0] y;
  logic prog_en = 1'b0;
  logic [2:0] prog_cell = '0;
  logic [IN_W-1:0] prog_addr = '0;
  logic [OUT_W-1:0] prog_data = '0;
  int checks = 0, failures = 0;
  longint unsigned b [NB];

  always #5 clk = ~clk;

  lut_cascade dut (.clk, .x, .y, .prog_en, .prog_cell, .prog_addr, .prog_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned a_of(logic [N_IN-1:0] xv);
    longint unsigned a = 64'(xv[IN_W-1:0]);
    for (int c = 1; c < CELLS; c++) a = (a << NEW_W) | 64'(xv[IN_W + (c-1)*NEW_W +: NEW_W]);
    return a;
  endfunction

  function automatic logic [N_IN-1:0] x_of(longint unsigned a);
    logic [N_IN-1:0] xv;
    xv[IN_W-1:0] = IN_W'(a >> (N_IN - IN_W));
    for (int c = 1; c < CELLS; c++)
      xv[IN_W + (c-1)*NEW_W +: NEW_W] = NEW_W'(a >> (N_IN - IN_W - c*NEW_W));
    return xv;
  endfunction

  function automatic int sie(longint unsigned a);
    int s = 0;
    for (int j = 0; j < NB; j++) if (b[j] <= a) s++;
    return s;
  endfunction

  // Rail code after the prefix p of a, with r bits of a still to come.
  function automatic int code_of(longint unsigned p, int r);
    int below = 0;
    for (int j = 0; j < NB; j++) begin
      if ((b[j] >> r) < p) below++;
      else if ((b[j] >> r) == p) return NB + 1 + j;
    end
    return below;
  endfunction

  task automatic make_boundaries();
    for (int j = 0; j < NB; j++) begin
      if (j % 3 == 0) b[j] = {$urandom, $urandom} % (64'd1 << 39);
      else b[j] = b[j-1] + 64'($urandom_range(1, 1 << $urandom_range(1, 24)));
    end
    for (int i = 1; i < NB; i++)
      for (int j = NB - 1; j >= i; j--)
        if (b[j] < b[j-1]) begin
          longint unsigned t = b[j]; b[j] = b[j-1]; b[j-1] = t;
        end
    for (int j = 1; j < NB; j++) if (b[j] <= b[j-1]) b[j] = b[j-1] + 1;
  endtask

  task automatic load_sie();
    int r_before, code;
    for (int c = 0; c < CELLS; c++) begin
      r_before = N_IN - IN_W - (c-1)*NEW_W;
      for (int ad = 0; ad < 2**IN_W; ad++) begin
        logic [IN_W-1:0] av = IN_W'(ad);
        longint unsigned nib = 64'(av[IN_W-1:RAILS]);
        int rail = int'(av[RAILS-1:0]);
        if (c == 0) code = code_of(64'(av), N_IN - IN_W);
        else if (rail <= NB) code = rail;
        else if (rail > 2*NB) code = 0;
        else if (c < CELLS - 1)
          code = code_of(((b[rail-NB-1] >> r_before) << NEW_W) | nib, r_before - NEW_W);
        else code = sie(((b[rail-NB-1] >> r_before) << NEW_W) | nib);
        @(negedge clk);
        prog_en = 1'b1; prog_cell = 3'(c); prog_addr = av;
        prog_data = OUT_W'(code);
        checks++;
        if (code >= 2**RAILS) begin
          failures++;
          $display("cell %0d: rail code %0d does not fit %0d rails", c, code, RAILS);
        end
      end
    end
    @(negedge clk);
    prog_en = 1'b0;
  endtask

  task automatic check(longint unsigned a);
    x = x_of(a);
    #1;
    checks++;
    if (int'(y[(CELLS-1)*OUT_W +: RAILS]) != sie(a) || a_of(x) != a) begin
      failures++;
      if (failures < 10) $display("a=%h SIE=%0d expected %0d", a,
                                  y[(CELLS-1)*OUT_W +: RAILS], sie(a));
    end
  endtask

  initial begin
    automatic int seen_mid = 0;
    make_boundaries();
    load_sie();
    check(0);
    check((64'd1 << N_IN) - 1);
    for (int j = 0; j < NB; j++) begin
      if (b[j] > 0) check(b[j] - 1);
      check(b[j]);
      check(b[j] + 1);
    end
    for (int i = 0; i < 3000; i++) begin
      automatic longint unsigned a = {$urandom, $urandom} % (64'd1 << N_IN);
      check(a);
      if (sie(a) > 0 && sie(a) < NB) seen_mid++;
    end
    checks++;
    if (seen_mid == 0) begin
      failures++;
      $display("random integers never fell between two boundaries");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
