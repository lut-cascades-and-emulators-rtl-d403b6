// tb_lut_cascade: self-checking test of the LUT cascade at its default size
// (8 cells of 12 inputs and 16 outputs, 8 rails, 40 primary inputs).
//
// Part 1 loads random tables and compares every cell word with a software
// evaluation of the same chain (cell 0 addressed by x[11:0], cell i by the
// next 4 inputs above the previous cell's 8 low output bits).
// Part 2 loads the tables of a symmetric function, the number of ones
// among the 40 inputs: each cell adds its new inputs to the count carried
// on the rails, and the last cell's rails must equal $countones(x).
// Part 3 loads a threshold function, f = 1 when sum w_i x_i >= T with
// weights 0..3 and T = 45: the rails carry the partial sum saturated at T
// (at most T+1 = 46 values, within the 8 rails), and bit 8 of the last
// cell is f.
module tb_lut_cascade;
  localparam int CELLS = 8, IN_W = 12, OUT_W = 16, RAILS = 8;
  localparam int N_IN = IN_W + (CELLS - 1) * (IN_W - RAILS);

  logic clk = 1'b0;
  logic [N_IN-1:0] x = '0;
  logic [CELLS*OUT_W-1:0] y;
  logic prog_en = 1'b0;
  logic [2:0] prog_cell = '0;
  logic [IN_W-1:0] prog_addr = '0;
  logic [OUT_W-1:0] prog_data = '0;
  logic [OUT_W-1:0] copy [CELLS][2**IN_W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_cascade dut (.clk, .x, .y, .prog_en, .prog_cell, .prog_addr, .prog_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wt [N_IN];
  localparam int T = 45;

  function automatic int wsum(logic [IN_W-1:0] v, int first, int nb);
    int s = 0;
    for (int k = 0; k < nb; k++) if (v[k]) s += wt[first + k];
    return s;
  endfunction

  task automatic load_threshold();
    for (int c = 0; c < CELLS; c++) begin
      for (int a = 0; a < 2**IN_W; a++) begin
        logic [IN_W-1:0] av;
        int s;
        av = IN_W'(a);
        if (c == 0) s = wsum(av, 0, IN_W);
        else s = int'(av[RAILS-1:0]) + wsum(av >> RAILS, IN_W + (c-1)*(IN_W-RAILS), IN_W-RAILS);
        if (s > T) s = T;
        @(negedge clk);
        prog_en = 1'b1; prog_cell = 3'(c); prog_addr = av;
        prog_data = OUT_W'(s) | ((s >= T) ? OUT_W'(1 << RAILS) : '0);
      end
    end
    @(negedge clk);
    prog_en = 1'b0;
  endtask

  task automatic load(bit popcount);
    for (int c = 0; c < CELLS; c++) begin
      for (int a = 0; a < 2**IN_W; a++) begin
        logic [IN_W-1:0] av;
        av = IN_W'(a);
        @(negedge clk);
        prog_en = 1'b1; prog_cell = 3'(c); prog_addr = av;
        if (!popcount) prog_data = OUT_W'($urandom);
        else if (c == 0) prog_data = OUT_W'($countones(av));
        else prog_data = OUT_W'(av[RAILS-1:0] + $countones(av[IN_W-1:RAILS]));
        copy[c][a] = prog_data;
      end
    end
    @(negedge clk);
    prog_en = 1'b0;
  endtask

  function automatic logic [CELLS*OUT_W-1:0] model(logic [N_IN-1:0] xv);
    logic [CELLS*OUT_W-1:0] r;
    logic [OUT_W-1:0] d;
    d = copy[0][xv[IN_W-1:0]];
    r[OUT_W-1:0] = d;
    for (int c = 1; c < CELLS; c++) begin
      d = copy[c][{xv[IN_W + (c-1)*(IN_W-RAILS) +: (IN_W-RAILS)], d[RAILS-1:0]}];
      r[c*OUT_W +: OUT_W] = d;
    end
    return r;
  endfunction

  initial begin
    load(0);
    for (int i = 0; i < 3000; i++) begin
      x = {$urandom, $urandom};
      #1;
      checks++;
      if (y !== model(x)) begin
        failures++;
        if (failures < 10) $display("x=%h y=%h expected %h", x, y, model(x));
      end
    end
    load(1);
    for (int i = 0; i < 3000; i++) begin
      x = {$urandom, $urandom};
      if (i == 0) x = '0;
      if (i == 1) x = '1;
      #1;
      checks++;
      if (32'(y[(CELLS-1)*OUT_W +: RAILS]) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("x=%h count %0d expected %0d", x,
                                    y[(CELLS-1)*OUT_W +: RAILS], $countones(x));
      end
    end
    for (int i = 0; i < N_IN; i++) wt[i] = $urandom_range(3);
    load_threshold();
    begin
      int ones = 0;
      for (int i = 0; i < 3000; i++) begin
        int e;
        x = {$urandom, $urandom};
        e = 0;
        for (int k = 0; k < N_IN; k++) if (x[k]) e += wt[k];
        #1;
        checks++;
        if (y[(CELLS-1)*OUT_W + RAILS] !== (e >= T)) begin
          failures++;
          if (failures < 10) $display("threshold: x=%h sum %0d f=%b", x, e, y[(CELLS-1)*OUT_W + RAILS]);
        end
        if (e >= T) ones++;
      end
      checks++;
      if (ones == 0 || ones == 3000) begin
        failures++;
        $display("threshold test never changed its output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
