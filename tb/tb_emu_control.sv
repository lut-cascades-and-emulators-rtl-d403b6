// tb_emu_control: self-checking test of the control network with two
// units and four steps per unit.
//
// For every end point s = 1..8 (the step whose configuration carries the
// last flag; s = 8 also without any flag, the step limit) it checks: load
// pulses only in the start cycle, step k of the run enables exactly unit
// k mod 2 with local step k / 2, the run lasts s cycles, and done pulses
// once, s+1 clocks after the start edge. Starts while busy are ignored.
module tb_emu_control;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, last;
  logic busy, load, done;
  logic [1:0] unit_en;
  logic [0:0] unit_sel;
  logic [1:0] step_idx;
  int target = 0;
  bit use_last = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  emu_control #(.UNITS(2), .STEPS(4)) dut (
    .clk, .rst_n, .start, .last, .busy, .load, .unit_en, .unit_sel, .step_idx, .done
  );

  // The last flag a unit would read from its configuration word.
  assign last = use_last && busy && ((int'(step_idx) * 2 + int'(unit_sel)) == target);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("%s (target %0d)", what, target);
    end
  endtask

  task automatic run(int s, bit flag);
    target = s - 1; use_last = flag;
    @(negedge clk);
    start = 1'b1;
    #1;
    expect_true(load == 1'b1 && unit_en == 2'b00, "load missing at start");
    for (int k = 0; k < s; k++) begin
      @(negedge clk);
      start = 1'b1;                       // must be ignored while busy
      #1;
      expect_true(busy && !load, "busy/load wrong during run");
      expect_true(unit_en == 2'(1 << (k % 2)), "wrong unit enabled");
      expect_true(int'(step_idx) == k / 2, "wrong local step");
      expect_true(!done, "early done");
    end
    @(negedge clk);
    start = 1'b0;
    #1;
    expect_true(unit_en == 2'b00 && busy && !done, "flush cycle wrong");
    @(negedge clk);
    #1;
    expect_true(done && !busy, "done not s+1 clocks after start");
    @(negedge clk);
    #1;
    expect_true(!done && !busy, "done longer than one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 1; s <= 8; s++) run(s, 1'b1);
    run(8, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
