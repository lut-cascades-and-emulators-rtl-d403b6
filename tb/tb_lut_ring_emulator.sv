// tb_lut_ring_emulator: self-checking test of the two-unit ring emulator.
//
// The four-cell example cascade (emu_tb_pkg) is split over the ring: unit 0
// holds Cell1 and Cell3, unit 1 holds Cell2 and Cell4, so every rail
// crosses from one unit to the other. For all 256 input vectors (different
// on the two units' inputs, only the relevant half used) it checks unit 0's
// outputs (f3) and unit 1's (f1, f2, f4, f5), the latency of s+1 = 5
// clocks, that at most one unit is active in any cycle, and that each unit
// was active in exactly two cycles of each evaluation.
// Then, in streaming mode, the first two cells alone (Cell1 on unit 0,
// Cell2 on unit 1, the same tables) form a two-stage pipeline: 600 random
// vectors enter, one per clock with occasional gaps, and f2 f1 must come
// out in order, each 3 clocks after its vector was sampled, with both units
// active in the same clock.
module tb_lut_ring_emulator;
  import emu_tb_pkg::*;

  localparam int CFG_W = 35;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stream = 1'b0, in_valid = 1'b0;
  logic [15:0] x = '0;
  logic busy, done, out_valid;
  logic [1:0] unit_active;
  logic [9:0] y;
  logic [0:0] prog_unit = '0;
  logic lm_we = 1'b0, icn_we = 1'b0;
  logic [5:0] lm_addr = '0;
  logic [3:0] lm_data = '0;
  logic [1:0] icn_idx = '0;
  logic [CFG_W-1:0] icn_data = '0;
  int active_cycles [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_ring_emulator dut (
    .clk, .rst_n, .stream, .start, .in_valid, .x, .busy, .done, .out_valid, .unit_active, .y, .prog_unit,
    .lm_we, .lm_addr, .lm_data, .icn_we, .icn_idx, .icn_data
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (unit_active[0]) active_cycles[0]++;
      if (unit_active[1]) active_cycles[1]++;
      if (unit_active == 2'b11 && !stream) begin
        failures++;
        $display("two units active at once");
      end
    end
  end

  task automatic run(logic [7:0] xv);
    int lat;
    logic [4:0] f;
    f = ex_eval(xv);
    active_cycles[0] = 0; active_cycles[1] = 0;
    @(negedge clk);
    // unit 0 uses x1..x4 and x6, unit 1 x5, x7, x8: give each only those
    x = {xv & 8'hD0, xv & 8'h2F};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x = '0;
    lat = 0;
    while (!done && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 5) begin
      failures++;
      $display("latency %0d, expected 5", lat);
    end
    checks++;
    if (y[4:0] !== {2'b00, f[2], 2'b00} || y[9:5] !== {f[4:3], 1'b0, f[1:0]}) begin
      failures++;
      if (failures < 10) $display("x=%h y=%b expected f=%b", xv, y, f);
    end
    checks++;
    if (active_cycles[0] != 2 || active_cycles[1] != 2) begin
      failures++;
      $display("active cycles %0d/%0d, expected 2/2", active_cycles[0], active_cycles[1]);
    end
  endtask

  // streaming: a vector sampled at edge n must appear with out_valid in the
  // cycle after edge n+3 (UNITS+1 = 3 clocks); cyc counts the checking
  // negedges, so that is 4 counts after the one where it was driven
  logic [7:0] sent [$];
  int both_active = 0;

  task automatic stream_test();
    int sent_n = 0, got = 0, cyc = 0;
    logic [7:0] exp_q [$];
    int t_q [$];
    @(negedge clk);
    stream = 1'b1;
    while (got < 600 && cyc < 2000) begin
      logic [7:0] xv;
      // drive the next vector (or a gap) for the coming edge
      in_valid = (sent_n < 600) && ($urandom_range(9) != 0);
      xv = 8'($urandom);
      x = {xv & 8'hD0, xv & 8'h2F};
      if (in_valid) begin
        exp_q.push_back(xv);
        t_q.push_back(cyc);
        sent_n++;
      end
      @(negedge clk);
      cyc++;
      if (unit_active == 2'b11) both_active++;
      if (out_valid) begin
        logic [4:0] f;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("out_valid without a vector");
        end else begin
          f = ex_eval(exp_q.pop_front());
          if (y[6:5] !== f[1:0] || (cyc - t_q.pop_front()) != 4) begin
            failures++;
            if (failures < 10) $display("stream: y=%b expected f2f1=%b", y[6:5], f[1:0]);
          end
        end
        got++;
      end
    end
    in_valid = 1'b0;
    checks++;
    if (got != 600 || both_active == 0) begin
      failures++;
      $display("stream: %0d of 600 results, %0d cycles with both units active", got, both_active);
    end
    checks++;
    if (cyc > 600 * 10 / 8 + 10) begin
      failures++;
      $display("stream: %0d cycles for 600 vectors", cyc);
    end
    repeat (6) @(negedge clk);
    stream = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      ex_randomize();
      for (int u = 0; u < 2; u++) begin
        for (int a = 0; a < 64; a++) begin
          @(negedge clk);
          prog_unit = 1'(u); lm_we = 1'b1; lm_addr = 6'(a); lm_data = ring_mem_word(u, 6'(a));
        end
        lm_we = 1'b0;
        for (int s = 0; s < 4; s++) begin
          @(negedge clk);
          icn_we = 1'b1; icn_idx = 2'(s); icn_data = (s < 2) ? CFG_W'(ring_cfg(u, s)) : '0;
        end
        @(negedge clk);
        icn_we = 1'b0;
      end
      for (int v = 0; v < 256; v++) run(8'(v));
    end
    stream_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
