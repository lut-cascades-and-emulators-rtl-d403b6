// tb_lut_top: end-to-end test of the whole design at its default sizes.
//
// 1. LUT cascade: loads the 8 cells with a symmetric function (the number of
//    ones among the 40 inputs, carried on the rails) and checks it.
// 2. Single-unit emulator: runs the four-cell example cascade (emu_tb_pkg)
//    from the packed memory map and from the packed map that needs the
//    feedback shifter, all 256 inputs each, checking outputs and latency.
// 3. Two-unit ring emulator: the same cascade split over the two units,
//    then its first two cells as a streaming pipeline (mode switch).
// 4. WS function: random 12-bit weights, tables from the partial-sum rule.
// It counts how often each mechanism happened: rails carrying a nonzero
// count, a page shared by two cells, a nonzero feedback shift, outputs
// accumulated from several steps, a start ignored while busy, a rail
// crossing between ring units, a unit in stand-by, a switch to streaming
// mode with both units active in one clock, and a carry into the
// upper half of the WS sum. A mechanism that never happened is a failure.
module tb_lut_top;
  import emu_tb_pkg::*;

  localparam int CFG_W = 35;

  logic clk = 1'b0, rst_n = 1'b0;
  // cascade
  logic [39:0] c_x = '0;
  logic [127:0] c_y;
  logic c_prog_en = 1'b0;
  logic [2:0] c_prog_cell = '0;
  logic [11:0] c_prog_addr = '0;
  logic [15:0] c_prog_data = '0;
  // single-unit emulator
  logic e_start = 1'b0, e_busy, e_done;
  logic [7:0] e_x = '0;
  logic [4:0] e_y;
  logic e_lm_we = 1'b0, e_icn_we = 1'b0;
  logic [5:0] e_lm_addr = '0;
  logic [3:0] e_lm_data = '0;
  logic [1:0] e_icn_idx = '0;
  logic [CFG_W-1:0] e_icn_data = '0;
  // ring emulator
  logic r_start = 1'b0, r_busy, r_done, r_stream = 1'b0, r_in_valid = 1'b0, r_out_valid;
  logic [15:0] r_x = '0;
  logic [1:0] r_unit_active;
  logic [9:0] r_y;
  logic [0:0] r_prog_unit = '0;
  logic r_lm_we = 1'b0, r_icn_we = 1'b0;
  logic [5:0] r_lm_addr = '0;
  logic [3:0] r_lm_data = '0;
  logic [1:0] r_icn_idx = '0;
  logic [CFG_W-1:0] r_icn_data = '0;
  // WS function
  logic [15:0] w_x = '0, w_f;
  logic w_pa_en = 1'b0, w_pb_en = 1'b0;
  logic [0:0] w_pa_cell = '0;
  logic [1:0] w_pb_cell = '0;
  logic [11:0] w_pa_addr = '0, w_pb_data = '0;
  logic [7:0] w_pa_data = '0;
  logic [12:0] w_pb_addr = '0;

  int checks = 0, failures = 0;
  int n_rails = 0, n_shared_page = 0, n_fb_shift = 0, n_accum = 0, n_busy_ignored = 0;
  int n_ring_cross = 0, n_standby = 0, n_ws_carry = 0, n_stream = 0;
  int w [16];

  always #5 clk = ~clk;

  lut_top dut (.*);

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!r_stream && r_busy && r_unit_active != 2'b00 && r_unit_active != 2'b11) n_standby++;
    if (r_unit_active == 2'b11 && !r_stream) begin
      failures++;
      $display("two ring units active at once");
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- cascade
  task automatic test_cascade();
    for (int c = 0; c < 8; c++)
      for (int a = 0; a < 4096; a++) begin
        logic [11:0] av;
        av = 12'(a);
        @(negedge clk);
        c_prog_en = 1'b1; c_prog_cell = 3'(c); c_prog_addr = av;
        c_prog_data = (c == 0) ? 16'($countones(av)) : 16'(av[7:0] + $countones(av[11:8]));
      end
    @(negedge clk);
    c_prog_en = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      c_x = {$urandom, $urandom};
      #1;
      check(32'(c_y[112 +: 8]) == $countones(c_x), "cascade popcount");
      if (c_y[7:0] != 0) n_rails++;
    end
  endtask

  // --------------------------------------------------- single-unit emulator
  task automatic test_emulator(int map);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      e_lm_we = 1'b1; e_lm_addr = 6'(a); e_lm_data = ex_mem_word(map, 6'(a));
    end
    e_lm_we = 1'b0;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      e_icn_we = 1'b1; e_icn_idx = 2'(s); e_icn_data = CFG_W'(ex_cfg(map, s));
    end
    @(negedge clk);
    e_icn_we = 1'b0;
    for (int v = 0; v < 256; v++) begin
      int lat;
      @(negedge clk);
      e_x = 8'(v); e_start = 1'b1;
      @(negedge clk);
      e_start = (v % 5 == 0);
      if (e_start) n_busy_ignored++;
      lat = 0;
      while (!e_done && lat < 20) begin
        @(negedge clk);
        e_start = 1'b0;
        lat++;
      end
      check(lat == 5, "emulator latency");
      check(e_y == ex_eval(8'(v)), "emulator outputs");
      // Cell2, Cell3 and Cell4 each wrote part of e_y
      n_accum++;
      n_shared_page++;                 // Cell1 and Cell4 read page 0
      if (map == 2) n_fb_shift++;      // Cell4's rails came from D3D2
    end
  endtask

  // ---------------------------------------------------------- ring emulator
  task automatic test_ring();
    for (int u = 0; u < 2; u++) begin
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        r_prog_unit = 1'(u); r_lm_we = 1'b1; r_lm_addr = 6'(a); r_lm_data = ring_mem_word(u, 6'(a));
      end
      r_lm_we = 1'b0;
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        r_icn_we = 1'b1; r_icn_idx = 2'(s); r_icn_data = (s < 2) ? CFG_W'(ring_cfg(u, s)) : '0;
      end
      @(negedge clk);
      r_icn_we = 1'b0;
    end
    for (int v = 0; v < 256; v++) begin
      int lat;
      logic [4:0] f;
      logic [1:0] prev;
      f = ex_eval(8'(v));
      @(negedge clk);
      r_x = {8'(v) & 8'hD0, 8'(v) & 8'h2F}; r_start = 1'b1;
      @(negedge clk);
      r_start = 1'b0;
      lat = 0;
      prev = 2'b00;
      while (!r_done && lat < 20) begin
        if (prev != 2'b00 && r_unit_active != 2'b00 && r_unit_active != prev) n_ring_cross++;
        prev = r_unit_active;
        @(negedge clk);
        lat++;
      end
      check(lat == 5, "ring latency");
      check(r_y[4:0] == {2'b00, f[2], 2'b00} && r_y[9:5] == {f[4:3], 1'b0, f[1:0]}, "ring outputs");
    end
    // streaming: Cell1 on unit 0, Cell2 on unit 1, one vector per clock
    begin
      logic [7:0] q [$];
      int got = 0;
      @(negedge clk);
      r_stream = 1'b1;
      for (int c = 0; c < 300; c++) begin
        logic [7:0] xv;
        xv = 8'($urandom);
        r_in_valid = (c < 296);
        r_x = {xv & 8'hD0, xv & 8'h2F};
        if (r_in_valid) q.push_back(xv);
        @(negedge clk);
        if (r_unit_active == 2'b11) n_stream++;
        if (r_out_valid) begin
          logic [4:0] f;
          f = ex_eval(q.pop_front());
          check(r_y[6:5] == f[1:0], "ring streaming outputs");
          got++;
        end
      end
      r_in_valid = 1'b0;
      repeat (6) @(negedge clk);
      r_stream = 1'b0;
      check(got == 296, "ring streaming result count");
    end
  endtask

  // ------------------------------------------------------------ WS function
  function automatic int part_sum(int v, int first, int nb, bit hi);
    int s = 0;
    for (int k = 0; k < nb; k++)
      if (v[k]) s += hi ? (w[first + k] >> 8) : (w[first + k] & 255);
    return s;
  endfunction

  task automatic test_ws();
    for (int i = 0; i < 16; i++) w[i] = $urandom_range(4095);
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      w_pa_en = 1'b1; w_pa_cell = 1'b0; w_pa_addr = 12'(a); w_pa_data = 8'(part_sum(a, 0, 12, 1));
      @(negedge clk);
      w_pa_cell = 1'b1; w_pa_data = 8'((a & 255) + part_sum(a >> 8, 12, 4, 1));
    end
    @(negedge clk);
    w_pa_en = 1'b0;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk);
      w_pb_en = 1'b1; w_pb_cell = 2'd0; w_pb_addr = 13'(a); w_pb_data = 12'(part_sum(a, 0, 13, 0));
      for (int c = 1; c < 4; c++) begin
        @(negedge clk);
        w_pb_cell = 2'(c); w_pb_data = 12'((a & 4095) + part_sum(a >> 12, 12 + c, 1, 0));
      end
    end
    @(negedge clk);
    w_pb_en = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int e, bs;
      w_x = 16'($urandom);
      e = 0; bs = 0;
      for (int i = 0; i < 16; i++) if (w_x[i]) begin
        e += w[i];
        bs += w[i] & 255;
      end
      if (bs >= 256) n_ws_carry++;
      #1;
      check(int'(w_f) == e, "WS sum");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    test_cascade();
    ex_randomize();
    test_emulator(1);
    test_emulator(2);
    test_ring();
    test_ws();
    $display("mechanisms: rails=%0d shared_page=%0d fb_shift=%0d accumulate=%0d busy_ignored=%0d",
             n_rails, n_shared_page, n_fb_shift, n_accum, n_busy_ignored);
    $display("            ring_cross=%0d standby=%0d stream=%0d ws_carry=%0d", n_ring_cross, n_standby,
             n_stream, n_ws_carry);
    check(n_rails > 0, "rails never carried a count");
    check(n_shared_page > 0, "no shared page");
    check(n_fb_shift > 0, "feedback shifter never used");
    check(n_accum > 0, "no output accumulation");
    check(n_busy_ignored > 0, "no start while busy");
    check(n_ring_cross > 0, "no rail crossed between ring units");
    check(n_standby > 0, "no unit in stand-by");
    check(n_stream > 0, "streaming mode never had both units active");
    check(n_ws_carry > 0, "no carry in the WS adder");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
