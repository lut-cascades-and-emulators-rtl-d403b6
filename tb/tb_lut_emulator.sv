// tb_lut_emulator: self-checking test of the single-unit emulator.
//
// Emulates the four-cell example cascade (emu_tb_pkg) with random cell
// tables in three memory layouts: one page per cell, the packed map where
// Cell1 and Cell4 share a page, and a packed map that also needs the
// feedback shifter. Each layout is run for all 256 input vectors; the
// outputs are compared with the reference model and every evaluation must
// signal done exactly s+1 = 5 clocks after the start edge. A start while
// busy must be ignored.
module tb_lut_emulator;
  import emu_tb_pkg::*;

  localparam int CFG_W = 35;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] x = '0;
  logic busy, done;
  logic [4:0] y;
  logic lm_we = 1'b0, icn_we = 1'b0;
  logic [5:0] lm_addr = '0;
  logic [3:0] lm_data = '0;
  logic [1:0] icn_idx = '0;
  logic [CFG_W-1:0] icn_data = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_emulator dut (
    .clk, .rst_n, .start, .x, .busy, .done, .y,
    .lm_we, .lm_addr, .lm_data, .icn_we, .icn_idx, .icn_data
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_map(int map);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      lm_we = 1'b1; lm_addr = 6'(a); lm_data = ex_mem_word(map, 6'(a));
    end
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      lm_we = 1'b0; icn_we = 1'b1; icn_idx = 2'(s); icn_data = CFG_W'(ex_cfg(map, s));
    end
    @(negedge clk);
    icn_we = 1'b0;
  endtask

  task automatic run(logic [7:0] xv, bit poke_busy);
    int lat;
    @(negedge clk);
    x = xv; start = 1'b1;
    @(negedge clk);
    start = poke_busy;            // a second start while busy must be ignored
    x = ~xv;                      // inputs were latched at the start edge
    lat = 0;            // clock edges after the start edge
    while (!done && lat < 20) begin
      @(negedge clk);
      start = 1'b0;
      lat++;
    end
    checks++;
    if (lat != 5) begin
      failures++;
      $display("latency %0d, expected 5", lat);
    end
    checks++;
    if (y !== ex_eval(xv)) begin
      failures++;
      if (failures < 10) $display("x=%h y=%b expected %b", xv, y, ex_eval(xv));
    end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("still busy after done");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int map = 0; map < 3; map++) begin
      ex_randomize();
      load_map(map);
      for (int v = 0; v < 256; v++) run(8'(v), (v % 7) == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
