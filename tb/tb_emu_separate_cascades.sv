// tb_emu_separate_cascades: a multiple-output function whose outputs are
// split into three groups, each realized by its own LUT cascade of 2, 3
// and 4 cells, run on one single-unit emulator in 9 table look-ups.
//
// The emulator is enlarged for this (256-word memory = 16 pages of 16
// words, 16 steps, 6 output bits). Cell c sits in page c. The first cell of
// each cascade reads x1..x4, every later cell two further inputs and the two
// rails of its predecessor; the last cell of each cascade writes its two
// outputs (data bits 3..2) to y[1:0], y[3:2] and y[5:4]. The tables are
// random; the outputs are compared with a direct evaluation of the three
// cascades for all 256 input vectors, and each evaluation must end 9+1 = 10
// clocks after its start edge.
module tb_emu_separate_cascades;
  import emu_tb_pkg::pack_cfg;

  localparam int N_IN = 8, ADDR_W = 8, DATA_W = 4, OUT_W = 6, STEPS = 16;
  localparam int CFG_W = ADDR_W * 4 + 2 + 2 + 3 + 3 + 1;
  localparam int NCELL = 9;

  // cell -> cascade, position in it; new inputs of later cells (x index 1..8)
  int first_cell [3] = '{0, 2, 5};
  int len [3]        = '{2, 3, 4};
  int new_in [4][2]  = '{'{0, 0}, '{5, 6}, '{7, 8}, '{1, 2}};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_IN-1:0] x = '0;
  logic busy, done;
  logic [OUT_W-1:0] y;
  logic lm_we = 1'b0, icn_we = 1'b0;
  logic [ADDR_W-1:0] lm_addr = '0;
  logic [DATA_W-1:0] lm_data = '0;
  logic [3:0] icn_idx = '0;
  logic [CFG_W-1:0] icn_data = '0;
  logic [3:0] tbl [NCELL][16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_emulator #(.N_IN(N_IN), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .OUT_W(OUT_W), .STEPS(STEPS)) dut (
    .clk, .rst_n, .start, .x, .busy, .done, .y,
    .lm_we, .lm_addr, .lm_data, .icn_we, .icn_idx, .icn_data
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OUT_W-1:0] model(logic [7:0] xv);
    logic [OUT_W-1:0] r;
    logic [3:0] d;
    r = '0;
    for (int g = 0; g < 3; g++) begin
      d = tbl[first_cell[g]][{xv[0], xv[1], xv[2], xv[3]}];
      for (int k = 1; k < len[g]; k++)
        d = tbl[first_cell[g] + k][{xv[new_in[k][0]-1], xv[new_in[k][1]-1], d[1:0]}];
      r[2*g +: 2] = d[3:2];
    end
    return r;
  endfunction

  function automatic logic [CFG_W-1:0] step_cfg(int c);
    int s[16];
    int g, k, pos;
    bit is_last;
    s = '{default: 0};
    g = (c < 2) ? 0 : (c < 5) ? 1 : 2;
    k = c - first_cell[g];
    for (int b = 0; b < 4; b++) s[4 + b] = int'(c[b]);           // page number, constants 0/1
    if (k == 0) begin
      s[3] = 2; s[2] = 3; s[1] = 4; s[0] = 5;                // x1..x4
    end else begin
      s[3] = 1 + new_in[k][0]; s[2] = 1 + new_in[k][1];      // two new inputs
      s[1] = 2 + N_IN + 1; s[0] = 2 + N_IN;                  // rails
    end
    is_last = (k == len[g] - 1);
    pos = 2 * g;
    return CFG_W'(pack_cfg(ADDR_W, N_IN, DATA_W, OUT_W, s, 0, 2, pos, is_last ? 2 : 0, c == NCELL - 1));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCELL; c++)
      for (int a = 0; a < 16; a++) tbl[c][a] = 4'($urandom);
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      lm_we = 1'b1; lm_addr = 8'(a);
      lm_data = (a / 16 < NCELL) ? tbl[a / 16][a % 16] : 4'h0;
    end
    lm_we = 1'b0;
    for (int c = 0; c < NCELL; c++) begin
      @(negedge clk);
      icn_we = 1'b1; icn_idx = 4'(c); icn_data = step_cfg(c);
    end
    @(negedge clk);
    icn_we = 1'b0;
    for (int v = 0; v < 256; v++) begin
      int lat;
      @(negedge clk);
      x = 8'(v); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (!done && lat < 30) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != NCELL + 1) begin
        failures++;
        $display("latency %0d, expected %0d", lat, NCELL + 1);
      end
      checks++;
      if (y !== model(8'(v))) begin
        failures++;
        if (failures < 10) $display("x=%h y=%b expected %b", v, y, model(8'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
