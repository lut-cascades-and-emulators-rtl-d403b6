// tb_ws_arith_decomp: self-checking test of the weighted-sum function by
// arithmetic decomposition, at the default size (16 inputs, 16 outputs).
//
// Random weights w_i < 4096 (so that the sum fits 16 bits) are split into
// wA_i = w_i >> 8 and wB_i = w_i & 255. The cascade tables are computed
// from the definition of a WS function: every cell adds the weights of its
// new inputs to the partial sum on its rails, modulo 2**8 in cascade A and
// modulo 2**12 in cascade B. For 4000 random input vectors per weight set
// f must equal sum w_i x_i. The test also counts vectors in which B's top
// bits were not zero, so the adder really carried into the upper half.
module tb_ws_arith_decomp;
  logic clk = 1'b0;
  logic [15:0] x = '0, f;
  logic pa_en = 1'b0, pb_en = 1'b0;
  logic [0:0] pa_cell = '0;
  logic [1:0] pb_cell = '0;
  logic [11:0] pa_addr = '0;
  logic [7:0] pa_data = '0;
  logic [12:0] pb_addr = '0;
  logic [11:0] pb_data = '0;
  int w [16];
  int carries = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ws_arith_decomp dut (.clk, .x, .f, .pa_en, .pa_cell, .pa_addr, .pa_data,
                       .pb_en, .pb_cell, .pb_addr, .pb_data);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Weighted sum of the bits of v, weights w[first..first+nb-1], part
  // hi (w >> 8) or lo (w & 255).
  function automatic int part_sum(int v, int first, int nb, bit hi);
    int s = 0;
    for (int k = 0; k < nb; k++)
      if (v[k]) s += hi ? (w[first + k] >> 8) : (w[first + k] & 255);
    return s;
  endfunction

  task automatic load();
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      pa_en = 1'b1; pa_cell = 1'b0; pa_addr = 12'(a); pa_data = 8'(part_sum(a, 0, 12, 1));
      @(negedge clk);
      pa_cell = 1'b1; pa_data = 8'((a & 255) + part_sum(a >> 8, 12, 4, 1));
    end
    @(negedge clk);
    pa_en = 1'b0;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk);
      pb_en = 1'b1; pb_cell = 2'd0; pb_addr = 13'(a); pb_data = 12'(part_sum(a, 0, 13, 0));
      for (int c = 1; c < 4; c++) begin
        @(negedge clk);
        pb_cell = 2'(c); pb_data = 12'((a & 4095) + part_sum(a >> 12, 12 + c, 1, 0));
      end
    end
    @(negedge clk);
    pb_en = 1'b0;
  endtask

  initial begin
    for (int set = 0; set < 3; set++) begin
      for (int i = 0; i < 16; i++) w[i] = (set == 0) ? 255 + 256 * (i % 3) : $urandom_range(4095);
      load();
      for (int t = 0; t < 4000; t++) begin
        int e, bsum;
        x = 16'($urandom);
        if (t == 0) x = '1;
        e = 0; bsum = 0;
        for (int i = 0; i < 16; i++) if (x[i]) begin
          e += w[i];
          bsum += w[i] & 255;
        end
        if (bsum >= 256) carries++;
        #1;
        checks++;
        if (int'(f) != e % 65536) begin
          failures++;
          if (failures < 10) $display("x=%h f=%0d expected %0d", x, f, e);
        end
      end
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("the adder never carried");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
