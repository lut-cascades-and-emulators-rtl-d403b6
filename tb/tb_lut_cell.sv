// tb_lut_cell: self-checking test of one LUT cell at its default size.
//
// Fills the whole 4096 x 16 table with random words through the write
// port, keeping a copy, then reads every address and 2000 random ones and
// compares the asynchronous read data with the copy. Finally rewrites one
// word and checks that only that word changed.
module tb_lut_cell;
  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [11:0] wr_addr = '0, rd_addr = '0;
  logic [15:0] wr_data = '0, rd_data;
  logic [15:0] copy [4096];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_cell dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_at(int a);
    rd_addr = 12'(a);
    #1;
    checks++;
    if (rd_data !== copy[a]) begin
      failures++;
      if (failures < 10) $display("addr %0d: read %h expected %h", a, rd_data, copy[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 12'(a); wr_data = 16'($urandom);
      copy[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = 0; a < 4096; a++) check_at(a);
    for (int i = 0; i < 2000; i++) check_at($urandom_range(4095));
    @(negedge clk);
    wr_en = 1'b1; wr_addr = 12'd1234; wr_data = ~copy[1234];
    copy[1234] = wr_data;
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = 1230; a < 1240; a++) check_at(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
