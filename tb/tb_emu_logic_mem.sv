// tb_emu_logic_mem: self-checking test of the memory for logic.
//
// Writes random words to all 64 addresses, reads them back with en high
// (data one clock after the address), then checks that with en low the
// read data holds its value while the address changes (stand-by mode).
module tb_emu_logic_mem;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, wr_en = 1'b0;
  logic [5:0] rd_addr = '0, wr_addr = '0;
  logic [3:0] wr_data = '0, rd_data;
  logic [3:0] copy [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  emu_logic_mem dut (.clk, .rst_n, .en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++;
    if (rd_data !== 4'h0) failures++;
    rst_n = 1'b1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 6'(a); wr_data = 4'($urandom);
      copy[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic [5:0] a;
      a = 6'($urandom);
      rd_addr = a; en = 1'b1;
      @(negedge clk);
      checks++;
      if (rd_data !== copy[a]) begin
        failures++;
        $display("addr %0d read %h expected %h", a, rd_data, copy[a]);
      end
      en = 1'b0;
      rd_addr = ~a;
      @(negedge clk);
      checks++;
      if (rd_data !== copy[a]) begin
        failures++;
        $display("stand-by: data changed at addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
