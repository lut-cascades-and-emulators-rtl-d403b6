// tb_emu_icn_mem: self-checking test of the memory for interconnection.
//
// Checks the reset value, writes random 35-bit words (the width of the
// default emulator's step word) to all four entries, checks the
// asynchronous read of each, then overwrites one entry and checks that the
// others kept their value.
module tb_emu_icn_mem;
  localparam int CFG_W = 35;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [1:0] rd_idx = '0, wr_idx = '0;
  logic [CFG_W-1:0] cfg, wr_data = '0;
  logic [CFG_W-1:0] copy [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  emu_icn_mem #(.DEPTH(4), .CFG_W(CFG_W)) dut (.clk, .rst_n, .rd_idx, .cfg, .wr_en, .wr_idx, .wr_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i);
      #1;
      checks++;
      if (cfg !== copy[i]) begin
        failures++;
        $display("entry %0d: %h expected %h", i, cfg, copy[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) copy[i] = '0;
    @(negedge clk);
    check_all();
    rst_n = 1'b1;
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_idx = 2'(i); wr_data = CFG_W'({$urandom, $urandom});
        copy[i] = wr_data;
      end
      @(negedge clk);
      wr_en = 1'b0;
      check_all();
      @(negedge clk);
      wr_en = 1'b1; wr_idx = 2'(r % 4); wr_data = ~copy[r % 4];
      copy[r % 4] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
