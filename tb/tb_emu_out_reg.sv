// tb_emu_out_reg: self-checking test of the output register.
//
// Random masked writes are applied and the register is compared with a
// model after each clock: masked bits take the new data, others keep their
// value; clear and reset give zero.
module tb_emu_out_reg;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_data = '0, wr_mask = '0, q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  emu_out_reg dut (.clk, .rst_n, .clr, .wr_en, .wr_data, .wr_mask, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      clr = ($urandom_range(19) == 0);
      wr_en = $urandom_range(1);
      wr_data = 5'($urandom); wr_mask = 5'($urandom);
      if (clr) model = '0;
      else if (wr_en) model = (model & ~wr_mask) | (wr_data & wr_mask);
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("q=%b expected %b", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
