// tb_emu_pin: self-checking test of the programmable interconnection
// network (8 inputs, 4 rails, 6 address bits, 4-bit select codes).
//
// Random inputs, rails and select codes, including the unused codes 14 and
// 15, are applied; every address bit is compared with the source its code
// names: 0, 1, x[code-2] or fb[code-10], and 0 for an unused code.
module tb_emu_pin;
  logic [7:0] x;
  logic [3:0] fb;
  logic [5:0][3:0] sel;
  logic [5:0] addr;
  int checks = 0, failures = 0;

  emu_pin dut (.x, .fb, .sel, .addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x = 8'($urandom); fb = 4'($urandom);
      for (int j = 0; j < 6; j++) sel[j] = 4'($urandom);
      #1;
      for (int j = 0; j < 6; j++) begin
        logic e;
        int c;
        c = int'(sel[j]);
        if (c == 0) e = 1'b0;
        else if (c == 1) e = 1'b1;
        else if (c < 10) e = x[c-2];
        else if (c < 14) e = fb[c-10];
        else e = 1'b0;
        checks++;
        if (addr[j] !== e) begin
          failures++;
          if (failures < 10) $display("bit %0d code %0d: %b expected %b", j, c, addr[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
