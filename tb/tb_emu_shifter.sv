// tb_emu_shifter: self-checking test of the barrel shifter used as output
// shifter (4 data bits into a 5-bit output register).
//
// For every data word, offset, position and count the result and mask are
// compared with a bit-by-bit model: output bit p+k = din[off+k] for
// k < cnt where both indices are in range, all other bits zero.
module tb_emu_shifter;
  logic [3:0] din;
  logic [1:0] rsh;
  logic [2:0] lsh, cnt;
  logic [4:0] dout, mask;
  int checks = 0, failures = 0;

  emu_shifter #(.IN_W(4), .OUT_W(5)) dut (.din, .rsh, .lsh, .cnt, .dout, .mask);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++)
      for (int r = 0; r < 4; r++)
        for (int l = 0; l < 8; l++)
          for (int c = 0; c < 5; c++) begin
            logic [4:0] ed, em;
            din = 4'(d); rsh = 2'(r); lsh = 3'(l); cnt = 3'(c);
            ed = '0; em = '0;
            for (int k = 0; k < c; k++) begin
              if (l + k < 5) begin
                em[l+k] = 1'b1;
                if (r + k < 4) ed[l+k] = din[r+k];
              end
            end
            #1;
            checks++;
            if (dout !== ed || mask !== em) begin
              failures++;
              if (failures < 10) $display("d=%h r=%0d l=%0d c=%0d: %b/%b expected %b/%b",
                                          d, r, l, c, dout, mask, ed, em);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
