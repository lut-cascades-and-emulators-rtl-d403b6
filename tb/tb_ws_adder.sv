// tb_ws_adder: self-checking test of the decomposition adder (Q = 8,
// L = 4), exhaustive over all 4096 input pairs: sum = (a + b_hi) mod 256.
module tb_ws_adder;
  logic [7:0] a, sum;
  logic [3:0] b_hi;
  int checks = 0, failures = 0;

  ws_adder dut (.a, .b_hi, .sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 16; j++) begin
        a = 8'(i); b_hi = 4'(j);
        #1;
        checks++;
        if (int'(sum) != (i + j) % 256) begin
          failures++;
          if (failures < 10) $display("%0d + %0d = %0d", i, j, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
