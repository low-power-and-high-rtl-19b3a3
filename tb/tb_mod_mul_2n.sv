// tb_mod_mul_2n: exhaustive check of the shift-and-add modulo 2^8 multiplier
// against (a*b) mod 256.
module tb_mod_mul_2n;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  mod_mul_2n #(.N(8)) dut (.a(a), .b(b), .p(p));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != (i * j) % 256) begin
          failures++;
          if (failures < 10) $display("%0d*%0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
