// tb_mod_mul_m1: exhaustive check of the high-radix modulo 2^n-1 multiplier
// for n = 8 and n = 4. Every operand pair (including the all-ones code for
// zero) is compared with (a*b) mod (2^n-1); the result must be reduced.
module tb_mod_mul_m1;
  logic [7:0] a8, b8, p8;
  logic [3:0] a4, b4, p4;
  int checks = 0, failures = 0;

  mod_mul_m1 #(.N(8)) dut8 (.a_in(a8), .b_in(b8), .p(p8));
  mod_mul_m1 #(.N(4)) dut4 (.a_in(a4), .b_in(b4), .p(p4));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks += 2;
        if (int'(p8) != (i * j) % 255) begin
          failures++;
          if (failures < 10) $display("n=8: %0d*%0d -> %0d", i, j, p8);
        end
        if (int'(p4) != ((i % 16) * (j % 16)) % 15) begin
          failures++;
          if (failures < 10) $display("n=4: %0d*%0d -> %0d", i % 16, j % 16, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
