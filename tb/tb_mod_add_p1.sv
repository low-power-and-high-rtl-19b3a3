// tb_mod_add_p1: exhaustive check of the modulo 2^n+1 adder for n = 8 and n = 4.
// All residue pairs 0..2^n are applied and compared with (a+b) mod (2^n+1).
module tb_mod_add_p1;
  logic [8:0] a8, b8, s8;
  logic [4:0] a4, b4, s4;
  int checks = 0, failures = 0;

  mod_add_p1 #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8));
  mod_add_p1 #(.N(4)) dut4 (.a(a4), .b(b4), .s(s4));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 256; i++) begin
      for (int j = 0; j <= 256; j++) begin
        a8 = 9'(i); b8 = 9'(j);
        a4 = 5'(i % 17); b4 = 5'(j % 17);
        #1;
        checks += 2;
        if (int'(s8) != (i + j) % 257) begin
          failures++;
          if (failures < 10) $display("n=8: %0d+%0d -> %0d", i, j, s8);
        end
        if (int'(s4) != (i % 17 + j % 17) % 17) begin
          failures++;
          if (failures < 10) $display("n=4: %0d+%0d -> %0d", i % 17, j % 17, s4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
