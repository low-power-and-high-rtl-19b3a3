// tb_ppa_adder: exhaustive check of the Sklansky parallel-prefix adder.
//
// Two instances with n = 8: modulo 2^8-1 (end-around carry) and modulo 2^8.
// Every operand pair is applied (for 2^8-1 including the all-ones code for
// zero) and the sum is compared with (a+b) mod m worked out with integers.
// The 2^8-1 result must be a reduced residue (never all ones), except for
// all ones plus all ones, where the all-ones code for zero is expected.
module tb_ppa_adder;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, s_m1, s_m0;
  int checks = 0, failures = 0;

  ppa_adder #(.N(N), .EAC(1'b1)) dut_m1 (.a(a), .b(b), .s(s_m1));
  ppa_adder #(.N(N), .EAC(1'b0)) dut_m0 (.a(a), .b(b), .s(s_m0));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i); b = N'(j);
        #1;
        checks += 2;
        if (int'(s_m1) != ((i == 255 && j == 255) ? 255 : (i + j) % 255)) begin
          failures++;
          if (failures < 10) $display("m1: %0d+%0d -> %0d", i, j, s_m1);
        end
        if (int'(s_m0) != (i + j) % 256) begin
          failures++;
          if (failures < 10) $display("m0: %0d+%0d -> %0d", i, j, s_m0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
