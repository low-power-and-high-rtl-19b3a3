// tb_fwd_conv: checks the forward converter on signed inputs.
//
// Three instances: n = 8 with a 32-bit input, n = 4 with a 16-bit input and
// n = 8 with a 27-bit input (short top chunk). Edge values (0, -1, the most
// negative and most positive inputs) and random values are applied and the
// residues are compared with the mathematical residue of the signed value,
// computed with 64-bit integers (((x mod m) + m) mod m).
module tb_fwd_conv;
  logic signed [31:0] x32;
  logic signed [15:0] x16;
  logic signed [26:0] x27;
  logic [7:0] a1, a0, c1, c0;
  logic [8:0] a3, c3;
  logic [3:0] b1, b0;
  logic [4:0] b3;
  int checks = 0, failures = 0;

  fwd_conv #(.N(8), .W(32)) dut32 (.x(x32), .r1(a1), .r0(a0), .r3(a3));
  fwd_conv #(.N(4), .W(16)) dut16 (.x(x16), .r1(b1), .r0(b0), .r3(b3));
  fwd_conv #(.N(8), .W(27)) dut27 (.x(x27), .r1(c1), .r0(c0), .r3(c3));

  function automatic longint res(input longint v, input longint m);
    return ((v % m) + m) % m;
  endfunction

  task automatic check(input string tag, input longint got, input longint v, input longint m);
    checks++;
    if (got != res(v, m)) begin
      failures++;
      if (failures < 20) $display("%s: x=%0d mod %0d got %0d exp %0d", tag, v, m, got, res(v, m));
    end
  endtask

  task automatic apply(input logic [31:0] r);
    x32 = $signed(r);
    x16 = $signed(r[15:0]);
    x27 = $signed(r[26:0]);
    #1;
    check("w32 m1", longint'(a1), longint'(x32), 255);
    check("w32 m0", longint'(a0), longint'(x32), 256);
    check("w32 p1", longint'(a3), longint'(x32), 257);
    check("w16 m1", longint'(b1), longint'(x16), 15);
    check("w16 m0", longint'(b0), longint'(x16), 16);
    check("w16 p1", longint'(b3), longint'(x16), 17);
    check("w27 m1", longint'(c1), longint'(x27), 255);
    check("w27 m0", longint'(c0), longint'(x27), 256);
    check("w27 p1", longint'(c3), longint'(x27), 257);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h0000_0000);
    apply(32'hFFFF_FFFF);
    apply(32'h8000_0000);
    apply(32'h7FFF_FFFF);
    apply(32'h0400_0000);
    apply(32'h0000_8000);
    apply(32'h0000_7FFF);
    for (int i = 0; i < 65536; i++) apply(32'(i));   // all 16-bit patterns
    for (int i = 0; i < 50000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
