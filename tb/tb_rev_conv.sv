// tb_rev_conv: checks the reverse converter for n = 8 and n = 4.
//
// A signed value X is drawn from the full range -M/2 .. M/2-1, its three
// residues are computed with integers and applied; one clock later y must
// equal X and out_valid must be high (one-cycle latency). The ends of the
// range, zero and -1 are included; for n = 4 the whole range is swept.
module tb_rev_conv;
  localparam longint M8 = 255 * 256 * 257;
  localparam longint M4 = 15 * 16 * 17;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic [7:0] r1, r0;
  logic [8:0] r3;
  logic [3:0] s1, s0;
  logic [4:0] s3;
  logic vo8, vo4;
  logic signed [23:0] y8;
  logic signed [11:0] y4;
  int checks = 0, failures = 0;

  rev_conv #(.N(8)) dut8 (.clk, .rst_n, .in_valid(vin), .r1(r1), .r0(r0), .r3(r3), .out_valid(vo8), .y(y8));
  rev_conv #(.N(4)) dut4 (.clk, .rst_n, .in_valid(vin), .r1(s1), .r0(s0), .r3(s3), .out_valid(vo4), .y(y4));

  always #5 clk = ~clk;

  function automatic longint res(input longint v, input longint m);
    return ((v % m) + m) % m;
  endfunction

  task automatic apply(input longint x8, input longint x4);
    @(negedge clk);
    vin = 1'b1;
    r1 = 8'(res(x8, 255)); r0 = 8'(res(x8, 256)); r3 = 9'(res(x8, 257));
    s1 = 4'(res(x4, 15));  s0 = 4'(res(x4, 16));  s3 = 5'(res(x4, 17));
    @(posedge clk);
    #1;
    checks += 2;
    if (!vo8 || longint'(y8) != x8) begin
      failures++;
      if (failures < 20) $display("n=8: X=%0d got %0d valid=%b", x8, y8, vo8);
    end
    if (!vo4 || longint'(y4) != x4) begin
      failures++;
      if (failures < 20) $display("n=4: X=%0d got %0d valid=%b", x4, y4, vo4);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = '0; r0 = '0; r3 = '0; s1 = '0; s0 = '0; s3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(0, 0);
    apply(-1, -1);
    apply(-M8 / 2, -M4 / 2);
    apply(M8 / 2 - 1, M4 / 2 - 1);
    for (longint i = -M4 / 2; i < M4 / 2; i++)
      apply((longint'($urandom) % M8) - M8 / 2, i);
    for (int i = 0; i < 20000; i++)
      apply((longint'($urandom) % M8) - M8 / 2, (longint'($urandom) % M4) - M4 / 2);
    // valid must drop one clock after in_valid drops
    @(negedge clk);
    vin = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (vo8 || vo4) begin
      failures++;
      $display("out_valid did not follow in_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
