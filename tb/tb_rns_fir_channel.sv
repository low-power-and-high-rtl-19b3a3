// tb_rns_fir_channel: checks the transposed-form residue FIR channels.
//
// Four channels with n = 8: modulo 255, 256 and 257 with 8 taps, and
// modulo 255 with the default 64 taps. Random input residues are fed with
// random gaps (en low) and the coefficient registers are rewritten part way
// through. An integer reference runs the same transposed recurrence,
// z[i] = (h[i]*x + z[i+1]) mod m, so that the samples right after a
// coefficient change (whose partial sums mix old and new coefficients) are
// predicted too; between changes this equals sum h[i]*x[n-i] mod m. The
// output is compared one clock after every accepted sample (one-cycle
// latency) and must hold during gaps.
module tb_rns_fir_channel;
  import rrns_pkg::*;
  localparam int T = 8;
  localparam int TL = 64;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, we = 1'b0;
  logic [5:0] addr;
  logic [7:0] x1, x0, xl, h1, h0, hl, y1, y0, yl;
  logic [8:0] x3, h3, y3;
  logic we_s;
  int checks = 0, failures = 0;

  assign we_s = we && (addr < 6'(T));
  int gaps = 0, reconfigs = 0;

  rns_fir_channel #(.KIND(CH_M1), .N(8), .TAPS(T)) d1 (.clk, .rst_n, .en, .x(x1),
    .coef_we(we_s), .coef_addr(addr[2:0]), .coef(h1), .y(y1));
  rns_fir_channel #(.KIND(CH_M0), .N(8), .TAPS(T)) d0 (.clk, .rst_n, .en, .x(x0),
    .coef_we(we_s), .coef_addr(addr[2:0]), .coef(h0), .y(y0));
  rns_fir_channel #(.KIND(CH_P1), .N(8), .TAPS(T)) d3 (.clk, .rst_n, .en, .x(x3),
    .coef_we(we_s), .coef_addr(addr[2:0]), .coef(h3), .y(y3));
  rns_fir_channel #(.KIND(CH_M1), .N(8)) dl (.clk, .rst_n, .en, .x(xl),
    .coef_we(we), .coef_addr(addr), .coef(hl), .y(yl));

  always #5 clk = ~clk;

  int c1[T], c0[T], c3[T], cl[TL];
  // reference partial sums of the transposed form, z[T] / z[TL] stay 0
  int z1[T+1], z0[T+1], z3[T+1], zl[TL+1];

  // z[i] <= (h[i]*x + z[i+1]) mod m, worked out with integers
  task automatic step8(inout int z[T+1], input int c[T], input int x, input int m);
    for (int i = 0; i < T; i++) z[i] = int'((longint'(c[i]) * longint'(x) + longint'(z[i+1])) % longint'(m));
  endtask

  task automatic step64(inout int z[TL+1], input int c[TL], input int x, input int m);
    for (int i = 0; i < TL; i++) z[i] = int'((longint'(c[i]) * longint'(x) + longint'(z[i+1])) % longint'(m));
  endtask

  task automatic compare(input int e1, input int e0, input int e3, input int el);
    checks += 4;
    if (int'(y1) != e1) begin failures++; if (failures < 20) $display("m1 got %0d exp %0d", y1, e1); end
    if (int'(y0) != e0) begin failures++; if (failures < 20) $display("m0 got %0d exp %0d", y0, e0); end
    if (int'(y3) != e3) begin failures++; if (failures < 20) $display("p1 got %0d exp %0d", y3, e3); end
    if (int'(yl) != el) begin failures++; if (failures < 20) $display("64 got %0d exp %0d", yl, el); end
  endtask

  task automatic write_coefs();
    for (int i = 0; i < TL; i++) begin
      @(negedge clk);
      en = 1'b0;
      we = 1'b1;
      addr = 6'(i);
      hl = 8'($urandom % 255);
      cl[i] = int'(hl);
      if (i < T) begin
        h1 = 8'($urandom % 255); c1[i] = int'(h1);
        h0 = 8'($urandom);       c0[i] = int'(h0);
        h3 = 9'($urandom % 257); c3[i] = int'(h3);
      end
    end
    @(negedge clk);
    we = 1'b0;
    reconfigs++;
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = '0; x0 = '0; x3 = '0; xl = '0; h1 = '0; h0 = '0; h3 = '0; hl = '0; addr = '0;
    for (int i = 0; i <= T; i++) begin z1[i] = 0; z0[i] = 0; z3[i] = 0; end
    for (int i = 0; i <= TL; i++) zl[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 3; phase++) begin
      write_coefs();
      for (int k = 0; k < 400; k++) begin
        @(negedge clk);
        en = ($urandom % 4) != 0;
        x1 = 8'($urandom % 255); x0 = 8'($urandom); x3 = 9'($urandom % 257); xl = 8'($urandom % 255);
        if (en) begin
          step8(z1, c1, int'(x1), 255);
          step8(z0, c0, int'(x0), 256);
          step8(z3, c3, int'(x3), 257);
          step64(zl, cl, int'(xl), 255);
        end else gaps++;
        @(posedge clk);
        #1;
        compare(z1[0], z0[0], z3[0], zl[0]);
      end
    end
    checks++;
    if (gaps == 0 || reconfigs < 2) begin
      failures++;
      $display("gaps=%0d reconfigs=%0d: mechanism not exercised", gaps, reconfigs);
    end
    $display("gaps=%0d reconfigs=%0d", gaps, reconfigs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
