// tb_rrns_fir_top: end-to-end test of the RNS FIR filter at its default size
// (n = 8, moduli 255/256/257, 32-bit samples and coefficients, 64 taps).
//
// The reference is an exact 64-bit integer model of the same transposed
// filter, z[i] = h[i]*x + z[i+1] with no modular arithmetic at all, whose
// output is then wrapped into the signed RNS range -M/2 .. M/2-1
// (M = 255*256*257). Every output is compared with the value expected for
// its sample, and the distance from in_valid to out_valid must be exactly
// three clocks.
// Phases: (1) impulse response, which must read the coefficients back in
// tap order; (2) small random samples and coefficients, results well inside
// the range; (3) new coefficients loaded while the filter is busy
// (reconfiguration); (4) large samples and coefficients so that results
// leave the range and wrap. Samples come with random gaps. The test counts
// gaps, reconfigurations, negative results and wrapped results and fails if
// any of them never happened.
module tb_rrns_fir_top;
  localparam int     TAPS = 64;
  localparam longint M    = 255 * 256 * 257;
  localparam longint LAT  = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, coef_we = 1'b0;
  logic signed [31:0] in_data = '0, coef_data = '0;
  logic [5:0] coef_addr = '0;
  logic out_valid;
  logic signed [23:0] out_data;

  rrns_fir_top dut (.clk, .rst_n, .in_valid, .in_data, .coef_we, .coef_addr, .coef_data,
                    .out_valid, .out_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_gaps = 0, n_reconf = 0, n_neg = 0, n_wrap = 0, n_out = 0;
  longint cycle = 0;
  longint h[TAPS];
  longint z[TAPS+1];
  longint exp_q[$];
  longint when_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint wrap(input longint v);
    longint r;
    r = ((v % M) + M) % M;
    return (r >= M / 2) ? r - M : r;
  endfunction

  // output monitor: value and latency
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e, t;
      checks += 2;
      n_out++;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("unexpected output %0d", out_data);
      end else begin
        e = exp_q.pop_front();
        t = when_q.pop_front();
        if (longint'(out_data) != e) begin
          failures++;
          if (failures < 20) $display("out %0d: got %0d exp %0d", n_out, out_data, e);
        end
        if (cycle - t != LAT) begin
          failures++;
          if (failures < 20) $display("latency %0d, expected %0d", cycle - t, LAT);
        end
        if (e < 0) n_neg++;
      end
    end
  end

  task automatic load_coef(input int i, input longint v);
    @(negedge clk);
    in_valid = 1'b0;
    coef_we = 1'b1;
    coef_addr = 6'(i);
    coef_data = 32'(v);
    h[i] = v;
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // one clock: optionally a sample; the coefficient write port is left alone
  task automatic send(input bit valid, input longint v);
    @(negedge clk);
    in_valid = valid;
    in_data = 32'(v);
    if (valid) begin
      longint y;
      for (int i = 0; i < TAPS; i++) z[i] = h[i] * v + z[i+1];
      y = z[0];
      if (y >= M / 2 || y < -M / 2) n_wrap++;
      exp_q.push_back(wrap(y));
      when_q.push_back(cycle);
    end else n_gaps++;
  endtask

  function automatic longint srand(input int bits);
    longint r;
    r = longint'($urandom) % (longint'(1) << bits);
    return r - (longint'(1) << (bits - 1));
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= TAPS; i++) z[i] = 0;
    for (int i = 0; i < TAPS; i++) h[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // (1) impulse response
    for (int i = 0; i < TAPS; i++) load_coef(i, srand(8));
    n_reconf++;
    send(1, 1);
    for (int i = 0; i < TAPS + 2; i++) send(1, 0);

    // (2) small random data with gaps
    for (int k = 0; k < 300; k++) begin
      if ($urandom % 5 == 0) send(0, 0);
      send(1, srand(12));
    end

    // (3) reconfigure while samples keep flowing (coefficient writes interleaved)
    for (int i = 0; i < TAPS; i++) begin
      load_coef(i, srand(10));
      send(1, srand(12));
    end
    n_reconf++;
    for (int k = 0; k < 300; k++) begin
      if ($urandom % 4 == 0) send(0, 0);
      send(1, srand(12));
    end

    // (4) large values: results leave the RNS range and wrap
    for (int i = 0; i < TAPS; i++) load_coef(i, srand(16));
    n_reconf++;
    for (int k = 0; k < 300; k++) begin
      if ($urandom % 6 == 0) send(0, 0);
      send(1, srand(20));
    end

    send(0, 0);
    repeat (int'(LAT) + 2) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("outputs=%0d gaps=%0d reconfigurations=%0d negative=%0d wrapped=%0d",
             n_out, n_gaps, n_reconf, n_neg, n_wrap);
    checks += 4;
    if (n_gaps == 0)   begin failures++; $display("no input gap happened"); end
    if (n_reconf < 2)  begin failures++; $display("no reconfiguration happened"); end
    if (n_neg == 0)    begin failures++; $display("no negative result happened"); end
    if (n_wrap == 0)   begin failures++; $display("no wrapped result happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
