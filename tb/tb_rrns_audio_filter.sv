// tb_rrns_audio_filter: audio-style workload for the default-size filter.
//
// A 64-tap low-pass filter (Hamming-windowed sinc, cutoff 0.1 of the sample
// rate, coefficients rounded to signed 8-bit integers) is loaded through the
// coefficient port. The input is a synthetic 14-bit audio signal: a tone at
// 0.02 fs (passband) plus a tone of equal amplitude at 0.35 fs (stopband),
// 4096 samples, one per clock. Sizes: |x| <= 8000 and sum|h| = 1028 bound
// every result by 8,224,000, inside the +-8,388,480 range of the moduli
// 255/256/257.
// Checks: every output equals an exact integer convolution; the output
// arrives three clocks after its sample; over the settled part of the
// output, the passband tone keeps its expected gain (sum h) within 5 % and
// the stopband tone is attenuated by more than 35 dB relative to it.
module tb_rrns_audio_filter;
  localparam int  TAPS = 64;
  localparam int  NS   = 4096;
  localparam real PI   = 3.14159265358979;
  localparam real FA   = 0.02;
  localparam real FB   = 0.35;
  localparam real AMP  = 4000.0;

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
  longint h[TAPS];
  longint x[NS];
  longint yref[NS];
  longint sent_at[NS];
  longint cycle = 0;
  int     n_out = 0;
  real    ia = 0.0, qa = 0.0, ib = 0.0, qb = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      if (n_out >= NS) begin
        failures += 2;
      end else begin
        if (longint'(out_data) != yref[n_out]) begin
          failures++;
          if (failures < 20) $display("sample %0d: got %0d exp %0d", n_out, out_data, yref[n_out]);
        end
        if (cycle - sent_at[n_out] != 3) begin
          failures++;
          if (failures < 20) $display("sample %0d: latency %0d", n_out, cycle - sent_at[n_out]);
        end
        // tone analysis on the settled part (after the first TAPS outputs)
        if (n_out >= TAPS) begin
          ia += real'(out_data) * $cos(2.0 * PI * FA * n_out);
          qa += real'(out_data) * $sin(2.0 * PI * FA * n_out);
          ib += real'(out_data) * $cos(2.0 * PI * FB * n_out);
          qb += real'(out_data) * $sin(2.0 * PI * FB * n_out);
        end
      end
      n_out++;
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    w, sn, t, amp_a, amp_b, gain, sum_abs, att_db;
    longint hsum;
    // low-pass coefficients
    hsum = 0;
    sum_abs = 0.0;
    for (int i = 0; i < TAPS; i++) begin
      t  = real'(i) - real'(TAPS - 1) / 2.0;
      sn = (t == 0.0) ? 2.0 * 0.1 : $sin(2.0 * PI * 0.1 * t) / (PI * t);
      w  = 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(TAPS - 1));
      h[i] = longint'($rtoi(sn * w * 127.0 / (2.0 * 0.1) + ((sn * w >= 0.0) ? 0.5 : -0.5)));
      hsum += h[i];
      sum_abs += (h[i] < 0) ? -real'(h[i]) : real'(h[i]);
    end
    // input signal and exact reference
    for (int n = 0; n < NS; n++)
      x[n] = longint'($rtoi(AMP * $sin(2.0 * PI * FA * n) + AMP * $sin(2.0 * PI * FB * n + 0.3)));
    for (int n = 0; n < NS; n++) begin
      yref[n] = 0;
      for (int i = 0; i < TAPS; i++) if (n - i >= 0) yref[n] += h[i] * x[n-i];
    end
    $display("sum h = %0d, sum |h| = %0.0f", hsum, sum_abs);

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < TAPS; i++) begin
      @(negedge clk);
      coef_we = 1'b1;
      coef_addr = 6'(i);
      coef_data = 32'(h[i]);
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data = 32'(x[n]);
      sent_at[n] = cycle;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(posedge clk);

    checks++;
    if (n_out != NS) begin
      failures++;
      $display("%0d outputs, expected %0d", n_out, NS);
    end
    amp_a = 2.0 * $sqrt(ia * ia + qa * qa) / real'(NS - TAPS);
    amp_b = 2.0 * $sqrt(ib * ib + qb * qb) / real'(NS - TAPS);
    gain  = amp_a / AMP;
    att_db = 20.0 * $log10(amp_a / ((amp_b > 1.0) ? amp_b : 1.0));
    $display("passband amplitude %0.1f (gain %0.2f, sum h %0d), stopband amplitude %0.1f, attenuation %0.1f dB",
             amp_a, gain, hsum, amp_b, att_db);
    checks += 2;
    if (gain < 0.95 * real'(hsum) || gain > 1.05 * real'(hsum)) begin
      failures++;
      $display("passband gain off");
    end
    if (att_db < 35.0) begin
      failures++;
      $display("stopband tone not attenuated enough");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
