// rrns_fir_top: reconfigurable FIR filter computed in the residue number system.
//
// A TAPS-tap filter y[n] = sum_i h[i]*x[n-i] is evaluated in three
// independent, carry-free channels, one per modulus of {2^n-1, 2^n, 2^n+1}
// (n = N; with N = 8: 255, 256, 257, range M = 16,776,960):
//   1. fwd_conv splits each signed DATA_W-bit sample into its three
//      residues (registered: stage 1);
//   2. three rns_fir_channel instances run the transposed direct-form
//      filter modulo their own modulus (stage 2);
//   3. rev_conv joins the three output residues into a signed 3N-bit
//      result (stage 3).
// Results are exact when the true filter output lies in -M/2 .. M/2-1;
// otherwise the output is the true value wrapped modulo M into that range.
//
// Reconfiguration: a signed COEF_W-bit coefficient written with coef_we at
// tap coef_addr is converted to residues by a second fwd_conv and stored in
// all three channels in the same clock. It applies to every sample whose
// in_valid is high in the same clock as the write or later; because the
// filter is in transposed form, the TAPS-1 outputs after a change still
// contain partial sums made with the old coefficients. After reset every
// coefficient is zero.
//
// Timing: one sample per clock; out_valid/out_data follow in_valid/in_data
// by three clocks. Samples may come with gaps (in_valid low); the filter
// state advances only on valid samples. Synchronous active-low reset.
// The structure (forward conversion, per-modulus transposed-form channels,
// reverse conversion, 64 taps, the moduli set, a 32-bit input word for the
// proposed 2^n+-1 set with n = 8) follows the described filter; the pipeline
// registers and the coefficient write port are this design's choices.
module rrns_fir_top
  import rrns_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned COEF_W = 32,
  parameter int unsigned TAPS   = 64,
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                  coef_we,
  input  logic [AW-1:0]         coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic                  out_valid,
  output logic signed [3*N-1:0] out_data
);
  // stage 1: forward conversion of the sample
  logic [N-1:0] x1_c, x0_c, x1_q, x0_q;
  logic [N:0]   x3_c, x3_q;
  logic         v1_q;

  fwd_conv #(.N(N), .W(DATA_W)) u_fwd_x (.x(in_data), .r1(x1_c), .r0(x0_c), .r3(x3_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      x1_q <= '0;
      x0_q <= '0;
      x3_q <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        x1_q <= x1_c;
        x0_q <= x0_c;
        x3_q <= x3_c;
      end
    end
  end

  // coefficient forward conversion
  logic [N-1:0] h1, h0;
  logic [N:0]   h3;

  fwd_conv #(.N(N), .W(COEF_W)) u_fwd_h (.x(coef_data), .r1(h1), .r0(h0), .r3(h3));

  // stage 2: residue channels
  logic [N-1:0] y1, y0;
  logic [N:0]   y3;
  logic         v2_q;

  rns_fir_channel #(.KIND(CH_M1), .N(N), .TAPS(TAPS)) u_ch_m1 (
    .clk, .rst_n, .en(v1_q), .x(x1_q),
    .coef_we, .coef_addr, .coef(h1), .y(y1));
  rns_fir_channel #(.KIND(CH_M0), .N(N), .TAPS(TAPS)) u_ch_m0 (
    .clk, .rst_n, .en(v1_q), .x(x0_q),
    .coef_we, .coef_addr, .coef(h0), .y(y0));
  rns_fir_channel #(.KIND(CH_P1), .N(N), .TAPS(TAPS)) u_ch_p1 (
    .clk, .rst_n, .en(v1_q), .x(x3_q),
    .coef_we, .coef_addr, .coef(h3), .y(y3));

  always_ff @(posedge clk) begin
    if (!rst_n) v2_q <= 1'b0;
    else        v2_q <= v1_q;
  end

  // stage 3: reverse conversion
  rev_conv #(.N(N)) u_rev (
    .clk, .rst_n, .in_valid(v2_q),
    .r1(y1), .r0(y0), .r3(y3),
    .out_valid, .y(out_data));

endmodule
