// rns_fir_channel: transposed direct-form FIR filter on the residues of one modulus.
//
// With coefficients h[0..TAPS-1] the filter computes
//   y[n] = | sum_i h[i] * x[n-i] |  modulo m,   m in {2^n-1, 2^n, 2^n+1}.
// In the transposed form every tap multiplies the current input residue by
// its coefficient and adds the result to the partial sum held by the next
// tap's register: z[i] <= h[i]*x + z[i+1], z[TAPS-1] <= h[TAPS-1]*x. The
// output is z[0]. Each register-to-register path is one modular multiplier
// and one modular adder, independent of the number of taps.
// The modulus decides the arithmetic:
//   CH_M1 (2^n-1): mod_mul_m1 high-radix multiplier, ppa_adder with end-around carry;
//   CH_M0 (2^n):   mod_mul_2n shift-and-add multiplier, ppa_adder without carry out;
//   CH_P1 (2^n+1): mod_mul_p1 multiplier, mod_add_p1 adder (residues n+1 bits).
// Reconfiguration: the coefficient residues sit in a register file that is
// written one tap at a time (coef_we, coef_addr, coef); a write takes effect
// for the next sample. Partial sums already in the tap registers keep the
// products formed with the old coefficients, so for TAPS-1 samples after a
// change the output mixes old and new coefficients, as any transposed-form
// filter does. Reset clears coefficients and partial sums.
//
// Timing: one sample per clock when en is high; y[n] is in y on the clock
// edge that takes x[n] (one cycle latency). With en low the filter holds.
// The transposed direct form and the per-modulus adders and multipliers
// follow the described filter; the coefficient register file and its write
// port are this design's own form of the reconfiguration.
module rns_fir_channel
  import rrns_pkg::*;
#(
  parameter ch_kind_e    KIND = CH_M1,
  parameter int unsigned N    = 8,
  parameter int unsigned TAPS = 64,
  localparam int unsigned RW  = (KIND == CH_P1) ? N + 1 : N,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [RW-1:0] x,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  logic [RW-1:0] coef,
  output logic [RW-1:0] y
);
  logic [RW-1:0] h    [TAPS];
  logic [RW-1:0] z    [TAPS+1];
  logic [RW-1:0] prod [TAPS];
  logic [RW-1:0] sum  [TAPS];

  assign z[TAPS] = '0;

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    if (KIND == CH_M1) begin : g_m1
      mod_mul_m1 #(.N(N))            u_mul (.a_in(h[i]), .b_in(x), .p(prod[i]));
      ppa_adder  #(.N(N), .EAC(1'b1)) u_add (.a(prod[i]), .b(z[i+1]), .s(sum[i]));
    end else if (KIND == CH_M0) begin : g_m0
      mod_mul_2n #(.N(N))            u_mul (.a(h[i]), .b(x), .p(prod[i]));
      ppa_adder  #(.N(N), .EAC(1'b0)) u_add (.a(prod[i]), .b(z[i+1]), .s(sum[i]));
    end else begin : g_p1
      mod_mul_p1 #(.N(N)) u_mul (.a(h[i]), .b(x), .p(prod[i]));
      mod_add_p1 #(.N(N)) u_add (.a(prod[i]), .b(z[i+1]), .s(sum[i]));
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        z[i] <= '0;
        h[i] <= '0;
      end else begin
        if (en) z[i] <= sum[i];
        if (coef_we && coef_addr == AW'(i)) h[i] <= coef;
      end
    end
  end

  assign y = z[0];

endmodule
