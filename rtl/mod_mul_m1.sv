// mod_mul_m1: high-radix multiplier modulo 2^n-1 (n even).
//
// Each operand is split into two k-bit halves, k = n/2:
//   P = P1*2^k + P0,   Q = Q1*2^k + Q0.
// Because 2^(2k) = 2^n = 1 (mod 2^n-1), the product folds to
//   |P*Q| = |2^k*A1 + A0|,  A1 = P1*Q0 + P0*Q1,  A0 = P1*Q1 + P0*Q0.
// A0 and A1 are not formed with half-word multipliers but from four squares:
//   a = P0+P1+Q0+Q1   b = P0-P1-Q0+Q1   c = P0+P1-Q0-Q1   d = P0-P1+Q0-Q1
//   A0 = (a^2 - b^2 - c^2 + d^2) / 8,   A1 = (a^2 + b^2 - c^2 - d^2) / 8
// (the division by 8 is exact, a 3-bit shift). 2^k*A1 + A0 is at most
// n+k+2 bits; its bits above n-1 are added back onto the low n bits with a
// modulo 2^n-1 parallel-prefix adder (end-around carry), which also maps a
// result of 2^n-1 to 0.
//
// Interface: a_in, b_in are n-bit residues (all ones is accepted as zero);
// p = |a_in*b_in| mod 2^n-1 in 0..2^n-2. Purely combinational.
// The half-word split, the folding and the square-based forms of A0/A1
// follow the described multiplier; the sign pattern of the squares is the
// one that makes A0 and A1 equal the sums of half-word products they stand for.
module mod_mul_m1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic [N-1:0] p
);
  localparam int unsigned K  = N / 2;
  localparam int unsigned SW = K + 3;       // signed width of a, b, c, d
  localparam int unsigned QW = 2 * K + 7;   // signed width of the squares
  localparam int unsigned VW = N + K + 2;   // width of 2^k*A1 + A0

  logic signed [SW-1:0] p0, p1, q0, q1;
  logic signed [SW-1:0] sa, sb, sc, sd;
  logic signed [QW-1:0] qa, qb, qc, qd;
  logic signed [QW-1:0] a0x8, a1x8;
  logic [VW-1:0]        a0, a1, v;
  logic [N-1:0]         lo, hi;

  always_comb begin
    p0 = SW'(a_in[K-1:0]);
    p1 = SW'(a_in[N-1:K]);
    q0 = SW'(b_in[K-1:0]);
    q1 = SW'(b_in[N-1:K]);
    sa = p0 + p1 + q0 + q1;
    sb = p0 - p1 - q0 + q1;
    sc = p0 + p1 - q0 - q1;
    sd = p0 - p1 + q0 - q1;
    qa = QW'(sa) * QW'(sa);
    qb = QW'(sb) * QW'(sb);
    qc = QW'(sc) * QW'(sc);
    qd = QW'(sd) * QW'(sd);
    a0x8 = qa - qb - qc + qd;
    a1x8 = qa + qb - qc - qd;
    a0 = VW'(a0x8 >>> 3);
    a1 = VW'(a1x8 >>> 3);
    v  = (a1 << K) + a0;
    lo = v[N-1:0];
    hi = N'(v[VW-1:N]);
  end

  ppa_adder #(.N(N), .EAC(1'b1)) u_fold (.a(lo), .b(hi), .s(p));

  initial begin
    assert (N % 2 == 0 && N >= 4)
      else $fatal(1, "mod_mul_m1: N must be even and at least 4");
  end

endmodule
