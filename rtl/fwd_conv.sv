// fwd_conv: binary-to-RNS forward converter for the moduli {2^n-1, 2^n, 2^n+1}.
//
// The W-bit input pattern is cut into four n-bit chunks,
//   X = M3*2^(3n) + M2*2^(2n) + M1*2^n + M0   (M3 holds the top W-3n bits),
// and each residue follows from the value of 2^n in that modulus:
//   modulo 2^n-1 (2^n = 1):  x1 = |M3 + M2 + M1 + M0|, three end-around-carry
//                            parallel-prefix adders;
//   modulo 2^n:              x2 = M0, the low n bits;
//   modulo 2^n+1 (2^n = -1): x3 = |M0 - M1 + M2 - M3|, three modulo 2^n+1 adders.
// The input is a two's complement number: when its sign bit is set the
// unsigned pattern is X + 2^W, so |2^W| is subtracted in the 2^n-1 and 2^n+1
// channels (a constant added under the sign bit). In the 2^n channel 2^W
// vanishes and nothing needs correcting.
//
// Interface: x is a signed W-bit sample, 3n < W <= 4n; r1, r0, r3 are its
// residues modulo 2^n-1 (0..2^n-2), 2^n and 2^n+1 (0..2^n). Combinational.
// r0 is wired straight from the low input bits: that is the 2^n residue.
// The chunk sums follow the described converter; the two's complement
// correction is this design's choice of how negative samples enter.
module fwd_conv
  import rrns_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 4 * N
) (
  input  logic signed [W-1:0] x,
  output logic        [N-1:0] r1,
  output logic        [N-1:0] r0,
  output logic        [N:0]   r3
);
  localparam int unsigned MM1  = (1 << N) - 1;
  localparam int unsigned MP1  = (1 << N) + 1;
  localparam logic [N-1:0] COR1 = N'(MM1 - pow2_mod(W, MM1));
  localparam logic [N:0]   COR3 = (N+1)'((MP1 - pow2_mod(W, MP1)) % MP1);

  logic [4*N-1:0] xe;
  logic [N-1:0]   m0, m1, m2, m3;
  logic [N-1:0]   s01, s23, s1, c1;
  logic [N:0]     n1, n3, t01, t23, t3, c3;

  always_comb begin
    xe = (4*N)'($unsigned(x));
    if (W < 4 * N) xe = xe & (((4*N)'(1) << W) - 1);
    m0 = xe[N-1:0];
    m1 = xe[2*N-1:N];
    m2 = xe[3*N-1:2*N];
    m3 = xe[4*N-1:3*N];
    // negation modulo 2^n+1 of an n-bit chunk (chunk < 2^n+1)
    n1 = (m1 == '0) ? '0 : (N+1)'(MP1 - m1);
    n3 = (m3 == '0) ? '0 : (N+1)'(MP1 - m3);
    c1 = x[W-1] ? COR1 : '0;
    c3 = x[W-1] ? COR3 : '0;
  end

  // modulo 2^n-1 channel
  ppa_adder #(.N(N), .EAC(1'b1)) u_a01 (.a(m0),  .b(m1),  .s(s01));
  ppa_adder #(.N(N), .EAC(1'b1)) u_a23 (.a(m2),  .b(m3),  .s(s23));
  ppa_adder #(.N(N), .EAC(1'b1)) u_a1  (.a(s01), .b(s23), .s(s1));
  ppa_adder #(.N(N), .EAC(1'b1)) u_c1  (.a(s1),  .b(c1),  .s(r1));

  // modulo 2^n channel
  assign r0 = m0;

  // modulo 2^n+1 channel
  mod_add_p1 #(.N(N)) u_b01 (.a({1'b0, m0}), .b(n1), .s(t01));
  mod_add_p1 #(.N(N)) u_b23 (.a({1'b0, m2}), .b(n3), .s(t23));
  mod_add_p1 #(.N(N)) u_b3  (.a(t01),        .b(t23), .s(t3));
  mod_add_p1 #(.N(N)) u_c3  (.a(t3),         .b(c3),  .s(r3));

  initial begin
    assert (W > 3 * N && W <= 4 * N)
      else $fatal(1, "fwd_conv: W must satisfy 3N < W <= 4N");
  end

endmodule
