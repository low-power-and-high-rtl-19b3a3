// mod_mul_2n: shift-and-add multiplier modulo 2^n built from parallel-prefix adders.
//
// Partial product i is the multiplicand shifted left by i bits (bits pushed
// past n-1 are dropped, which is the reduction modulo 2^n), gated by bit i of
// the multiplier. The n partial products are summed by a chain of n-1
// modulo-2^n Sklansky adders (ppa_adder with EAC=0).
//
// Interface: a, b are n-bit residues; p = |a*b| mod 2^n. Purely combinational.
// The use of parallel-prefix adders for the partial products follows the
// described multiplier; the linear adder chain is this design's choice.
module mod_mul_2n #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);
  logic [N-1:0] pp  [N];
  logic [N-1:0] acc [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) pp[i] = b[i] ? (a << i) : '0;
  end

  assign acc[0] = pp[0];
  for (genvar i = 1; i < N; i++) begin : g_add
    ppa_adder #(.N(N), .EAC(1'b0)) u_add (.a(acc[i-1]), .b(pp[i]), .s(acc[i]));
  end
  assign p = acc[N-1];

endmodule
