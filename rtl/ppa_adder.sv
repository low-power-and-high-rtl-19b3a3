// ppa_adder: Sklansky parallel-prefix adder, modulo 2^n-1 or modulo 2^n.
//
// Bit generate/propagate signals (g = a&b, p = a^b) are combined by a
// Sklansky prefix tree: at level l every bit whose l-th index bit is set
// merges with the last bit of the block below it, so all group carries
// G[i:0] are ready after ceil(log2 N) levels.
//
// EAC = 1 (modulo 2^n-1): the carry out of the top bit is fed back as the
// carry into bit 0 (end-around carry). The fed-back carry is taken as
// G[N-1:0] | P[N-1:0], so a sum equal to 2^n-1 also wraps and the result is
// always the single zero 0 and never the all-ones pattern. The carries are
// then c_i = G[i:0] | P[i:0] & cin, one extra AND-OR level, not a second
// addition pass.
// EAC = 0 (modulo 2^n): carry in is 0 and the carry out is dropped.
//
// Interface: a, b are residues; s is the residue of a+b. For EAC=1 an
// operand may also be all ones (the second code for zero): s is then still
// fully reduced, except when both operands are all ones, where s is the
// all-ones code (congruent to 0). Purely combinational.
// The Sklansky tree and the end-around carry follow the described modulo
// 2^n-1 adder; the single-zero carry rule is this design's choice.
module ppa_adder #(
  parameter int unsigned N   = 8,
  parameter bit          EAC = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] gl [LV+1];
  logic [N-1:0] pl [LV+1];
  logic [N-1:0] p0;
  logic         cin;
  logic [N-2:0] c;   // c[i]: carry out of bit i (the top carry is cin)

  always_comb begin
    p0    = a ^ b;
    gl[0] = a & b;
    pl[0] = p0;
    for (int unsigned l = 0; l < LV; l++) begin
      gl[l+1] = gl[l];
      pl[l+1] = pl[l];
      for (int unsigned i = 0; i < N; i++) begin
        // merge with the top bit j = ((i >> l) << l) - 1 of the block below
        if (((i >> l) & 1) == 1) begin
          gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][((i >> l) << l) - 1]);
          pl[l+1][i] = pl[l][i] & pl[l][((i >> l) << l) - 1];
        end
      end
    end
    cin = EAC ? (gl[LV][N-1] | pl[LV][N-1]) : 1'b0;
    c   = gl[LV][N-2:0] | (pl[LV][N-2:0] & {(N-1){cin}});
    s   = p0 ^ {c, cin};
  end

endmodule
