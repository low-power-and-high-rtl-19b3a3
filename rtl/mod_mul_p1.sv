// mod_mul_p1: multiplier modulo 2^n+1.
//
// The (2n+1)-bit product P = H*2^n + L is reduced with 2^n = -1 (mod 2^n+1):
// |P| = |L - H|, and one addition of 2^n+1 fixes a negative difference. This
// is the same folding rule the forward converter uses for its 2^n+1 channel.
//
// Interface: a, b in 0..2^n; p = |a*b| mod 2^n+1. Purely combinational.
// A modulo 2^n+1 multiplier is required by the moduli set; its internal
// structure (full product, then one fold) is this design's choice.
module mod_mul_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] p
);
  localparam logic signed [N+2:0] MOD = (N+3)'((1 << N) + 1);

  logic [2*N+1:0]      prod;
  logic signed [N+2:0] diff;
  logic [N:0]          fix;

  always_comb begin
    prod = {{(N+1){1'b0}}, a} * {{(N+1){1'b0}}, b};
    // L = prod[N-1:0], H = prod[2N+1:N] (H <= 2^n)
    diff = $signed({3'b000, prod[N-1:0]}) - $signed({1'b0, prod[2*N+1:N]});
    fix  = (N+1)'(diff + MOD);
    p    = (diff < 0) ? fix : diff[N:0];
  end

endmodule
