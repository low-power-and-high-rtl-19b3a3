// mod_add_p1: adder modulo 2^n+1.
//
// Residues of 2^n+1 need n+1 bits (0 .. 2^n). The two operands are added as
// plain binary numbers and 2^n+1 is subtracted once when the sum reaches it;
// a single correction suffices because the raw sum is below 2*(2^n+1).
//
// Interface: a, b in 0..2^n; s = |a+b| mod 2^n+1. Purely combinational.
// The need for a modulo 2^n+1 adder comes from the filter's moduli set; the
// normal (not diminished-one) residue encoding and the compare-and-subtract
// structure are this design's choice, made so that all three channels carry
// ordinary binary residues.
module mod_add_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s
);
  localparam logic [N+1:0] MOD = (N+2)'((1 << N) + 1);

  logic [N+1:0] sum;
  logic [N:0]   red;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    red = (N+1)'(sum - MOD);
    s   = (sum >= MOD) ? red : sum[N:0];
  end

endmodule
