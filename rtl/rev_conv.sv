// rev_conv: RNS-to-binary reverse converter for the moduli {2^n-1, 2^n, 2^n+1}.
//
// The value X (0 <= X < M = (2^n-1)*2^n*(2^n+1)) is rebuilt in mixed-radix
// form, X = x2 + 2^n*Y with 0 <= Y < 2^(2n)-1, so the low n bits of X are the
// 2^n residue itself. Y is fixed by its residues in the two odd moduli:
//   a = |Y| mod 2^n-1 = |x1 - x2|          (2^n = 1; one end-around-carry
//                                           adder, -x2 is the bitwise NOT)
//   b = |Y| mod 2^n+1 = |x2 - x3|          (2^n = -1)
//   Y = a + (2^n-1)*t,  t = |(b - a) * 2^(n-1)| mod 2^n+1
// where 2^(n-1) is the inverse of 2^n-1 = -2 modulo 2^n+1. No reduction
// modulo the full range M is needed. Finally the signed reading is taken:
// X >= M/2 stands for X - M, so the output covers -M/2 .. M/2-1.
//
// Interface: r1 (mod 2^n-1), r0 (mod 2^n), r3 (mod 2^n+1) with in_valid;
// y is the signed 3n-bit result with out_valid, one clock later (registered
// output, synchronous active-low reset).
// A reverse converter and the signed reading are required by the filter;
// the mixed-radix formulation is this design's choice among the reverse
// conversion methods (Chinese remainder theorem, mixed radix) it could use.
module rev_conv #(
  parameter int unsigned N = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0]          r1,
  input  logic [N-1:0]          r0,
  input  logic [N:0]            r3,
  output logic                  out_valid,
  output logic signed [3*N-1:0] y
);
  localparam int unsigned MP1 = (1 << N) + 1;
  localparam logic [3*N-1:0] MFULL = (3*N)'(((1 << (2*N)) - 1) << N);
  localparam logic [3*N-1:0] HALF  = MFULL >> 1;
  localparam logic [N:0]     INV   = (N+1)'(1 << (N-1));

  logic [N-1:0]   a;
  logic [N:0]     nr3, na, b, d, t;
  logic [2*N-1:0] yy;
  logic [3*N-1:0] xu, xs;

  ppa_adder #(.N(N), .EAC(1'b1)) u_a (.a(r1), .b(~r0), .s(a));

  always_comb begin
    nr3 = (r3 == '0) ? '0 : (N+1)'(MP1 - r3);
    na  = (a  == '0) ? '0 : (N+1)'(MP1 - a);
  end

  mod_add_p1 #(.N(N)) u_b (.a({1'b0, r0}), .b(nr3), .s(b));
  mod_add_p1 #(.N(N)) u_d (.a(b), .b(na), .s(d));
  mod_mul_p1 #(.N(N)) u_t (.a(d), .b(INV), .p(t));

  always_comb begin
    yy = (2*N)'(a) + (2*N)'(t) * (2*N)'((1 << N) - 1);
    xu = {yy, r0};
    xs = (xu >= HALF) ? xu - MFULL : xu;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= $signed(xs);
    end
  end

endmodule
