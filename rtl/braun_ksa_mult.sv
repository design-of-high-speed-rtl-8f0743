// braun_ksa_mult: N x N unsigned Braun array multiplier whose last row of
// full adders is replaced by an (N-1)-bit Kogge-Stone adder.
//
// A conventional Braun multiplier forms all N*N partial products with AND
// gates, reduces them in N-1 carry-save rows of full adders, and finishes
// with a row of N-1 full adders in ripple-carry form. That last ripple row
// produces the upper product bits P(N)..P(2N-1) and is the slowest path.
// Here it is replaced by a parallel-prefix (Kogge-Stone) adder, whose carry
// delay grows with log2 of the width instead of linearly. For N = 4 the
// design holds 16 AND gates, 9 full adders and one 3-bit Kogge-Stone adder.
//
// Besides the operands, the block has the four carry-input pins z of the
// original schematic: z[N-2:0] feed the carry inputs of the first adder row,
// z[N-1] the carry-in of the final adder. Tie z to 0 for a plain product:
//   p = x * y + sum_{i<N-1} z[i] 2^(i+1) + z[N-1] 2^N
// which never exceeds 2N bits.
//
// The gate composition, the replaced stage and the pin names x, y, z, p come
// from the original 4 x 4 design. Generalising to N bits, the order in which
// the z pins map onto adder columns and the absence of any register are
// choices of this implementation.
//
// Purely combinational: no clock, no reset, the product is valid one
// propagation delay after the inputs settle.
module braun_ksa_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,   // multiplicand
  input  logic [N-1:0]   y,   // multiplier
  input  logic [N-1:0]   z,   // carry-input pins, 0 for plain multiplication
  output logic [2*N-1:0] p    // product
);

  logic [N-1:0] pp [N];
  logic [N-2:0] sum_v, carry_v;
  logic [N-2:0] s_hi;
  logic         c_hi;

  pp_and_array #(.N(N)) u_pp (
    .x (x),
    .y (y),
    .pp(pp)
  );

  braun_csa_array #(.N(N)) u_csa (
    .pp     (pp),
    .z_row  (z[N-2:0]),
    .p_low  (p[N-1:0]),
    .sum_v  (sum_v),
    .carry_v(carry_v)
  );

  ksa #(.W(N - 1)) u_ksa (
    .a   (sum_v),
    .b   (carry_v),
    .cin (z[N-1]),
    .s   (s_hi),
    .cout(c_hi)
  );

  assign p[2*N-2:N] = s_hi;
  assign p[2*N-1]   = c_hi;

endmodule
