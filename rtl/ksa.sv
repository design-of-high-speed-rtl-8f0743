// ksa: W-bit Kogge-Stone parallel-prefix adder with carry-in.
//
// Computes {cout, s} = a + b + cin in three steps:
//   1. pre-processing: for each bit, P_i = a_i xor b_i and G_i = a_i and b_i;
//   2. carry network: ceil(log2(W+1)) levels of prefix cells; at level l every
//      position merges with the position 2^l below it, so after the last level
//      each position holds the generate term of everything below it, i.e. the
//      carry into that bit;
//   3. post-processing: s_i = P_i xor C_i-1, cout = carry out of the top bit.
// The carry-in is treated as position 0 of the prefix network (G = cin,
// P = 0), the bits a_i/b_i sit at positions 1..W. A prefix node whose result
// reaches down to the carry-in computes G only, the others compute G and P.
// For W = 3 this gives exactly 6 XOR, 10 AND and 5 OR gates, the gate budget
// of the 3-bit adder this design follows. Treating the carry-in as an extra
// prefix position is this implementation's reading of that adder.
//
// Purely combinational; delay grows with log2(W).
// Ports: a, b addends (W bits), cin carry in, s sum (W bits), cout carry out.
module ksa
  import ksa_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned L = $clog2(W + 1);  // prefix levels

  logic [W-1:0] p_bit;                // bit propagate, kept for the sum step
  pg_t          pre  [0:W];           // pairs after pre-processing
  pg_t          carry [0:W];          // pairs after the last level

  // Step 1: pre-processing.
  assign pre[0] = '{g: cin, p: 1'b0};
  for (genvar i = 0; i < W; i++) begin : g_pre
    xor2 u_p (.a(a[i]), .b(b[i]), .y(p_bit[i]));
    assign pre[i+1] = '{g: a[i] & b[i], p: p_bit[i]};
  end

  // Step 2: Kogge-Stone carry network.
  // Each level has its own arrays: cur holds its inputs, nxt its outputs.
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    pg_t cur [0:W];
    pg_t nxt [0:W];
    if (l == 0) begin : g_first
      assign cur = pre;
    end else begin : g_chain
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar k = 0; k <= W; k++) begin : g_pos
      if (k < D) begin : g_pass
        assign nxt[k] = cur[k];
      end else begin : g_node
        // Lower neighbour already spans down to the carry-in when k-D < D.
        ksa_prefix_cell #(.GROUP_P(k >= 2 * D)) u_cell (
          .hi(cur[k]),
          .lo(cur[k-D]),
          .o (nxt[k])
        );
      end
    end
  end

  assign carry = g_lvl[L-1].nxt;

  // Step 3: post-processing. carry[i].g is the carry into bit i.
  for (genvar i = 0; i < W; i++) begin : g_sum
    xor2 u_s (.a(p_bit[i]), .b(carry[i].g), .y(s[i]));
  end
  assign cout = carry[W].g;

endmodule
