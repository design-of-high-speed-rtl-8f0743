// braun_csa_array: carry-save full-adder array of an N x N Braun multiplier.
//
// Rows 1 .. N-1 each hold N-1 full adders (9 for N = 4). Row j adds the
// partial products of multiplier bit j to the sum and carry bits of the row
// above, without rippling carries sideways: each adder's carry goes straight
// down to the next row, its sum diagonally down-right. The rightmost sum of
// each row is a finished product bit, so the array delivers p_low = P0..P(N-1)
// (P0 is the single AND a0 b0). What is left after the last row is a sum
// vector and a carry vector of equal weight, which a final adder (a
// Kogge-Stone adder in this design) merges into P(N)..P(2N-1).
//
// The adders of row 1 have a carry input that is unused in a plain multiplier;
// it is brought out as z_row (tie to 0 for A x B; a 1 on z_row[i] adds
// 2^(i+1) to the product).
//
// Weights: sum_v[k] and carry_v[k] both have weight 2^(N+k), so
//   x*y + sum(z_row[i] 2^(i+1)) = p_low + ((sum_v + carry_v) << N).
// Two outputs are plain wires from an input, by the structure of the array:
// p_low[0] is the partial product a0 b0, and the top bit of sum_v is a3 b3
// (a(N-1) b(N-1)), which no adder row touches.
// Purely combinational, no clock.
module braun_csa_array #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] pp [N],      // pp[j][i] = x[i] & y[j]
  input  logic [N-2:0] z_row,       // carry inputs of the first adder row
  output logic [N-1:0] p_low,       // product bits P0 .. P(N-1)
  output logic [N-2:0] sum_v,       // to the final adder, operand A
  output logic [N-2:0] carry_v      // to the final adder, operand B
);

  logic [N-2:0] s [1:N-1];          // sum outputs of row j
  logic [N-2:0] c [1:N-1];          // carry outputs of row j

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_fa
      logic fa_a, fa_ci;
      if (j == 1) begin : g_first
        assign fa_a  = pp[0][i+1];
        assign fa_ci = z_row[i];
      end else begin : g_next
        if (i < N - 2) begin : g_diag
          assign fa_a = s[j-1][i+1];
        end else begin : g_edge
          assign fa_a = pp[j-1][N-1];
        end
        assign fa_ci = c[j-1][i];
      end
      full_adder u_fa (
        .a (fa_a),
        .b (pp[j][i]),
        .ci(fa_ci),
        .s (s[j][i]),
        .co(c[j][i])
      );
    end
    assign p_low[j] = s[j][0];
  end
  assign p_low[0] = pp[0][0];

  for (genvar k = 0; k < N - 1; k++) begin : g_out
    if (k < N - 2) begin : g_diag
      assign sum_v[k] = s[N-1][k+1];
    end else begin : g_edge
      assign sum_v[k] = pp[N-1][N-1];
    end
    assign carry_v[k] = c[N-1][k];
  end

endmodule
