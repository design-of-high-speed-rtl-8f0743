// ksa_prefix_cell: prefix operator node of the Kogge-Stone adder.
//
// Merges the generate/propagate pair of a high group i:k+1 with that of the
// adjacent low group k:j into the pair of the group i:j:
//   G_i:j = G_i:k+1 or (P_i:k+1 and G_k:j)
//   P_i:j = P_i:k+1 and P_k:j
// With GROUP_P = 0 the cell computes G only (one AND and one OR); the adder
// uses that form where the merged group reaches the carry-in, whose
// propagate term is never needed. With GROUP_P = 1 it also computes P (one
// more AND). Purely combinational, no clock.
//
// Ports: hi, lo input pairs; o merged pair (o.p is 0 when GROUP_P = 0).
module ksa_prefix_cell
  import ksa_pkg::*;
#(
  parameter bit GROUP_P = 1'b1
) (
  input  pg_t hi,
  input  pg_t lo,
  output pg_t o
);

  assign o.g = hi.g | (hi.p & lo.g);
  assign o.p = GROUP_P ? (hi.p & lo.p) : 1'b0;

endmodule
