// tb_ksa_prefix_cell: exhaustive self-check of the prefix operator node.
// Both versions of the cell (with and without the group propagate) get all
// 16 combinations of the two input pairs. Expected values come from the
// carry rule "the group generates if its high part generates, or its high
// part propagates and its low part generates".
module tb_ksa_prefix_cell;
  import ksa_pkg::*;
  pg_t hi, lo, o_bp, o_g;
  int checks = 0, failures = 0;

  ksa_prefix_cell #(.GROUP_P(1'b1)) dut_bp (.hi(hi), .lo(lo), .o(o_bp));
  ksa_prefix_cell #(.GROUP_P(1'b0)) dut_g  (.hi(hi), .lo(lo), .o(o_g));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      exp_g = hi.g ? 1'b1 : (hi.p ? lo.g : 1'b0);
      exp_p = (hi.p && lo.p);
      #1;
      checks += 3;
      if (o_bp.g !== exp_g) begin failures++; $display("FAIL v=%0d g=%b", v, o_bp.g); end
      if (o_bp.p !== exp_p) begin failures++; $display("FAIL v=%0d p=%b", v, o_bp.p); end
      if (o_g !== '{g: exp_g, p: 1'b0}) begin
        failures++; $display("FAIL v=%0d gray cell %b", v, o_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
