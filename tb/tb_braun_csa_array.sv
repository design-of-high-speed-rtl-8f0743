// tb_braun_csa_array: exhaustive self-check of the 4 x 4 carry-save array.
// Partial products are formed in the testbench itself. For all 256 operand
// pairs and all 8 values of the first-row carry inputs, the array's outputs
// must satisfy
//   x*y + 2*z0 + 4*z1 + 8*z2 == p_low + 16 * (sum_v + carry_v)
// and p_low must equal the low four bits of the left-hand side.
module tb_braun_csa_array;
  localparam int N = 4;
  logic [N-1:0] x, y;
  logic [N-1:0] pp [N];
  logic [N-2:0] z_row, sum_v, carry_v;
  logic [N-1:0] p_low;
  int checks = 0, failures = 0;

  braun_csa_array dut (
    .pp(pp), .z_row(z_row), .p_low(p_low), .sum_v(sum_v), .carry_v(carry_v)
  );

  always_comb
    for (int j = 0; j < N; j++) pp[j] = y[j] ? x : '0;

  initial begin
    for (int v = 0; v < 2048; v++) begin
      int expect_total, got;
      {z_row, x, y} = 11'(v);
      #1;
      expect_total = int'(x) * int'(y) + 2 * int'(z_row[0]) + 4 * int'(z_row[1])
                   + 8 * int'(z_row[2]);
      got = int'(p_low) + 16 * (int'(sum_v) + int'(carry_v));
      checks += 2;
      if (got != expect_total) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%b: %0d != %0d", x, y, z_row, got, expect_total);
      end
      if (p_low !== 4'(expect_total)) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%b: p_low=%b", x, y, z_row, p_low);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
