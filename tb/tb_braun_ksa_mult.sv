// tb_braun_ksa_mult: end-to-end self-check of the 4 x 4 Braun multiplier with
// the Kogge-Stone final adder, at its default size.
//
// Pass 1 sweeps the operands like a binary counter on the eight input pins
// (x0 toggling fastest, y3 slowest) with the carry-input pins z at 0, so all
// 256 products x * y are checked. Pass 2 repeats the sweep for the 15 other
// values of z and checks p = x*y + 2 z0 + 4 z1 + 8 z2 + 16 z3. Expected
// values are plain integer arithmetic.
//
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: the final adder producing the top product bit
// (its carry-out), a carry rippling through the whole final adder (every
// propagate term 1), the carry-save array handing non-zero carries to the
// final adder, and the carry-input pins being used.
module tb_braun_ksa_mult;
  localparam int N = 4;
  logic [N-1:0]   x, y, z;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_cout = 0, n_long_carry = 0, n_csa_carry = 0, n_zpins = 0;

  braun_ksa_mult dut (.x(x), .y(y), .z(z), .p(p));

  task automatic apply_and_check();
    int expected;
    logic [N-2:0] prop, gen;
    #1;
    expected = int'(x) * int'(y) + 2 * int'(z[0]) + 4 * int'(z[1])
             + 8 * int'(z[2]) + 16 * int'(z[3]);
    checks++;
    if (p !== 8'(expected)) begin
      failures++;
      $display("FAIL x=%0d y=%0d z=%b: p=%0d expected %0d", x, y, z, p, expected);
    end
    // Mechanism counters, from the operands the final adder sees.
    prop = dut.sum_v ^ dut.carry_v;
    gen  = dut.sum_v & dut.carry_v;
    if (p[2*N-1]) n_cout++;
    if (&prop[N-2:1] && (gen[0] || (prop[0] && z[N-1]))) n_long_carry++;
    if (dut.carry_v != '0) n_csa_carry++;
    if (z != '0) n_zpins++;
  endtask

  initial begin
    z = '0;
    for (int v = 0; v < 256; v++) begin
      {y, x} = 8'(v);
      apply_and_check();
    end
    for (int zv = 1; zv < 16; zv++) begin
      z = 4'(zv);
      for (int v = 0; v < 256; v++) begin
        {y, x} = 8'(v);
        apply_and_check();
      end
    end
    checks += 4;
    if (n_cout == 0)       begin failures++; $display("FAIL final-adder carry-out never set"); end
    if (n_long_carry == 0) begin failures++; $display("FAIL carry never crossed the final adder"); end
    if (n_csa_carry == 0)  begin failures++; $display("FAIL array never passed a carry"); end
    if (n_zpins == 0)      begin failures++; $display("FAIL carry-input pins never used"); end
    $display("mechanisms: cout=%0d long_carry=%0d csa_carry=%0d z_pins=%0d",
             n_cout, n_long_carry, n_csa_carry, n_zpins);
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
