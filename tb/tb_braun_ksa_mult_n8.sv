// tb_braun_ksa_mult_n8: self-check of the multiplier generalised to 8 x 8
// (7 carry-save rows of 7 full adders and a 7-bit Kogge-Stone adder with
// three prefix levels). Checks the corner operands (0, 1, 255 and powers of
// two) against each other, then 20000 random operand pairs with the
// carry-input pins at 0 and 5000 with random carry-input pins.
module tb_braun_ksa_mult_n8;
  localparam int N = 8;
  logic [N-1:0]   x, y, z;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  logic [N-1:0] corners [12] = '{8'd0, 8'd1, 8'd2, 8'd4, 8'd8, 8'd16, 8'd32,
                                 8'd64, 8'd128, 8'd255, 8'd254, 8'd127};

  braun_ksa_mult #(.N(N)) dut (.x(x), .y(y), .z(z), .p(p));

  task automatic apply_and_check();
    int expected;
    #1;
    expected = int'(x) * int'(y) + int'(z[N-1]) * (1 << N);
    for (int i = 0; i < N - 1; i++) expected += int'(z[i]) * (2 << i);
    checks++;
    if (p !== 16'(expected)) begin
      failures++;
      $display("FAIL x=%0d y=%0d z=%b: p=%0d expected %0d", x, y, z, p, expected);
    end
  endtask

  initial begin
    z = '0;
    foreach (corners[i]) begin
      foreach (corners[j]) begin
        x = corners[i]; y = corners[j];
        apply_and_check();
      end
    end
    for (int n = 0; n < 20000; n++) begin
      x = 8'($urandom); y = 8'($urandom);
      apply_and_check();
    end
    for (int n = 0; n < 5000; n++) begin
      x = 8'($urandom); y = 8'($urandom); z = 8'($urandom);
      apply_and_check();
    end
    x = 8'hFF; y = 8'hFF; z = 8'hFF;
    apply_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
