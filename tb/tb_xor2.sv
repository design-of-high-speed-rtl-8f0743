// tb_xor2: exhaustive self-check of the two-input XOR gate.
// Applies all four input pairs and compares y with the truth table written
// out below. A watchdog ends the run if the stimulus ever stalls.
module tb_xor2;
  logic a, b, y;
  int checks = 0, failures = 0;
  // Expected output for {a,b} = 00, 01, 10, 11.
  localparam logic [3:0] TRUTH = 4'b0110;

  xor2 dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, TRUTH[v]);
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
