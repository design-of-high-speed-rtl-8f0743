// tb_ksa: self-check of the Kogge-Stone adder.
// The 3-bit adder (default width) is checked exhaustively: all 128
// combinations of a, b and cin, against integer addition. The worked example
// A = 011, B = 100, cin = 0 must give carry-out 0 and sum 111. A second,
// 8-bit instance (four prefix levels instead of two) gets 2000 random
// operand sets plus the all-propagate cases. The testbench also counts how
// often a carry ran across every bit of the 3-bit adder (all P_i = 1 with
// cin = 1) and fails if that never happened.
module tb_ksa;
  logic [2:0] a3, b3, s3;
  logic       cin3, co3;
  logic [7:0] a8, b8, s8;
  logic       cin8, co8;
  int checks = 0, failures = 0, full_propagate = 0;

  ksa dut3 (.a(a3), .b(b3), .cin(cin3), .s(s3), .cout(co3));
  ksa #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(co8));

  task automatic check3();
    #1;
    checks++;
    if ({co3, s3} !== 4'(int'(a3) + int'(b3) + int'(cin3))) begin
      failures++;
      $display("FAIL W=3 %0d + %0d + %0d -> %b %b", a3, b3, cin3, co3, s3);
    end
    if (((a3 ^ b3) == 3'b111) && cin3) full_propagate++;
  endtask

  task automatic check8();
    #1;
    checks++;
    if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin8))) begin
      failures++;
      $display("FAIL W=8 %0d + %0d + %0d -> %b %b", a8, b8, cin8, co8, s8);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; cin8 = 1'b0;
    // Worked example: 011 + 100 = 0111.
    a3 = 3'b011; b3 = 3'b100; cin3 = 1'b0;
    #1;
    checks++;
    if ({co3, s3} !== 4'b0111) begin
      failures++;
      $display("FAIL example 011+100 -> %b%b", co3, s3);
    end
    for (int v = 0; v < 128; v++) begin
      {cin3, a3, b3} = 7'(v);
      check3();
    end
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v); b8 = ~8'(v); cin8 = 1'b1;
      check8();
    end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); cin8 = 1'($urandom);
      check8();
    end
    checks++;
    if (full_propagate == 0) begin
      failures++;
      $display("FAIL carry never propagated across all bits");
    end
    $display("full-width carry propagation cases: %0d", full_propagate);
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
