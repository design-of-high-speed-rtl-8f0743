// tb_pp_and_array: exhaustive self-check of the 4 x 4 partial-product array.
// For all 256 operand pairs every partial product pp[j][i] must be 1 exactly
// when bit i of x and bit j of y are both 1; the weighted sum of the partial
// products must also equal x * y.
module tb_pp_and_array;
  localparam int N = 4;
  logic [N-1:0] x, y;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_and_array dut (.x(x), .y(y), .pp(pp));

  initial begin
    for (int v = 0; v < 256; v++) begin
      int total;
      {x, y} = 8'(v);
      #1;
      total = 0;
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (pp[j][i] !== (x[i] && y[j])) begin
            failures++;
            $display("FAIL x=%b y=%b pp[%0d][%0d]=%b", x, y, j, i, pp[j][i]);
          end
          if (pp[j][i]) total += 1 << (i + j);
        end
      end
      checks++;
      if (total != int'(x) * int'(y)) begin
        failures++;
        $display("FAIL x=%0d y=%0d weighted sum %0d", x, y, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
