// pp_and_array: partial-product generator of an N x N array multiplier.
//
// One two-input AND gate per bit pair: pp[j][i] = x[i] and y[j], the partial
// product of weight 2^(i+j). For N = 4 this is the array of 16 AND gates of
// the Braun multiplier. Purely combinational, no clock.
//
// Ports: x multiplicand (N bits), y multiplier (N bits);
//        pp[j] is row j, the multiplicand gated by multiplier bit j.
module pp_and_array #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] pp [N]
);

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      assign pp[j][i] = x[i] & y[j];
    end
  end

endmodule
