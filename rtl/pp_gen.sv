// pp_gen: partial product generator of an N x N unsigned multiplier.
//
// Forms the N*N partial product bits P[j][i] = x[i] & y[j], one AND gate each.
// Row j holds multiplicand x gated by multiplier bit y[j]; bit i of that row
// carries weight 2^(i+j). The generator is the same for the exact and the
// low-precision multiplier: the approximation lives only in the adders that
// sum these rows.
//
// Interface: x, y are the N-bit operands; pp[j][i] is the partial product of
// x[i] and y[j]. Purely combinational. N defaults to 4 (the 4x4 multiplier).
module pp_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]        x,
  input  logic [N-1:0]        y,
  output logic [N-1:0][N-1:0] pp
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = x & {N{y[j]}};
    end
  end
endmodule
