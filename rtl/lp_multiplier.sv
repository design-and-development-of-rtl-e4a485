// lp_multiplier: N x N unsigned low-precision array multiplier (default 4x4).
//
// Idea: an array multiplier spends most of its logic and delay in the full
// adders that sum the partial products. Here every one of those full adders is
// the low-precision cell (lp_full_adder: exact sum, carry = operand a), so no
// full adder computes a majority function and the array loses its long carry
// chains. The product is approximate; the partial products and the half
// adders are exact.
//
// Structure (ripple-carry array, N-1 accumulation rows):
//   * pp_gen forms P[j][i] = x[i] & y[j].
//   * Row 0 (P[0]) is the starting partial sum; its bit 0 is product bit 0.
//   * Row j (1 <= j <= N-1) adds P[j] to the running partial sum shifted
//     right by one. Cell 0 is a half adder; cells 1..N-2 are low-precision
//     full adders chained through their carries; cell N-1 is a half adder in
//     row 1 (nothing arrives from above there) and a low-precision full adder
//     in later rows, where it also takes the previous row's final carry.
//   * Cell 0's sum of row j is product bit j. After the last row the N sums
//     above bit 0 and the final carry form product bits 2N-1..N.
//   For N=4 this is 4 half adders and 8 low-precision full adders.
//
// Operand order in each full adder: a = the partial product bit of the row
// being added, b = the running partial-sum bit, cin = the carry of the cell to
// the right. Because cout = a, a cell's carry out is its own partial product
// bit. This mapping, the ripple-row array shape and the exact half adders are
// this design's choices; the published design fixes only that the partial
// products stay exact and that the accumulating full adders are the modified
// cell. Any operand that is zero gives a zero product. For N=4, 95 of the 256
// operand pairs give the exact product; the largest error is 160 and the mean
// absolute error 27.4. The error is mostly an over-estimate, because a cell
// whose partial product bit is 1 always passes a carry on.
//
// Interface: x, y are N-bit unsigned operands, p the 2N-bit approximate
// product. Purely combinational: no clock, no reset, zero cycles of latency.
module lp_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  logic [N-1:0][N-1:0] pp;

  // row_in[j]: running partial sum entering row j (already shifted right by
  // one, so its bit i has the weight of P[j][i]). row_in[N] leaves the array.
  logic [N-1:0] row_in  [1:N];
  logic [N-1:0] row_sum [1:N-1];
  logic [N-1:0] row_c   [1:N-1];

  if (N < 2) begin : g_bad_n
    $error("lp_multiplier: N must be at least 2");
  end

  pp_gen #(.N(N)) u_pp (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  assign row_in[1] = {1'b0, pp[0][N-1:1]};

  for (genvar j = 1; j < N; j++) begin : g_row
    half_adder u_ha_lo (
      .a (pp[j][0]),
      .b (row_in[j][0]),
      .s (row_sum[j][0]),
      .c (row_c[j][0])
    );

    for (genvar i = 1; i < N - 1; i++) begin : g_mid
      lp_full_adder u_fa (
        .a     (pp[j][i]),
        .b     (row_in[j][i]),
        .cin   (row_c[j][i-1]),
        .s_mod (row_sum[j][i]),
        .cout  (row_c[j][i])
      );
    end

    if (j == 1) begin : g_msb_ha
      half_adder u_ha_hi (
        .a (pp[j][N-1]),
        .b (row_c[j][N-2]),
        .s (row_sum[j][N-1]),
        .c (row_c[j][N-1])
      );
    end else begin : g_msb_fa
      lp_full_adder u_fa_hi (
        .a     (pp[j][N-1]),
        .b     (row_in[j][N-1]),
        .cin   (row_c[j][N-2]),
        .s_mod (row_sum[j][N-1]),
        .cout  (row_c[j][N-1])
      );
    end

    assign row_in[j+1] = {row_c[j][N-1], row_sum[j][N-1:1]};
  end

  always_comb begin
    p[0] = pp[0][0];
    for (int j = 1; j < N; j++) begin
      p[j] = row_sum[j][0];
    end
    p[2*N-1:N] = row_in[N];
  end
endmodule
