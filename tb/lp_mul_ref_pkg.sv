// lp_mul_ref_pkg: bit-level reference model of the low-precision array
// multiplier, for testbenches only.
//
// approx_mul() sums the partial product rows of an n x n multiplication one
// row at a time, as a ripple-carry array: the lowest cell of each row and the
// top cell of the first row are exact half adders, every other cell is the
// low-precision full adder, looked up in a hand-written truth table
// (sum = parity, carry = the row's partial product bit). Besides the product
// it returns how many cells invented a carry (a=1, b=0, cin=0) and how many
// lost one (a=0, b=1, cin=1), the two cases where the cell differs from an
// exact full adder.
package lp_mul_ref_pkg;

  // {a, b, cin} -> {carry, sum} of the low-precision full adder.
  localparam logic [1:0] LP_FA_TABLE [8] = '{
    2'b00, 2'b01, 2'b01, 2'b00,   // a = 0
    2'b11, 2'b10, 2'b10, 2'b11    // a = 1
  };

  typedef struct {
    longint unsigned product;
    int              invented;
    int              lost;
  } ref_result_t;

  function automatic ref_result_t approx_mul(int nbits, longint unsigned x, longint unsigned y);
    ref_result_t r;
    bit          part [0:63];  // running partial sum, part[i] has the weight of row j bit i
    bit          nxt  [0:63];
    bit          carry, a, b, s;
    logic [1:0]  fa_out;
    r.product  = 0;
    r.invented = 0;
    r.lost     = 0;
    // Row 0: partial products x_i & y_0; bit 0 is final.
    r.product |= 64'(x[0] & y[0]);
    for (int i = 0; i < nbits; i++) part[i] = (i < nbits - 1) ? (x[i+1] & y[0]) : 1'b0;
    for (int j = 1; j < nbits; j++) begin
      carry = 1'b0;
      for (int i = 0; i < nbits; i++) begin
        a = x[i] & y[j];
        b = part[i];
        if (i == 0) begin
          s     = a ^ b;
          carry = a & b;
        end else if (i == nbits - 1 && j == 1) begin
          s     = a ^ carry;
          carry = a & carry;
        end else begin
          if (a && !b && !carry) r.invented++;
          if (!a && b && carry)  r.lost++;
          fa_out  = LP_FA_TABLE[{a, b, carry}];
          s     = fa_out[0];
          carry = fa_out[1];
        end
        if (i == 0) r.product |= longint'(s) << j;
        else        nxt[i-1] = s;
      end
      nxt[nbits-1] = carry;
      for (int i = 0; i < nbits; i++) part[i] = nxt[i];
    end
    for (int i = 0; i < nbits; i++) r.product |= longint'(part[i]) << (nbits + i);
    return r;
  endfunction

endpackage
