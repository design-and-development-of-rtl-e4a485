// half_adder: exact half adder, s = a ^ b, c = a & b.
//
// Used by the array multiplier at the two ends of an accumulation row, where
// only two bits meet and a full adder is not needed. The half adders stay
// exact: only the full adders of the array are replaced by the low-precision
// cell. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
