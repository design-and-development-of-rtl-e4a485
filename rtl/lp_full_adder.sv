// lp_full_adder: low-precision (modified) full adder.
//
// The sum is the exact three-input parity, s_mod = a ^ b ^ cin. The carry is
// not computed from the three inputs at all: it is simply the operand a
// (cout = a). This removes the majority gate of an exact full adder and takes
// the carry input off the carry path, so a carry never ripples through the
// cell. Against an exact adder the carry is wrong in two of the eight input
// cases: a=1,b=0,cin=0 (a carry is invented) and a=0,b=1,cin=1 (a carry is
// lost). The sum output is always exact.
//
// Interface: three single-bit inputs, two single-bit outputs. Purely
// combinational, no clock or reset. cout is a plain wire from a: that is the
// approximation itself, not an unfinished output.
//
// The logic (two cascaded XOR gates for the sum, a wire from a to cout) and the
// truth table follow the published modified full adder exactly; nothing here
// is a local choice.
module lp_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s_mod,
  output logic cout
);
  logic ab_x;

  always_comb begin
    ab_x  = a ^ b;
    s_mod = ab_x ^ cin;
    cout  = a;
  end
endmodule
