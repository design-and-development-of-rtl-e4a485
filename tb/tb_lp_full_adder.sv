// tb_lp_full_adder: exhaustive check of the low-precision full adder.
//
// Applies all eight input combinations, one per clock, and compares s_mod and
// cout with a truth table written out by hand (sum = parity of the three
// inputs, carry = a). It also counts the input cases where the approximate
// carry differs from the exact majority carry; there must be exactly two
// (a=1,b=0,cin=0 and a=0,b=1,cin=1). A watchdog ends the run after 1000
// cycles.
module tb_lp_full_adder;
  logic clk = 1'b0;
  logic a, b, cin;
  logic s_mod, cout;
  int   checks = 0;
  int   failures = 0;
  int   carry_diffs = 0;

  // Index is {a, b, cin}.
  localparam logic [7:0] SUM_TABLE  = 8'b1001_0110;
  localparam logic [7:0] COUT_TABLE = 8'b1111_0000;
  localparam logic [7:0] MAJ_TABLE  = 8'b1110_1000;

  lp_full_adder dut (.a(a), .b(b), .cin(cin), .s_mod(s_mod), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a, b, cin} = 3'b000;
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, cin} = 3'(v);
      @(posedge clk);
      checks++;
      if (s_mod !== SUM_TABLE[v]) begin
        failures++;
        $display("FAIL abc=%03b s_mod=%0b expected %0b", 3'(v), s_mod, SUM_TABLE[v]);
      end
      checks++;
      if (cout !== COUT_TABLE[v]) begin
        failures++;
        $display("FAIL abc=%03b cout=%0b expected %0b", 3'(v), cout, COUT_TABLE[v]);
      end
      if (cout != MAJ_TABLE[v]) carry_diffs++;
    end
    checks++;
    if (carry_diffs != 2) begin
      failures++;
      $display("FAIL carry differs from exact carry in %0d cases, expected 2", carry_diffs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
