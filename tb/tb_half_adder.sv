// tb_half_adder: exhaustive check of the exact half adder against the
// arithmetic sum a + b (s is bit 0, c is bit 1). Watchdog after 1000 cycles.
module tb_half_adder;
  logic clk = 1'b0;
  logic a, b, s, c;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] total;
    {a, b} = 2'b00;
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      @(posedge clk);
      total = 2'(int'(a) + int'(b));
      checks++;
      if ({c, s} !== total) begin
        failures++;
        $display("FAIL a=%0b b=%0b got c,s=%0b%0b expected %02b", a, b, c, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
