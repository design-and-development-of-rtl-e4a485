// tb_lp_multiplier_wide: the multiplier at other operand widths.
//
// The array is written for any N >= 2. This bench checks two of them:
//   * N = 2: the array has only half adders, so the product must be exact
//     for all 16 operand pairs;
//   * N = 8: 4000 random operand pairs plus the corner cases (zero, one,
//     all ones) are compared with the bit-level reference model, and a zero
//     operand must give a zero product.
// One operand pair per clock; watchdog after 10000 cycles.
module tb_lp_multiplier_wide;
  import lp_mul_ref_pkg::*;

  logic clk = 1'b0;
  logic [1:0]  x2, y2;
  logic [3:0]  p2;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  int checks = 0;
  int failures = 0;

  lp_multiplier #(.N(2)) dut2 (.x(x2), .y(y2), .p(p2));
  lp_multiplier #(.N(8)) dut8 (.x(x8), .y(y8), .p(p8));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(logic [7:0] vx, logic [7:0] vy);
    ref_result_t r;
    @(negedge clk);
    x8 = vx;
    y8 = vy;
    @(posedge clk);
    r = approx_mul(8, longint'(vx), longint'(vy));
    checks++;
    if (longint'(p8) != r.product) begin
      failures++;
      $display("FAIL N=8 x=%0d y=%0d p=%0d model=%0d", vx, vy, p8, r.product);
    end
    if (vx == 0 || vy == 0) begin
      checks++;
      if (p8 != 0) begin
        failures++;
        $display("FAIL N=8 zero operand x=%0d y=%0d p=%0d", vx, vy, p8);
      end
    end
  endtask

  initial begin
    x2 = '0; y2 = '0; x8 = '0; y8 = '0;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      {x2, y2} = 4'(v);
      @(posedge clk);
      checks++;
      if (int'(p2) != int'(x2) * int'(y2)) begin
        failures++;
        $display("FAIL N=2 x=%0d y=%0d p=%0d", x2, y2, p2);
      end
    end
    foreach (x8[k]) begin
      check8(8'(1 << k), 8'hff);
      check8(8'hff, 8'(1 << k));
    end
    check8(8'h00, 8'hff);
    check8(8'hff, 8'h00);
    check8(8'h01, 8'h01);
    check8(8'hff, 8'hff);
    for (int t = 0; t < 4000; t++) check8(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
