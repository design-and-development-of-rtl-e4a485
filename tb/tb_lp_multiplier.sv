// tb_lp_multiplier: exhaustive end-to-end test of the 4x4 low-precision
// multiplier at its default parameters.
//
// Every one of the 256 operand pairs is applied, one per clock. The product
// is compared with the bit-level reference model in lp_mul_ref_pkg, and
// additionally:
//   * a zero operand must give a zero product;
//   * where the model sees no cell that invents or loses a carry, the product
//     must equal the exact product x * y;
//   * the output must be valid in the same cycle the operands change
//     (combinational, zero cycles of latency).
// Each mechanism of the design must occur at least once over the sweep, or
// it counts as a failure: a cell inventing a carry, a cell losing a carry,
// exact results, over-estimates and under-estimates of the exact product.
// The error statistics of the sweep are printed. Watchdog after 2000 cycles.
module tb_lp_multiplier;
  import lp_mul_ref_pkg::*;

  localparam int unsigned N = 4;
  logic clk = 1'b0;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0;
  int failures = 0;
  int n_invented = 0, n_lost = 0, n_exact = 0, n_over = 0, n_under = 0;
  longint sum_abs_err = 0;
  int max_abs_err = 0;

  lp_multiplier dut (.x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    ref_result_t r;
    int exact, err, abs_err;
    x = '0;
    y = '0;
    for (int vx = 0; vx < (1 << N); vx++) begin
      for (int vy = 0; vy < (1 << N); vy++) begin
        @(negedge clk);
        x = N'(vx);
        y = N'(vy);
        #1;
        r     = approx_mul(N, longint'(vx), longint'(vy));
        exact = vx * vy;
        err   = int'(p) - exact;
        checks++;
        if (longint'(p) != r.product) begin
          failures++;
          $display("FAIL x=%0d y=%0d p=%0d model=%0d (exact %0d)", vx, vy, p, r.product, exact);
        end
        if (vx == 0 || vy == 0) begin
          checks++;
          if (p != 0) begin
            failures++;
            $display("FAIL zero operand x=%0d y=%0d gives p=%0d", vx, vy, p);
          end
        end
        if (r.invented == 0 && r.lost == 0) begin
          checks++;
          if (int'(p) != exact) begin
            failures++;
            $display("FAIL x=%0d y=%0d no carry error but p=%0d != %0d", vx, vy, p, exact);
          end
        end
        n_invented += r.invented;
        n_lost     += r.lost;
        if (err == 0) n_exact++;
        if (err > 0)  n_over++;
        if (err < 0)  n_under++;
        abs_err = (err < 0) ? -err : err;
        sum_abs_err += longint'(abs_err);
        if (abs_err > max_abs_err) max_abs_err = abs_err;
        @(posedge clk);
      end
    end
    expect_count("carry invented by a full adder", n_invented);
    expect_count("carry lost by a full adder", n_lost);
    expect_count("exact product", n_exact);
    expect_count("over-estimated product", n_over);
    expect_count("under-estimated product", n_under);
    $display("sweep: exact=%0d over=%0d under=%0d cells inventing a carry=%0d losing a carry=%0d",
             n_exact, n_over, n_under, n_invented, n_lost);
    $display("error: sum of |err| = %0d over 256 pairs, max |err| = %0d", sum_abs_err, max_abs_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
