// tb_pp_gen: exhaustive check of the 4x4 partial product generator.
//
// For all 256 operand pairs, every bit pp[j][i] must equal x[i] & y[j], and
// the weighted sum of all partial products, sum of pp[j][i] * 2^(i+j), must
// equal the exact product x * y. One operand pair per clock; watchdog after
// 2000 cycles.
module tb_pp_gen;
  localparam int unsigned N = 4;
  logic clk = 1'b0;
  logic [N-1:0] x, y;
  logic [N-1:0][N-1:0] pp;
  int checks = 0;
  int failures = 0;

  pp_gen #(.N(N)) dut (.x(x), .y(y), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int weighted;
    x = '0;
    y = '0;
    for (int vx = 0; vx < (1 << N); vx++) begin
      for (int vy = 0; vy < (1 << N); vy++) begin
        @(negedge clk);
        x = N'(vx);
        y = N'(vy);
        @(posedge clk);
        weighted = 0;
        for (int j = 0; j < N; j++) begin
          for (int i = 0; i < N; i++) begin
            checks++;
            if (pp[j][i] !== 1'(((vx >> i) & (vy >> j)) & 1)) begin
              failures++;
              $display("FAIL x=%0d y=%0d pp[%0d][%0d]=%0b", vx, vy, j, i, pp[j][i]);
            end
            weighted += int'(pp[j][i]) << (i + j);
          end
        end
        checks++;
        if (weighted != vx * vy) begin
          failures++;
          $display("FAIL x=%0d y=%0d weighted sum %0d != %0d", vx, vy, weighted, vx * vy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
