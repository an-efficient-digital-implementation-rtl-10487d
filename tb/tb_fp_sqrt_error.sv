// tb_fp_sqrt_error: error analysis of the pipelined square root over the
// operand range 1e-4 .. 1e4, at half, single and double precision.
//
// Each precision gets a geometric sweep of operands (a fixed factor between
// neighbours) and the results are compared with the double-precision sqrt.
// Expected bounds, all equivalent to "at most one unit in the last place":
//   half   normalised error below 2^-10 (about 0.001)
//   single normalised error below 2^-23 (about 1.19e-7)
//   double normalised error below 2^-52 (about 2.22e-16)
// and the error in ULPs never above 1 and never negative (truncated results).
module tb_fp_sqrt_error;
  logic clk = 0, rst_n = 0;
  logic d_h, d_s, d_d;
  real  n_h, n_s, n_d, u_h, u_s, u_d;
  int   c_h, c_s, c_d, a_h, a_s, a_d;
  int   checks = 0, failures = 0;

  fp_sqrt_error_probe #(.EW(5),  .MW(10), .STEP(1.0005)) u_half
    (.clk, .rst_n, .done_o(d_h), .max_norm_o(n_h), .max_ulp_o(u_h), .count_o(c_h), .above_o(a_h));
  fp_sqrt_error_probe #(.EW(8),  .MW(23), .STEP(1.0001)) u_single
    (.clk, .rst_n, .done_o(d_s), .max_norm_o(n_s), .max_ulp_o(u_s), .count_o(c_s), .above_o(a_s));
  fp_sqrt_error_probe #(.EW(11), .MW(52), .STEP(1.0001)) u_double
    (.clk, .rst_n, .done_o(d_d), .max_norm_o(n_d), .max_ulp_o(u_d), .count_o(c_d), .above_o(a_d));

  always #5 clk = ~clk;

  task automatic expect_le(string what, real v, real lim);
    checks++;
    if (!(v <= lim)) begin
      failures++;
      $display("FAIL %s = %g, limit %g", what, v, lim);
    end
  endtask

  initial begin
    int cyc = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    while (!(d_h && d_s && d_d) && cyc < 1_000_000) begin
      @(posedge clk);
      cyc++;
    end
    $display("half:   %0d operands, max normalised error %g, max %g ULP", c_h, n_h, u_h);
    $display("single: %0d operands, max normalised error %g, max %g ULP", c_s, n_s, u_s);
    $display("double: %0d operands, max normalised error %g, max %g ULP", c_d, n_d, u_d);
    expect_le("half normalised error", n_h, 2.0 ** -10);
    expect_le("single normalised error", n_s, 2.0 ** -23);
    expect_le("double normalised error", n_d, 2.0 ** -52);
    expect_le("half ULP error", u_h, 1.0);
    expect_le("single ULP error", u_s, 1.0);
    expect_le("double ULP error", u_d, 1.0);
    checks++;
    if (a_h + a_s + a_d != 0 || c_h < 10000 || c_s < 10000 || c_d < 10000 || !(d_h && d_s && d_d)) begin
      failures++;
      $display("FAIL results above the root %0d/%0d/%0d or sweep incomplete", a_h, a_s, a_d);
    end
    // the error must be of the size of one ULP, not far below (a sweep that
    // never reaches it would not have exercised the truncation)
    checks++;
    if (u_s < 0.5 || u_h < 0.5) begin
      failures++;
      $display("FAIL error never came near one ULP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
