// tb_fp_sqrt_precisions: runs both square-root cores at the three IEEE-754
// precisions the design targets:
//  * half   (5/10):  every one of the 65,536 operands, pipelined core with
//                    NP = 1 (latency 34), resource core latency 23;
//  * single (8/23):  20,000 LFSR operands, NP = 0 (latency 48 and 49);
//  * double (11/52): 20,000 LFSR operands, NP = 0 (latency 107 and 107).
// Each result is compared bit for bit with the truncated square root and
// its latency with the expected value. Resource-core counts are folded into
// the failures only; checks count pipelined results.
module tb_fp_sqrt_precisions;
  logic clk = 0, rst_n = 0;
  logic d_h, d_s, d_d;
  int   c_h, c_s, c_d, f_h, f_s, f_d;

  fp_sqrt_harness #(.EW(5),  .MW(10), .NP(1), .EXHAUSTIVE(1'b1)) u_half
    (.clk, .rst_n, .done_o(d_h), .checks_o(c_h), .failures_o(f_h));
  fp_sqrt_harness #(.EW(8),  .MW(23), .NP(0), .EXHAUSTIVE(1'b0), .NOPS(20000)) u_single
    (.clk, .rst_n, .done_o(d_s), .checks_o(c_s), .failures_o(f_s));
  fp_sqrt_harness #(.EW(11), .MW(52), .NP(0), .EXHAUSTIVE(1'b0), .NOPS(20000)) u_double
    (.clk, .rst_n, .done_o(d_d), .checks_o(c_d), .failures_o(f_d));

  always #5 clk = ~clk;

  initial begin
    int cyc = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!(d_h && d_s && d_d) && cyc < 3_000_000) begin
      @(posedge clk);
      cyc++;
    end
    $display("half: %0d checks %0d failures; single: %0d / %0d; double: %0d / %0d",
             c_h, f_h, c_s, f_s, c_d, f_d);
    $display("TB_RESULT checks=%0d failures=%0d", c_h + c_s + c_d,
             f_h + f_s + f_d + ((d_h && d_s && d_d) ? 0 : 1));
    $finish;
  end
endmodule
