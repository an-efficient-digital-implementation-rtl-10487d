// tb_fp_sqrt_resource: checks the resource-optimised floating-point square
// root at single precision. Operands: directed special values, perfect
// squares, subnormals and a stream from a 32-bit LFSR. Each result is
// compared with the reference model (truncated root) and, for normal
// operands, with the real-valued sqrt: the result must satisfy
// y <= sqrt(x) < y + 1 ulp. The latency must be 2*24+1 = 49 cycles and
// in_ready must be low while an operand is in progress.
module tb_fp_sqrt_resource;
  import fsqrt_ref_pkg::*;

  localparam int EW = 8, MW = 23, W = 32, LAT = 49;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [W-1:0] x = '0, y;
  int checks = 0, failures = 0, cycle = 0, n_real = 0;

  fp_sqrt_resource dut (.clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready),
                        .x_i(x), .out_valid_o(out_valid), .y_o(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single-precision normal number to real, exactly
  function automatic real sp2real(logic [31:0] v);
    return $bitstoreal({v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'b0});
  endfunction

  task automatic run(logic [W-1:0] v);
    logic [63:0] ye;
    real         r, lo, hi;
    int          t0;
    while (!in_ready) @(posedge clk);
    in_valid <= 1; x <= v;
    @(posedge clk);
    t0 = cycle;
    in_valid <= 0;
    @(posedge clk);
    if (in_ready) begin failures++; $display("FAIL ready while busy"); end
    while (!out_valid) @(posedge clk);
    ye = fp_sqrt(64'(v), EW, MW);
    checks++;
    if (y != ye[W-1:0] || cycle - t0 != LAT) begin
      failures++;
      $display("FAIL x=%h y=%h exp=%h lat=%0d", v, y, ye[W-1:0], cycle - t0);
    end
    if (!v[31] && v[30:23] != 0 && v[30:23] != 8'hff) begin
      r  = $sqrt(sp2real(v));
      lo = sp2real(y);
      hi = sp2real(y + 1);
      checks++; n_real++;
      if (!(lo <= r && r < hi)) begin
        failures++;
        $display("FAIL real x=%h y=%h sqrt=%g", v, y, r);
      end
    end
  endtask

  initial begin
    logic [31:0] s;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(32'h3f80_0000); run(32'h4080_0000); run(32'h4110_0000);  // 1, 4, 9
    run(32'h4000_0000); run(32'h0000_0001); run(32'h007f_ffff);
    run(32'h7f7f_ffff); run(32'h0080_0000); run(32'h0000_0000);
    run(32'h8000_0000); run(32'h7f80_0000); run(32'hff80_0000);
    run(32'h7fc0_0000); run(32'h7f80_0001); run(32'hbf80_0000);
    s = 32'h1234_5678;
    for (int i = 0; i < 3000; i++) begin
      s = lfsr32(s);
      run(s);
      run({1'b0, s[30:0]});
    end
    if (n_real == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
