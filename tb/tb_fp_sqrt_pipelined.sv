// tb_fp_sqrt_pipelined: checks the performance-optimised floating-point
// square root at single precision in two configurations, the default one
// (no extra pipelining registers, latency 48) and NP = 1 (latency
// 48 + 23 = 71). Operands stream in on most cycles from a 32-bit LFSR, with
// special values and subnormals mixed in; results are matched in order with
// the reference model, the latency of every result is measured and runs of
// back-to-back operands (issue rate one) must occur.
module tb_fp_sqrt_pipelined;
  import fsqrt_ref_pkg::*;

  localparam int EW = 8, MW = 23, W = 32, LA = 48, LB = 71;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] x = '0, ya, yb;
  logic va, vb;
  int checks = 0, failures = 0, cycle = 0, n_b2b = 0;
  logic [W-1:0] qa[$], qb[$];
  int           ta[$], tb_[$];

  fp_sqrt_pipelined dut_a (.clk, .rst_n, .in_valid_i(in_valid), .x_i(x),
                           .out_valid_o(va), .y_o(ya));
  fp_sqrt_pipelined #(.NP(1)) dut_b (.clk, .rst_n, .in_valid_i(in_valid), .x_i(x),
                           .out_valid_o(vb), .y_o(yb));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    logic [W-1:0] v;
    logic [63:0]  ye;
    int           t;
    cycle <= cycle + 1;
    if (in_valid) begin
      qa.push_back(x); qb.push_back(x); ta.push_back(cycle); tb_.push_back(cycle);
    end
    if (va && rst_n) begin
      v = qa.pop_front(); t = ta.pop_front();
      ye = fp_sqrt(64'(v), EW, MW);
      checks++;
      if (ya != ye[W-1:0] || cycle - t != LA) begin
        failures++;
        $display("FAIL A x=%h y=%h exp=%h lat=%0d", v, ya, ye[W-1:0], cycle - t);
      end
    end
    if (vb && rst_n) begin
      v = qb.pop_front(); t = tb_.pop_front();
      ye = fp_sqrt(64'(v), EW, MW);
      checks++;
      if (yb != ye[W-1:0] || cycle - t != LB) begin
        failures++;
        $display("FAIL B x=%h y=%h exp=%h lat=%0d", v, yb, ye[W-1:0], cycle - t);
      end
    end
  end

  initial begin
    logic [31:0] s;
    logic prev = 0;
    s = 32'hCAFE_0001;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      if ($urandom_range(0, 4) != 0) begin
        s = lfsr32(s);
        case (i % 9)
          0: x <= {1'b0, 8'h00, s[22:0]};      // subnormal
          1: x <= {s[31], 8'hff, s[22:0]};     // infinity or NaN
          2: x <= {s[31], 31'h0};              // zero
          default: x <= {(i % 3 == 0) & s[31], s[30:0]};
        endcase
        in_valid <= 1;
        if (prev) n_b2b++;
        prev = 1;
      end else begin
        in_valid <= 0;
        prev = 0;
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (LB + 5) @(posedge clk);
    if (qa.size() != 0 || qb.size() != 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL leftover %0d %0d b2b=%0d", qa.size(), qb.size(), n_b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
