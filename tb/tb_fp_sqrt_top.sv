// tb_fp_sqrt_top: end-to-end test of both square-root cores at the default
// parameters (single precision, no extra pipelining registers).
//
// One LFSR operand stream feeds both cores. The pipelined core takes an
// operand on most cycles; the resource-optimised core is offered operands
// continuously and takes one whenever it is ready, so it is held off by its
// handshake most of the time. Every result of both cores is checked against
// the reference model and its latency (49 and 48 cycles).
//
// Each mechanism of the design is counted and must occur at least once:
// odd and even exponents, subnormal operands, zero, infinity, NaN and
// negative operands, perfect squares, the added comparison overriding the
// original one inside the resource core, the resource core holding off an
// offered operand, and back-to-back operands in the pipelined core.
module tb_fp_sqrt_top;
  import fsqrt_ref_pkg::*;

  localparam int EW = 8, MW = 23, W = 32, LR = 49, LP = 48;

  logic clk = 0, rst_n = 0;
  logic r_valid = 0, r_ready, r_ovalid, p_valid = 0, p_ovalid;
  logic [W-1:0] r_x = '0, r_y, p_x = '0, p_y;
  int checks = 0, failures = 0, cycle = 0;
  logic [W-1:0] pq[$];
  int           pt[$];
  logic [W-1:0] r_pending;
  int           r_t0;

  // mechanism counters
  int n_odd = 0, n_even = 0, n_sub = 0, n_zero = 0, n_inf = 0, n_nan = 0, n_neg = 0;
  int n_square = 0, n_added_cmp = 0, n_held = 0, n_b2b = 0, n_r_done = 0;

  fp_sqrt_top dut (
    .clk, .rst_n,
    .r_in_valid_i(r_valid), .r_in_ready_o(r_ready), .r_x_i(r_x),
    .r_out_valid_o(r_ovalid), .r_y_o(r_y),
    .p_in_valid_i(p_valid), .p_x_i(p_x), .p_out_valid_o(p_ovalid), .p_y_o(p_y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void classify(logic [W-1:0] v);
    if (v[30:23] == 8'hff && v[22:0] != 0) n_nan++;
    else if (v[30:0] == 0) n_zero++;
    else if (v[31]) n_neg++;
    else if (v[30:23] == 8'hff) n_inf++;
    else begin
      if (v[30:23] == 0) n_sub++;
      else if ((int'(v[30:23]) - 127) % 2 == 0) n_even++;
      else n_odd++;
    end
  endfunction

  // operand mix: mostly LFSR values, with directed classes and perfect squares
  function automatic logic [W-1:0] operand(int i, logic [31:0] s);
    logic [11:0] r;
    case (i % 11)
      0: return {1'b0, 8'h00, s[22:0]};
      1: return {s[31], 8'hff, s[5] ? s[22:0] : 23'h0};  // NaN or infinity
      2: return {s[31], 31'h0};
      3: begin  // r*r exactly representable: a perfect square
           r = 12'(s[11:0]) | 12'h800;
           return {1'b0, 8'(127 + 23 - 2 * int'(s[14:12])), 23'(24'(r) * 24'(r) >> 0)};
         end
      4: return {1'b1, s[30:0]};
      default: return {1'b0, s[30:0]};
    endcase
  endfunction

  always @(posedge clk) begin
    logic [W-1:0] v;
    logic [63:0]  ye;
    int           t;
    cycle <= cycle + 1;
    if (rst_n) begin
      if (p_valid) begin pq.push_back(p_x); pt.push_back(cycle); end
      if (r_valid && !r_ready) n_held++;
      if (dut.u_resource.u_root.state == fsqrt_pkg::ITER_SELECT &&
          dut.u_resource.u_root.u_select.first_ok && dut.u_resource.u_root.u_select.second_over)
        n_added_cmp++;
      if (p_ovalid) begin
        v = pq.pop_front(); t = pt.pop_front();
        ye = fp_sqrt(64'(v), EW, MW);
        classify(v);
        checks++;
        if (p_y != ye[W-1:0] || cycle - t != LP) begin
          failures++;
          $display("FAIL pipelined x=%h y=%h exp=%h lat=%0d", v, p_y, ye[W-1:0], cycle - t);
        end
        if (v[31] == 0 && v[30:23] != 8'hff && v[30:23] != 0) begin
          logic [127:0] rad; int eb; bit sp; logic [63:0] sv, q;
          prep(64'(v), EW, MW, rad, eb, sp, sv);
          q = isqrt(rad);
          if (128'(q) * 128'(q) == rad) n_square++;
        end
      end
      if (r_ovalid) begin
        ye = fp_sqrt(64'(r_pending), EW, MW);
        checks++; n_r_done++;
        if (r_y != ye[W-1:0] || cycle - r_t0 != LR) begin
          failures++;
          $display("FAIL resource x=%h y=%h exp=%h lat=%0d", r_pending, r_y, ye[W-1:0], cycle - r_t0);
        end
      end
      if (r_valid && r_ready) begin r_pending = r_x; r_t0 = cycle; end
    end
  end

  initial begin
    logic [31:0] s, s2;
    logic prev = 0;
    int   ri = 0;
    s = 32'h0BAD_F00D; s2 = 32'h7777_1234;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 30000; i++) begin
      @(posedge clk);
      // resource core: a new operand once the previous one was taken
      if (!r_valid || r_ready) begin
        s2 = lfsr32(s2);
        r_x <= operand(ri, s2);
        ri++;
        r_valid <= 1;
      end
      // pipelined core
      if ($urandom_range(0, 5) != 0) begin
        s = lfsr32(s);
        p_x <= operand(i, s);
        p_valid <= 1;
        if (prev) n_b2b++;
        prev = 1;
      end else begin
        p_valid <= 0;
        prev = 0;
      end
    end
    @(posedge clk);
    p_valid <= 0; r_valid <= 0;
    repeat (LR + 5) @(posedge clk);
    $display("mechanisms: odd=%0d even=%0d subnormal=%0d zero=%0d inf=%0d nan=%0d negative=%0d",
             n_odd, n_even, n_sub, n_zero, n_inf, n_nan, n_neg);
    $display("            perfect squares=%0d added comparison=%0d held off=%0d back-to-back=%0d resource results=%0d",
             n_square, n_added_cmp, n_held, n_b2b, n_r_done);
    foreach (pq[k]) begin failures++; break; end
    if (n_odd == 0) begin failures++; $display("FAIL never: odd exponent"); end
    if (n_even == 0) begin failures++; $display("FAIL never: even exponent"); end
    if (n_sub == 0) begin failures++; $display("FAIL never: subnormal"); end
    if (n_zero == 0) begin failures++; $display("FAIL never: zero"); end
    if (n_inf == 0) begin failures++; $display("FAIL never: infinity"); end
    if (n_nan == 0) begin failures++; $display("FAIL never: NaN"); end
    if (n_neg == 0) begin failures++; $display("FAIL never: negative"); end
    if (n_square == 0) begin failures++; $display("FAIL never: perfect square"); end
    if (n_added_cmp == 0) begin failures++; $display("FAIL never: added comparison"); end
    if (n_held == 0) begin failures++; $display("FAIL never: held off"); end
    if (n_b2b == 0) begin failures++; $display("FAIL never: back-to-back"); end
    if (n_r_done == 0) begin failures++; $display("FAIL never: resource result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
