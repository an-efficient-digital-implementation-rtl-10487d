// tb_sqrt_exp_unit: checks the operand preparation of the square root at
// single precision against the reference model: radicand and result
// exponent for normal and subnormal operands with odd and even exponents,
// and the class and result of zero, infinity, NaN and negative operands.
// Operands come from directed cases and a 32-bit LFSR.
module tb_sqrt_exp_unit;
  import fsqrt_pkg::*;
  import fsqrt_ref_pkg::*;

  localparam int EW = 8, MW = 23, W = 32, DW = 48;

  logic [W-1:0]  x;
  logic [DW-1:0] radicand;
  logic [EW-1:0] res_exp;
  fp_class_e     op_class;
  logic [W-1:0]  special;

  int checks = 0, failures = 0;
  int n_odd = 0, n_even = 0, n_sub = 0, n_special = 0;

  sqrt_exp_unit #(.EXP_W(EW), .MAN_W(MW)) dut (
    .x_i(x), .radicand_o(radicand), .res_exp_o(res_exp),
    .class_o(op_class), .special_o(special)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] v);
    logic [127:0] rad_e;
    int           exp_e;
    bit           sp_e;
    logic [63:0]  sval_e;
    x = v;
    #1;
    prep(64'(v), EW, MW, rad_e, exp_e, sp_e, sval_e);
    checks++;
    if (sp_e) begin
      n_special++;
      if (op_class == FP_FINITE || special != sval_e[W-1:0]) begin
        failures++;
        $display("FAIL special x=%h class=%0d y=%h exp=%h", v, op_class, special, sval_e);
      end
    end else begin
      if (v[W-2 -: EW] == '0) n_sub++;
      if (radicand[DW-1]) n_odd++; else n_even++;
      if (op_class != FP_FINITE || radicand != rad_e[DW-1:0] || 32'(res_exp) != exp_e) begin
        failures++;
        $display("FAIL x=%h rad=%h/%h exp=%0d/%0d", v, radicand, rad_e[DW-1:0], res_exp, exp_e);
      end
    end
  endtask

  initial begin
    logic [31:0] s;
    check(32'h3f80_0000);  // 1.0
    check(32'h4080_0000);  // 4.0
    check(32'h4000_0000);  // 2.0
    check(32'h0000_0001);  // smallest subnormal
    check(32'h007f_ffff);  // largest subnormal
    check(32'h0040_0000);
    check(32'h7f7f_ffff);  // largest normal
    check(32'h0080_0000);  // smallest normal
    check(32'h0000_0000);
    check(32'h8000_0000);
    check(32'h7f80_0000);  // +inf
    check(32'hff80_0000);  // -inf
    check(32'h7fc0_0000);  // qNaN
    check(32'h7f80_0001);  // sNaN
    check(32'hbf80_0000);  // -1.0
    s = 32'hACE1_2345;
    for (int i = 0; i < 20000; i++) begin
      s = lfsr32(s);
      check(s);
      // subnormals and odd/even exponents are exercised on purpose as well
      check({1'b0, 8'h00, s[22:0]});
    end
    if (n_odd == 0 || n_even == 0 || n_sub == 0 || n_special == 0) begin
      failures++;
      $display("FAIL coverage odd=%0d even=%0d sub=%0d special=%0d", n_odd, n_even, n_sub, n_special);
    end
    $display("coverage: odd=%0d even=%0d subnormal=%0d special=%0d", n_odd, n_even, n_sub, n_special);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
