// tb_nr_sqrt_select: checks the bit decision of one iteration. For a
// quotient Q reached so far the block is given F = 2Q - Q[0] (the form F
// takes between iterations) and a partial remainder R anywhere in its legal
// range 0..8Q+7; the new bit must be 1 exactly when 4Q+1 <= R, and F and Q
// must advance to 4Q+bit and 2Q+bit. Cases where the original comparison
// alone would set the bit wrongly are counted and must occur.
module tb_nr_sqrt_select;
  localparam int QW = 24, RW = QW + 2;

  logic [RW-1:0] f, r, f_o;
  logic [QW-1:0] q, q_o;
  logic          b;
  int checks = 0, failures = 0, n_fixed = 0, n_one = 0, n_zero = 0;

  nr_sqrt_select #(.QW(QW)) dut (.f_i(f), .r_i(r), .q_i(q), .bit_o(b), .f_o(f_o), .q_o(q_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint qq, ff, rr, trial, exp_b;
    for (int i = 0; i < 50000; i++) begin
      qq = longint'($urandom) & ((longint'(1) << (1 + $urandom_range(0, QW - 2))) - 1);
      ff = 2 * qq - (qq & 1);
      rr = longint'({$urandom, $urandom}) % (8 * qq + 8);
      if (i % 4 == 0) rr = 4 * qq + 1 + longint'($urandom_range(0, 2)) - 1;  // near the trial value
      if (rr < 0) rr = 0;
      q = QW'(qq); f = RW'(ff); r = RW'(rr);
      #1;
      trial = 4 * qq + 1;
      exp_b = (trial <= rr) ? 1 : 0;
      if (((2 * ff + 1) <= rr) && exp_b == 0) n_fixed++;
      if (exp_b == 1) n_one++; else n_zero++;
      checks++;
      if (longint'(b) != exp_b || longint'(f_o) != 4 * qq + exp_b || longint'(q_o) != ((2 * qq + exp_b) & ((longint'(1) << QW) - 1))) begin
        failures++;
        if (failures < 10) $display("FAIL Q=%0d F=%0d R=%0d bit=%0d F'=%0d Q'=%0d", qq, ff, rr, b, f_o, q_o);
      end
    end
    if (n_fixed == 0 || n_one == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage fixed=%0d one=%0d zero=%0d", n_fixed, n_one, n_zero);
    end
    $display("added comparison decided the bit %0d times", n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
