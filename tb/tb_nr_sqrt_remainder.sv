// tb_nr_sqrt_remainder: checks the remainder update R' = ((R - F*F[0]) << 2)
// | pair and the unshifted difference, with random R, F and bit pairs where
// F is at most R when F is odd (the remainder never goes negative).
module tb_nr_sqrt_remainder;
  localparam int QW = 24, RW = QW + 2;

  logic [RW-1:0] r, f, diff, r_o;
  logic [1:0]    pair;
  int checks = 0, failures = 0, n_sub = 0, n_keep = 0;

  nr_sqrt_remainder #(.QW(QW)) dut (.r_i(r), .f_i(f), .pair_i(pair), .diff_o(diff), .r_o(r_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint rr, ff, d, e;
    for (int i = 0; i < 50000; i++) begin
      rr = longint'($urandom) & ((longint'(1) << (RW - 1)) - 1);
      ff = longint'($urandom) % (rr + 1);
      pair = 2'($urandom);
      r = RW'(rr); f = RW'(ff);
      #1;
      d = (ff % 2 == 1) ? rr - ff : rr;
      if (ff % 2 == 1) n_sub++; else n_keep++;
      e = ((d * 4) + longint'(pair)) & ((longint'(1) << RW) - 1);
      checks++;
      if (longint'(diff) != d || longint'(r_o) != e) begin
        failures++;
        if (failures < 10) $display("FAIL R=%0d F=%0d pair=%0d diff=%0d R'=%0d", rr, ff, pair, diff, r_o);
      end
    end
    if (n_sub == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
