// tb_nr_sqrt_pipe: checks the unrolled integer root in two configurations:
//  * the default one, 48-bit radicand (24 root bits, even) and no extra
//    pipelining registers: latency 48;
//  * a 22-bit radicand (11 root bits, odd) with NP = 2: latency
//    2*11 + 1 + 11*2 = 45.
// Operands stream in on most cycles, with random gaps. The tag bus carries
// the issue cycle, so each result's latency is measured; results are matched
// in order against floor(sqrt(d)) and d - q^2. Back-to-back issue (issue
// rate one) must occur.
module tb_nr_sqrt_pipe;
  import fsqrt_pkg::*;
  import fsqrt_ref_pkg::*;

  localparam int DA = 48, QA = 24, LA = 48;
  localparam int DB = 22, QB = 11, NPB = 2, LB = 2 * QB + 1 + QB * NPB;

  logic clk = 0, rst_n = 0, v_in = 0;
  logic [DA-1:0] d_in = '0;
  logic va, vb;
  logic [QA-1:0] qa; logic [QA+1:0] ra; logic [31:0] ta;
  logic [QB-1:0] qb; logic [QB+1:0] rb; logic [31:0] tb_;
  int checks = 0, failures = 0, cycle = 0, n_b2b = 0, n_out = 0;
  logic [DA-1:0] qda[$];
  logic [DB-1:0] qdb[$];

  nr_sqrt_pipe #(.DW(DA), .TW(32)) dut_a (.clk, .rst_n, .valid_i(v_in), .d_i(d_in),
      .tag_i(cycle), .valid_o(va), .q_o(qa), .rem_o(ra), .tag_o(ta));
  nr_sqrt_pipe #(.DW(DB), .NP(NPB), .TW(32)) dut_b (.clk, .rst_n, .valid_i(v_in),
      .d_i(d_in[DB-1:0]), .tag_i(cycle), .valid_o(vb), .q_o(qb), .rem_o(rb), .tag_o(tb_));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if (pipe_latency(QA - 1, 0) != LA || pipe_latency(QB - 1, NPB) != LB) begin
      failures++;
      $display("FAIL latency formula");
    end
  end

  always @(posedge clk) begin
    logic [63:0] qe;
    logic [DA-1:0] dv;
    logic [DB-1:0] dw;
    cycle <= cycle + 1;
    if (va && rst_n) begin
      dv = qda.pop_front();
      qe = isqrt(128'(dv));
      checks++; n_out++;
      if (64'(qa) != qe || 128'(ra) != 128'(dv) - 128'(qe) * 128'(qe) || cycle - ta != LA) begin
        failures++;
        $display("FAIL A d=%h q=%h exp=%h lat=%0d", dv, qa, qe, cycle - ta);
      end
    end
    if (vb && rst_n) begin
      dw = qdb.pop_front();
      qe = isqrt(128'(dw));
      checks++;
      if (64'(qb) != qe || 128'(rb) != 128'(dw) - 128'(qe) * 128'(qe) || cycle - tb_ != LB) begin
        failures++;
        $display("FAIL B d=%h q=%h exp=%h lat=%0d", dw, qb, qe, cycle - tb_);
      end
    end
  end

  initial begin
    logic [DA-1:0] dv;
    logic prev = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      if ($urandom_range(0, 3) != 0) begin
        dv = {$urandom, $urandom};
        if (i % 7 == 0) dv = '0;
        if (i % 7 == 1) begin logic [QA-1:0] r = QA'($urandom); dv = DA'(r) * DA'(r); end
        if (i % 7 == 2) dv = dv >> $urandom_range(0, DA - 1);
        v_in <= 1; d_in <= dv;
        qda.push_back(dv); qdb.push_back(dv[DB-1:0]);
        if (prev) n_b2b++;
        prev = 1;
      end else begin
        v_in <= 0;
        prev = 0;
      end
    end
    @(posedge clk) v_in <= 0;
    repeat (LA + LB + 5) @(posedge clk);
    if (qda.size() != 0 || qdb.size() != 0 || n_b2b == 0 || n_out == 0) begin
      failures++;
      $display("FAIL leftover %0d %0d b2b=%0d", qda.size(), qdb.size(), n_b2b);
    end
    $display("back-to-back issues: %0d", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
