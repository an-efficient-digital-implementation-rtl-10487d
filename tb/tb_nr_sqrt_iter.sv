// tb_nr_sqrt_iter: checks the resource-optimised integer root at its default
// 48-bit radicand: q = floor(sqrt(d)), rem = d - q^2, done exactly
// 2*24+1 = 49 cycles after start, ready low while busy, start ignored while
// busy, and back-to-back operation with a new start in the done cycle.
module tb_nr_sqrt_iter;
  import fsqrt_ref_pkg::*;

  localparam int DW = 48, QW = 24, RW = QW + 2, LAT = 2 * QW + 1;

  logic          clk = 0, rst_n = 0, start = 0, ready, done;
  logic [DW-1:0] d = '0;
  logic [QW-1:0] q;
  logic [RW-1:0] rem;
  int checks = 0, failures = 0, cycle = 0, n_busy_start = 0, n_b2b = 0;

  nr_sqrt_iter #(.DW(DW)) dut (.clk, .rst_n, .start_i(start), .d_i(d), .ready_o(ready),
                               .done_o(done), .q_o(q), .rem_o(rem));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pick(int i);
    logic [DW-1:0] v;
    v = {$urandom, $urandom};
    case (i % 8)
      0: v = '0;
      1: v = '1;
      2: begin logic [QW-1:0] r = QW'($urandom); v = DW'(r) * DW'(r); end    // perfect square
      3: begin logic [QW-1:0] r = QW'($urandom); v = DW'(r) * DW'(r) - 1; end
      4: v = v >> $urandom_range(0, DW - 1);
      default: ;
    endcase
    return v;
  endfunction

  initial begin
    logic [DW-1:0] dv;
    logic [63:0]   qe;
    int            t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      dv = pick(i);
      while (!ready) @(posedge clk);
      start <= 1; d <= dv;
      @(posedge clk);
      t0 = cycle;          // start taken at this edge
      start <= 0;
      // a start while busy must be ignored
      if (i % 5 == 0) begin
        start <= 1; d <= '1; n_busy_start++;
        @(posedge clk);
        start <= 0;
      end
      while (!done) begin
        @(posedge clk);
        if (ready && !done) begin failures++; $display("FAIL ready while busy"); end
      end
      checks++;
      qe = isqrt(128'(dv));
      if (cycle - t0 != LAT) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cycle - t0, LAT);
      end
      checks++;
      if (64'(q) != qe || 128'(rem) != 128'(dv) - 128'(qe) * 128'(qe)) begin
        failures++;
        $display("FAIL d=%h q=%h exp %h rem=%h", dv, q, qe, rem);
      end
      // back-to-back: issue the next one in the done cycle on odd i
      if (i % 2 == 1) n_b2b++; else @(posedge clk);
    end
    if (n_busy_start == 0 || n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
