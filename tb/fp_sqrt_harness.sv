// fp_sqrt_harness: drives one precision of both square-root cores and checks
// them, for tb_fp_sqrt_precisions.
//
// Both cores get the same operand sequence: all 2^W operands in order when
// EXHAUSTIVE is set, otherwise NOPS operands from two 32-bit LFSRs. The
// pipelined core takes one operand per cycle; the resource core takes the
// next operand whenever it is ready. Every result is compared with the
// reference model and its latency with the expected one. done_o rises when
// both cores have finished; checks_o and failures_o hold the counts.
module fp_sqrt_harness
  import fsqrt_pkg::*;
  import fsqrt_ref_pkg::*;
#(
  parameter int EW = 5,
  parameter int MW = 10,
  parameter int NP = 0,
  parameter bit EXHAUSTIVE = 1'b1,
  parameter int NOPS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int W = 1 + EW + MW;
  localparam int LR = int'(resource_latency(MW));
  localparam int LP = int'(pipe_latency(MW, NP));
  localparam longint TOTAL = EXHAUSTIVE ? (longint'(1) << W) : longint'(NOPS);

  logic         r_valid, r_ready, r_ovalid, p_valid, p_ovalid;
  logic [W-1:0] r_x, r_y, p_x, p_y;
  logic [W-1:0] pq[$];
  int           pt[$];
  logic [W-1:0] r_pending;
  int           r_t0, cycle;
  longint       p_i, r_i, r_done;
  logic [31:0]  sp_a, sp_b, sr_a, sr_b;
  logic         p_fin, r_fin;

  fp_sqrt_resource #(.EXP_W(EW), .MAN_W(MW)) u_r (
    .clk, .rst_n, .in_valid_i(r_valid), .in_ready_o(r_ready), .x_i(r_x),
    .out_valid_o(r_ovalid), .y_o(r_y));
  fp_sqrt_pipelined #(.EXP_W(EW), .MAN_W(MW), .NP(NP)) u_p (
    .clk, .rst_n, .in_valid_i(p_valid), .x_i(p_x), .out_valid_o(p_ovalid), .y_o(p_y));

  function automatic logic [W-1:0] gen(longint i, logic [31:0] a, logic [31:0] b);
    if (EXHAUSTIVE) return W'(i);
    return W'({a, b});
  endfunction

  assign done_o = p_fin && r_fin && pq.size() == 0;

  always @(posedge clk) begin
    logic [W-1:0] v;
    logic [63:0]  ye;
    int           t;
    if (!rst_n) begin
      cycle <= 0; p_i <= 0; r_i <= 0; r_done <= 0;
      p_valid <= 0; r_valid <= 0; p_fin <= 0; r_fin <= 0;
      sp_a <= 32'h1357_9BDF; sp_b <= 32'h2468_ACE0; sr_a <= 32'h1357_9BDF; sr_b <= 32'h2468_ACE0;
      checks_o <= 0; failures_o <= 0;
    end else begin
      cycle <= cycle + 1;
      // pipelined core: checks, then a new operand every cycle
      if (p_valid) begin pq.push_back(p_x); pt.push_back(cycle); end
      if (p_ovalid) begin
        v = pq.pop_front(); t = pt.pop_front();
        ye = fp_sqrt(64'(v), EW, MW);
        checks_o <= checks_o + 1;
        if (p_y != ye[W-1:0] || cycle - t != LP) begin
          failures_o <= failures_o + 1;
          $display("FAIL pipelined e%0d/m%0d x=%h y=%h exp=%h lat=%0d", EW, MW, v, p_y, ye[W-1:0], cycle - t);
        end
      end
      if (p_i < TOTAL) begin
        p_x <= gen(p_i, sp_a, sp_b); p_valid <= 1; p_i <= p_i + 1;
        sp_a <= lfsr32(sp_a); sp_b <= lfsr32(lfsr32(sp_b));
      end else begin
        p_valid <= 0; p_fin <= 1;
      end
      // resource core
      if (r_ovalid) begin
        ye = fp_sqrt(64'(r_pending), EW, MW);
        r_done <= r_done + 1;
        if (r_y != ye[W-1:0] || cycle - r_t0 != LR) begin
          failures_o <= failures_o + 1;
          $display("FAIL resource e%0d/m%0d x=%h y=%h exp=%h lat=%0d", EW, MW, r_pending, r_y, ye[W-1:0], cycle - r_t0);
        end
        if (r_done + 1 == TOTAL) r_fin <= 1;
      end
      if (r_valid && r_ready) begin r_pending = r_x; r_t0 = cycle; end
      if (!r_valid || r_ready) begin
        if (r_i < TOTAL) begin
          r_x <= gen(r_i, sr_a, sr_b); r_valid <= 1; r_i <= r_i + 1;
          sr_a <= lfsr32(sr_a); sr_b <= lfsr32(lfsr32(sr_b));
        end else begin
          r_valid <= 0;
        end
      end
    end
  end
endmodule
