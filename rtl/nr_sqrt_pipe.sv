// nr_sqrt_pipe: performance-optimised non-restoring integer square root.
//
// The loop of nr_sqrt_iter unrolled into a pipeline: every bit pair of the
// radicand has its own nr_sqrt_select and nr_sqrt_remainder, so a new
// radicand can enter on every clock cycle (issue rate one) and a result
// leaves on every clock cycle. q_o = floor(sqrt(d)), rem_o = d - q_o^2.
//
// Stage arrangement, for QW = DW/2 root bits:
//   * when QW is odd, one input register stage comes first;
//   * each iteration has two register stages, one after the bit decision
//     (F, Q) and one after the remainder update (R);
//   * NP extra pipelining registers follow each of the first QW-1
//     iterations (QW even) or each of the QW iterations (QW odd).
// Latency in cycles, from the cycle valid_i is high to the cycle valid_o is
// high: 2*QW + (QW odd) + NB*NP with NB = QW-1 (QW even) or QW (QW odd),
// i.e. fsqrt_pkg::pipe_latency.
//
// A side-band bus tag_i of TW bits travels with each radicand and comes out
// with its result; the floating-point wrapper carries the exponent on it.
// There is no stall: the pipeline moves on every cycle.
//
// Following the algorithm description: one hardware stage per iteration,
// the issue rate of one, optional pipelining stages and the latency
// formulas. This design's own choices: where the stages are cut (two per
// iteration, an input stage for an odd root width) so that the latency
// matches those formulas, and the tag bus.
module nr_sqrt_pipe
  import fsqrt_pkg::*;
#(
  parameter int unsigned DW = 48,          // radicand width, even
  parameter int unsigned NP = 0,           // extra pipelining registers per iteration boundary
  parameter int unsigned TW = 1,           // side-band tag width
  localparam int unsigned QW = DW / 2,
  localparam int unsigned RW = QW + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [DW-1:0] d_i,
  input  logic [TW-1:0] tag_i,
  output logic          valid_o,
  output logic [QW-1:0] q_o,
  output logic [RW-1:0] rem_o,
  output logic [TW-1:0] tag_o
);

  localparam int unsigned NB = pipe_boundaries(QW);

  typedef struct packed {
    logic [TW-1:0] tag;
    logic [DW-1:0] d;
    logic [RW-1:0] f;
    logic [RW-1:0] r;
    logic [QW-1:0] q;
  } stage_t;

  // state entering each iteration, and its valid bit
  stage_t st_in  [QW+1];
  logic   v_in   [QW+1];

  // optional input stage for an odd root width
  stage_t st_first;
  always_comb begin
    st_first     = '0;
    st_first.tag = tag_i;
    st_first.d   = d_i;
    st_first.r   = RW'(d_i[DW-1 -: 2]);
  end

  pipe_delay #(.W($bits(stage_t)), .DEPTH(QW % 2)) u_in_stage (
    .clk, .rst_n,
    .valid_i (valid_i),
    .data_i  (st_first),
    .valid_o (v_in[0]),
    .data_o  (st_in[0])
  );

  for (genvar k = 0; k < QW; k++) begin : g_iter
    stage_t sel_d, sel_q, rem_d, rem_q;
    logic   v_sel_q, v_rem_q;
    logic   bit_k;
    logic [RW-1:0] r_next, r_diff;

    // bit decision
    logic [RW-1:0] f_new;
    logic [QW-1:0] q_new;
    nr_sqrt_select #(.QW(QW)) u_select (
      .f_i   (st_in[k].f),
      .r_i   (st_in[k].r),
      .q_i   (st_in[k].q),
      .bit_o (bit_k),
      .f_o   (f_new),
      .q_o   (q_new)
    );
    // a one bit is only chosen when its trial value fits in the remainder
    a_bit_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                 v_in[k] && bit_k |-> f_new <= st_in[k].r);
    always_comb begin
      sel_d   = st_in[k];
      sel_d.f = f_new;
      sel_d.q = q_new;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) v_sel_q <= 1'b0;
      else        v_sel_q <= v_in[k];
    end
    always_ff @(posedge clk) sel_q <= sel_d;

    // remainder update; the last iteration has no further pair
    logic [1:0] pair_next;
    if (k + 1 < QW) begin : g_pair
      assign pair_next = sel_q.d[DW-3-2*k -: 2];
    end else begin : g_no_pair
      assign pair_next = 2'b00;
    end
    nr_sqrt_remainder #(.QW(QW)) u_remainder (
      .r_i    (sel_q.r),
      .f_i    (sel_q.f),
      .pair_i (pair_next),
      .diff_o (r_diff),
      .r_o    (r_next)
    );
    always_comb begin
      rem_d   = sel_q;
      rem_d.r = (k + 1 < QW) ? r_next : r_diff;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) v_rem_q <= 1'b0;
      else        v_rem_q <= v_sel_q;
    end
    always_ff @(posedge clk) rem_q <= rem_d;

    // extra pipelining registers after this iteration
    pipe_delay #(.W($bits(stage_t)), .DEPTH((k < NB) ? NP : 0)) u_extra (
      .clk, .rst_n,
      .valid_i (v_rem_q),
      .data_i  (rem_q),
      .valid_o (v_in[k+1]),
      .data_o  (st_in[k+1])
    );
  end

  assign valid_o = v_in[QW];
  assign q_o     = st_in[QW].q;
  assign rem_o   = st_in[QW].r;
  assign tag_o   = st_in[QW].tag;

endmodule
