// fp_sqrt_pipelined: performance-optimised IEEE-754 floating-point square
// root with an issue rate of one.
//
// sqrt_exp_unit prepares the result exponent, the operand class and the
// 2(n+1)-bit radicand in front of the pipeline. The radicand enters
// nr_sqrt_pipe, the unrolled non-restoring root, and the exponent, class and
// special result ride alongside it on the pipeline's tag bus, so both halves
// of the result leave the pipeline in the same cycle. The (n+1)-bit root has
// its top bit set, so the result is {0, exponent, root[n-1:0]}; the root is
// truncated. Special operands (zero, infinity, NaN, negatives giving the
// quiet NaN) travel through the same stages.
//
// Interface and timing: an operand is taken in every cycle in_valid_i is
// high; there is no back-pressure. out_valid_o and y_o follow after
// fsqrt_pkg::pipe_latency(MAN_W, NP) cycles: 2(n+1) + n*NP when n+1 is even
// (48 for single precision with NP = 0) and 2(n+1) + 1 + (n+1)*NP when n+1 is
// odd (23 for half, 107 for double precision with NP = 0).
//
// Following the algorithm description: the unrolled pipeline, the parallel
// exponent path, the optional pipelining stages and the latency formulas.
// This design's own choices: valid-only flow control, the truncation and the
// handling of special operands, as in fp_sqrt_resource.
module fp_sqrt_pipelined
  import fsqrt_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  parameter int unsigned NP    = 0,    // extra pipelining registers per iteration boundary
  localparam int unsigned W  = 1 + EXP_W + MAN_W,
  localparam int unsigned DW = 2 * (MAN_W + 1),
  localparam int unsigned QW = MAN_W + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid_i,
  input  logic [W-1:0] x_i,
  output logic         out_valid_o,
  output logic [W-1:0] y_o
);

  typedef struct packed {
    logic             special;   // use special_val instead of the root
    logic [W-1:0]     special_val;
    logic [EXP_W-1:0] exp;
  } tag_t;

  logic [DW-1:0]    radicand;
  logic [EXP_W-1:0] res_exp;
  fp_class_e        op_class;
  logic [W-1:0]     special;
  tag_t             tag_in, tag_out;
  logic [QW-1:0]    root;
  logic [QW+1:0]    rem_unused;

  sqrt_exp_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_exp (
    .x_i        (x_i),
    .radicand_o (radicand),
    .res_exp_o  (res_exp),
    .class_o    (op_class),
    .special_o  (special)
  );

  always_comb begin
    tag_in.special     = (op_class != FP_FINITE);
    tag_in.special_val = special;
    tag_in.exp         = res_exp;
  end

  nr_sqrt_pipe #(.DW(DW), .NP(NP), .TW($bits(tag_t))) u_root (
    .clk,
    .rst_n,
    .valid_i (in_valid_i),
    .d_i     (radicand),
    .tag_i   (tag_in),
    .valid_o (out_valid_o),
    .q_o     (root),
    .rem_o   (rem_unused),
    .tag_o   (tag_out)
  );

  assign y_o = tag_out.special ? tag_out.special_val
                               : {1'b0, tag_out.exp, root[MAN_W-1:0]};

  a_root_normalised: assert property (@(posedge clk) disable iff (!rst_n)
                                      out_valid_o && !tag_out.special |-> root[QW-1]);

endmodule
