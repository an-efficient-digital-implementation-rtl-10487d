// fp_sqrt_resource: resource-optimised IEEE-754 floating-point square root.
//
// The exponent and the mantissa are handled in parallel. sqrt_exp_unit
// halves the exponent and builds the 2(n+1)-bit radicand in the cycle the
// operand is accepted; the exponent and the operand class are registered
// while nr_sqrt_iter computes the (n+1)-bit integer root of the radicand by
// reusing one iteration datapath. The root's top bit is the hidden one, so
// the result is {0, exponent, root[n-1:0]} without any normalisation step.
// The root is truncated (rounded toward zero), which keeps the error below
// one unit in the last place.
//
// Special operands (zero, infinity, NaN, negative numbers, which return the
// quiet NaN) take the same fixed latency as ordinary ones.
//
// Interface and timing: x_i is taken when in_valid_i and in_ready_o are both
// high. out_valid_o pulses for one cycle 2(n+1)+1 cycles later (49 for
// single precision) and y_o holds the result until the next operand is
// accepted. in_ready_o is low while an operand is in progress.
//
// Following the algorithm description: the parallel exponent and mantissa
// paths, the padding for a full-length root, the loop latency and the quiet
// NaN for negative inputs. This design's own choices: the handshake, the
// truncation of the root, the fixed latency for special operands and the
// results for zero, infinity and NaN inputs.
module fp_sqrt_resource
  import fsqrt_pkg::*;
#(
  parameter int unsigned EXP_W = 8,    // exponent width (5 half, 8 single, 11 double)
  parameter int unsigned MAN_W = 23,   // fraction width (10 half, 23 single, 52 double)
  localparam int unsigned W  = 1 + EXP_W + MAN_W,
  localparam int unsigned DW = 2 * (MAN_W + 1),
  localparam int unsigned QW = MAN_W + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [W-1:0] x_i,
  output logic         out_valid_o,
  output logic [W-1:0] y_o
);

  logic [DW-1:0]    radicand;
  logic [EXP_W-1:0] res_exp;
  fp_class_e        op_class;
  logic [W-1:0]     special;

  sqrt_exp_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_exp (
    .x_i        (x_i),
    .radicand_o (radicand),
    .res_exp_o  (res_exp),
    .class_o    (op_class),
    .special_o  (special)
  );

  logic             accept;
  logic [EXP_W-1:0] exp_q;
  fp_class_e        class_q;
  logic [W-1:0]     special_q;
  logic [QW-1:0]    root;
  logic [QW+1:0]    rem_unused;

  assign accept = in_valid_i && in_ready_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      exp_q     <= '0;
      class_q   <= FP_ZERO;
      special_q <= '0;
    end else if (accept) begin
      exp_q     <= res_exp;
      class_q   <= op_class;
      special_q <= special;
    end
  end

  nr_sqrt_iter #(.DW(DW)) u_root (
    .clk,
    .rst_n,
    .start_i (accept),
    .d_i     (radicand),
    .ready_o (in_ready_o),
    .done_o  (out_valid_o),
    .q_o     (root),
    .rem_o   (rem_unused)
  );

  assign y_o = (class_q != FP_FINITE) ? special_q : {1'b0, exp_q, root[MAN_W-1:0]};

  // the root of a normalised radicand always has its top bit set
  a_root_normalised: assert property (@(posedge clk) disable iff (!rst_n)
                                      out_valid_o && class_q == FP_FINITE |-> root[QW-1]);

endmodule
