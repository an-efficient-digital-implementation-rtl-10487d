// fp_sqrt_top: the two implementations of the floating-point square-root
// core side by side, each with its own ports.
//
//  * r_*: fp_sqrt_resource, one iteration datapath reused in a loop; small,
//    one result every 2(n+1)+1 cycles, valid/ready handshake on the input.
//  * p_*: fp_sqrt_pipelined, the loop unrolled; one result per cycle after
//    fsqrt_pkg::pipe_latency(MAN_W, NP) cycles, no back-pressure.
//
// Both share the clock, the active-low synchronous reset and the precision
// parameters: EXP_W/MAN_W = 5/10 (half), 8/23 (single, the default) or
// 11/52 (double). NP sets the extra pipelining registers of the pipelined
// core. Placing both variants in one top is this design's own arrangement;
// in use one would normally instantiate only the variant that is needed.
module fp_sqrt_top #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  parameter int unsigned NP    = 0,
  localparam int unsigned W = 1 + EXP_W + MAN_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // resource-optimised core
  input  logic         r_in_valid_i,
  output logic         r_in_ready_o,
  input  logic [W-1:0] r_x_i,
  output logic         r_out_valid_o,
  output logic [W-1:0] r_y_o,
  // performance-optimised core
  input  logic         p_in_valid_i,
  input  logic [W-1:0] p_x_i,
  output logic         p_out_valid_o,
  output logic [W-1:0] p_y_o
);

  fp_sqrt_resource #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_resource (
    .clk,
    .rst_n,
    .in_valid_i  (r_in_valid_i),
    .in_ready_o  (r_in_ready_o),
    .x_i         (r_x_i),
    .out_valid_o (r_out_valid_o),
    .y_o         (r_y_o)
  );

  fp_sqrt_pipelined #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NP(NP)) u_pipelined (
    .clk,
    .rst_n,
    .in_valid_i  (p_in_valid_i),
    .x_i         (p_x_i),
    .out_valid_o (p_out_valid_o),
    .y_o         (p_y_o)
  );

endmodule
