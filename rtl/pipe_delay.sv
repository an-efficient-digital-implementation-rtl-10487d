// pipe_delay: a chain of DEPTH plain registers for a W-bit bus with a valid
// bit. DEPTH = 0 is a wire. Used for the extra pipelining registers between
// the unrolled square-root iterations. Only the valid bits are reset; the
// data bits need no reset because nothing reads them while invalid.
module pipe_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] data_i,
  output logic         valid_o,
  output logic [W-1:0] data_o
);

  if (DEPTH == 0) begin : g_wire
    assign valid_o = valid_i;
    assign data_o  = data_i;
  end else begin : g_regs
    logic         v_q [DEPTH];
    logic [W-1:0] d_q [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) v_q[i] <= 1'b0;
      end else begin
        v_q[0] <= valid_i;
        for (int i = 1; i < DEPTH; i++) v_q[i] <= v_q[i-1];
      end
    end
    always_ff @(posedge clk) begin
      d_q[0] <= data_i;
      for (int i = 1; i < DEPTH; i++) d_q[i] <= d_q[i-1];
    end
    assign valid_o = v_q[DEPTH-1];
    assign data_o  = d_q[DEPTH-1];
  end

endmodule
