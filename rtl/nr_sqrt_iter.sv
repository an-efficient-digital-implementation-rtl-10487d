// nr_sqrt_iter: resource-optimised non-restoring integer square root.
//
// Computes q = floor(sqrt(d)) and rem = d - q*q for a DW-bit radicand d
// (DW even), with a single nr_sqrt_select / nr_sqrt_remainder datapath that
// is reused once per bit pair of the radicand.
//
// How it works: the radicand is consumed two bits at a time, most
// significant pair first. Each pair takes two clock cycles:
//   SELECT  the quotient bit is decided and F and Q are registered,
//   UPDATE  the partial remainder R is registered and the next pair enters.
// Accepting the operand loads the first pair into R and clears F and Q; this
// set-up takes one cycle.
//
// Interface and timing: start_i is taken while ready_o is high. done_o is a
// one-cycle pulse exactly 2*QW + 1 cycles after the cycle start_i was taken
// (QW = DW/2 root bits), and q_o / rem_o then hold their values until the
// next operand is accepted. ready_o is high again in the cycle of done_o, so
// a new operand can be issued every 2*QW + 1 cycles.
//
// Following the algorithm description: the reuse of one datapath as a loop,
// two cycles per bit pair and the one set-up cycle (latency 2(n+1)+1 for an
// (n+1)-bit root). This design's own choices: the start/ready/done
// handshake and the active-low synchronous reset.
module nr_sqrt_iter
  import fsqrt_pkg::*;
#(
  parameter int unsigned DW = 48,            // radicand width, even
  localparam int unsigned QW = DW / 2,       // root width
  localparam int unsigned RW = QW + 2        // factor / remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [DW-1:0] d_i,
  output logic          ready_o,
  output logic          done_o,
  output logic [QW-1:0] q_o,
  output logic [RW-1:0] rem_o
);

  iter_state_e            state;
  logic [DW-1:0]          d_rest;   // radicand pairs still to come, at the top
  logic [RW-1:0]          f_reg, r_reg;
  logic [QW-1:0]          q_reg;
  logic [$clog2(QW)-1:0]  cnt;

  logic                   sel_bit;
  logic [RW-1:0]          f_next, r_next, r_diff;
  logic [QW-1:0]          q_next;

  nr_sqrt_select #(.QW(QW)) u_select (
    .f_i   (f_reg),
    .r_i   (r_reg),
    .q_i   (q_reg),
    .bit_o (sel_bit),
    .f_o   (f_next),
    .q_o   (q_next)
  );

  nr_sqrt_remainder #(.QW(QW)) u_remainder (
    .r_i    (r_reg),
    .f_i    (f_reg),               // F already updated in SELECT
    .pair_i (d_rest[DW-1 -: 2]),
    .diff_o (r_diff),
    .r_o    (r_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ITER_IDLE;
      done_o <= 1'b0;
      d_rest <= '0;
      f_reg  <= '0;
      r_reg  <= '0;
      q_reg  <= '0;
      cnt    <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        ITER_IDLE: begin
          if (start_i) begin
            d_rest <= d_i << 2;
            r_reg  <= RW'(d_i[DW-1 -: 2]);
            f_reg  <= '0;
            q_reg  <= '0;
            cnt    <= '0;
            state  <= ITER_SELECT;
          end
        end
        ITER_SELECT: begin
          f_reg <= f_next;
          q_reg <= q_next;
          state <= ITER_UPDATE;
        end
        ITER_UPDATE: begin
          if (cnt == ($clog2(QW))'(QW - 1)) begin
            r_reg  <= r_diff;      // final remainder, no pair follows
            done_o <= 1'b1;
            state  <= ITER_IDLE;
          end else begin
            r_reg  <= r_next;
            d_rest <= d_rest << 2;
            cnt    <= cnt + 1'b1;
            state  <= ITER_SELECT;
          end
        end
        default: state <= ITER_IDLE;
      endcase
    end
  end

  assign ready_o = (state == ITER_IDLE);
  assign q_o     = q_reg;
  assign rem_o   = r_reg;

  // the result is only announced when the loop has returned to idle
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done_o |-> state == ITER_IDLE);
  // a one bit is only chosen when its trial value fits in the remainder,
  // so the remainder never goes negative
  a_bit_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               state == ITER_SELECT && sel_bit |-> f_next <= r_reg);
  a_no_negative: assert property (@(posedge clk) disable iff (!rst_n)
                                  state == ITER_UPDATE |-> !(f_reg[0] && f_reg > r_reg));

endmodule
