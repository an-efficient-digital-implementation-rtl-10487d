// nr_sqrt_select: quotient-bit decision of one non-restoring iteration.
//
// State of the iteration: quotient Q, partial factor F and partial remainder
// R (R already holds the current bit pair of the radicand). F is kept as
// F = 4*Q' + q, where Q' is the quotient before the last bit q was appended,
// so that F + F[0] = 2*Q and F is exactly the value the remainder update
// subtracts when q = 1.
//
// Two comparators decide the new bit:
//   first  : (F << 1) | 1            <= R   (the original comparison)
//   second : ((F + F[0]) << 1) | 1   >  R   (the added check)
// The bit is one only when the first comparison holds and the second does not.
// The second comparison uses the true trial value 4*Q + 1; without it the
// first one alone under-estimates the trial value by 2 when F[0] = 1 and
// lets the remainder go negative.
// Outputs: Q' = (Q << 1) | bit and F' = ((F + F[0]) << 1) | bit.
//
// Purely combinational. Widths: Q has QW bits, F and R have QW+2 bits, which
// holds every value reached while a QW-bit root is formed.
//
// Following the algorithm description: the F and Q update rules and the two
// nested comparisons. This design's own choice: the first comparison is
// "less than or equal", which makes the result the exact integer square root
// (a strict comparison returns one less for perfect squares).
module nr_sqrt_select #(
  parameter int unsigned QW = 24,          // quotient (root) width
  localparam int unsigned RW = QW + 2      // partial factor / remainder width
) (
  input  logic [RW-1:0] f_i,   // partial factor F
  input  logic [RW-1:0] r_i,   // partial remainder R, current pair included
  input  logic [QW-1:0] q_i,   // quotient so far
  output logic          bit_o, // new quotient bit
  output logic [RW-1:0] f_o,   // next partial factor
  output logic [QW-1:0] q_o    // next quotient
);

  logic [RW-1:0] trial_first;   // (F << 1) | 1
  logic [RW-1:0] trial_second;  // ((F + F[0]) << 1) | 1
  logic [RW-1:0] f_even;        // F + F[0] = 2Q
  logic          first_ok, second_over;

  always_comb begin
    f_even       = f_i + RW'(f_i[0]);
    trial_first  = {f_i[RW-2:0], 1'b1};
    trial_second = {f_even[RW-2:0], 1'b1};
    first_ok     = (trial_first <= r_i);
    second_over  = (trial_second > r_i);
    bit_o        = first_ok && !second_over;
    f_o          = {f_even[RW-2:0], bit_o};
    q_o          = {q_i[QW-2:0], bit_o};
  end

endmodule
