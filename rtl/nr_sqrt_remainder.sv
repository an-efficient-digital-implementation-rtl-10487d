// nr_sqrt_remainder: partial-remainder update of one non-restoring iteration.
//
// Given the partial remainder R of this iteration and the new partial factor
// F' from nr_sqrt_select, it forms
//   diff = R - F' * F'[0]        (subtract F' only when the new bit is one)
//   R'   = (diff << 2) | pair    (bring in the next two radicand bits)
// The multiplication by a single bit is an AND gate, so the block is one
// subtractor and wiring. diff_o is the remainder after the last iteration,
// where no further pair follows.
//
// Purely combinational; all values are QW+2 bits wide. The update rule
// follows the algorithm description; the separate diff_o output is this
// design's own addition.
module nr_sqrt_remainder #(
  parameter int unsigned QW = 24,
  localparam int unsigned RW = QW + 2
) (
  input  logic [RW-1:0] r_i,     // partial remainder R
  input  logic [RW-1:0] f_i,     // new partial factor F'
  input  logic [1:0]    pair_i,  // next bit pair of the radicand
  output logic [RW-1:0] diff_o,  // R - F' * F'[0]
  output logic [RW-1:0] r_o      // next partial remainder
);

  always_comb begin
    diff_o = r_i - (f_i & {RW{f_i[0]}});
    r_o    = {diff_o[RW-3:0], pair_i};
  end

endmodule
