// fp_sqrt_error_probe: error measurement for one precision of the pipelined
// square root, used by tb_fp_sqrt_error.
//
// Operands sweep geometrically from XMIN to XMAX (each one a fixed factor
// STEP above the previous, converted to the format by truncation). For each
// result y the double-precision sqrt s of the operand is taken as the
// reference and two errors are recorded:
//   normalised error  (s - y) / s
//   relative error    (s - y) / ulp(y), in units of the last place of y
// The maxima are on max_norm_o / max_ulp_o when done_o rises; negative
// errors (a result above the root) are counted in above_o.
module fp_sqrt_error_probe #(
  parameter int  EW   = 8,
  parameter int  MW   = 23,
  parameter real XMIN = 1.0e-4,
  parameter real XMAX = 1.0e4,
  parameter real STEP = 1.001
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output real  max_norm_o,
  output real  max_ulp_o,
  output int   count_o,
  output int   above_o
);
  localparam int W = 1 + EW + MW;
  localparam int BIAS = (1 << (EW - 1)) - 1;

  logic         v_in, v_out;
  logic [W-1:0] x, y;
  logic [W-1:0] q[$];
  real          xr;
  logic         sent_all;

  fp_sqrt_pipelined #(.EXP_W(EW), .MAN_W(MW)) u_dut (
    .clk, .rst_n, .in_valid_i(v_in), .x_i(x), .out_valid_o(v_out), .y_o(y));

  // positive normal real to the format, fraction truncated
  function automatic logic [W-1:0] to_fmt(real r);
    logic [63:0] b;
    b = $realtobits(r);
    return {1'b0, EW'(int'(b[62:52]) - 1023 + BIAS), b[51 -: MW]};
  endfunction

  // positive normal value of the format to real, exactly
  function automatic real to_real(logic [W-1:0] v);
    logic [63:0] b;
    b = {1'b0, 11'(int'(v[W-2 -: EW]) - BIAS + 1023), 52'(v[MW-1:0]) << (52 - MW)};
    return $bitstoreal(b);
  endfunction

  // weight of the last fraction bit of a positive normal value
  function automatic real ulp(logic [W-1:0] v);
    return $bitstoreal({1'b0, 11'(int'(v[W-2 -: EW]) - BIAS + 1023 - MW), 52'b0});
  endfunction

  assign done_o = sent_all && q.size() == 0;

  always @(posedge clk) begin
    logic [W-1:0] xv;
    real          s, h, e, u;
    if (!rst_n) begin
      xr <= XMIN; v_in <= 0; sent_all <= 0;
      max_norm_o <= 0.0; max_ulp_o <= 0.0; count_o <= 0; above_o <= 0;
    end else begin
      if (v_in) q.push_back(x);
      if (v_out) begin
        xv = q.pop_front();
        s  = $sqrt(to_real(xv));
        h  = to_real(y);
        e  = (s - h) / s;
        u  = (s - h) / ulp(y);
        count_o <= count_o + 1;
        if (e < 0.0) above_o <= above_o + 1;
        if (e > max_norm_o) max_norm_o <= e;
        if (u > max_ulp_o) max_ulp_o <= u;
      end
      if (xr <= XMAX) begin
        x <= to_fmt(xr); v_in <= 1; xr <= xr * STEP;
      end else begin
        v_in <= 0; sent_all <= 1;
      end
    end
  end
endmodule
