// roba_multiplier: truncated-shifter rounding-based approximate multiplier
// (TS-RoBA), top level.
//
// With A_r and B_r the powers of two nearest |A| and |B|,
//   |A| * |B|  ~  A_r*|B| + B_r*|A| - A_r*B_r,
// which is exact whenever either operand is a power of two and otherwise
// errs by (|A|-A_r)*(|B|-B_r). Every product on the right is a shift, so no
// partial-product array is needed. This design further forms only the upper
// N+K columns of each shift (the truncated shifters), adds a small correction
// constant to offset, on average, the discarded columns, and returns the
// upper N bits of the approximate 2N-bit product.
//
// Data path (instance names as in the reference schematic):
//   c1 sign_detector       |A|, |B|, product sign
//   c2 rounding            A_r, B_r (one-hot)
//   c3 truncated_shifter   B_r * |A|
//   c4 truncated_shifter   A_r * |B|
//   c5 truncated_shifter   A_r * B_r
//   c6 carry_save_adder    c3 + c4 + correction constant
//   c7 subtractor_xor_mux  c6 - c5
//   c8 sign_set            sign applied, guard columns dropped
//
// Interface: datai_a, datai_b (N bits, two's complement when SIGNED = 1,
// otherwise unsigned), datao_ab (N bits, the approximate value of
// (datai_a * datai_b) >> N in the same number format). Purely combinational:
// the result is valid one propagation delay after the inputs, with no clock
// or registers.
//
// The block structure, the rounding equations and the XOR-MUX adders follow
// the reference design. The guard-column count K (default 0), the correction
// constant CORR (default 1) and the SIGNED parameter are this
// implementation's choices, as is the rounding of unsigned values above
// 3*2^(N-2) to 2^N.
module roba_multiplier #(
  parameter int unsigned N      = roba_pkg::N_DEFAULT,
  parameter int unsigned K      = 0,
  parameter int unsigned CORR   = 1,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0] datai_a,
  input  logic [N-1:0] datai_b,
  output logic [N-1:0] datao_ab
);

  logic [N-1:0]   data_a, data_b;     // |A|, |B|
  logic           signo;
  logic [N:0]     data_ar, data_br;   // A_r, B_r (one-hot)
  logic [N+K:0]   data_brxa, data_arxb, data_arxbr;
  logic [N+K+1:0] addero, subo;

  sign_detector #(.N(N), .SIGNED(SIGNED)) c1 (
    .datai_a(datai_a), .datai_b(datai_b),
    .datao_a(data_a),  .datao_b(data_b), .signo(signo)
  );

  rounding #(.N(N)) c2 (
    .datai_a(data_a),  .datai_b(data_b),
    .datao_a(data_ar), .datao_b(data_br)
  );

  truncated_shifter #(.N(N), .K(K)) c3 (
    .datai_a({1'b0, data_a}), .datai_b(data_br), .datao_ab(data_brxa)
  );

  truncated_shifter #(.N(N), .K(K)) c4 (
    .datai_a({1'b0, data_b}), .datai_b(data_ar), .datao_ab(data_arxb)
  );

  truncated_shifter #(.N(N), .K(K)) c5 (
    .datai_a(data_ar), .datai_b(data_br), .datao_ab(data_arxbr)
  );

  carry_save_adder #(.N(N), .K(K), .CORR(CORR)) c6 (
    .data_a(data_brxa), .data_b(data_arxb), .sum_out(addero)
  );

  subtractor_xor_mux #(.N(N), .K(K)) c7 (
    .datai_a(addero), .datai_b(data_arxbr), .datao_ab(subo)
  );

  sign_set #(.N(N), .K(K)) c8 (
    .datai_a(subo), .signi(signo), .datao_a(datao_ab)
  );

endmodule
