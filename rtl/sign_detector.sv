// sign_detector: absolute values of the two operands and the product sign.
//
// In signed mode (SIGNED = 1) each N-bit two's-complement operand is made
// positive by XOR-ing it with its sign bit and adding the sign bit back, so
// -2^(N-1) becomes 2^(N-1), which still fits the N-bit unsigned output. The
// product sign signo is the XOR of the two operand signs. In unsigned mode
// the operands are passed on as magnitudes and signo is 0.
//
// Interface: datai_a/datai_b in, datao_a/datao_b (unsigned magnitudes) and
// signo out. Combinational, no latency.
//
// The block's role and port names follow the reference design; choosing the
// mode with a parameter is this implementation's choice.
module sign_detector #(
  parameter int unsigned N      = roba_pkg::N_DEFAULT,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0] datai_a,
  input  logic [N-1:0] datai_b,
  output logic [N-1:0] datao_a,
  output logic [N-1:0] datao_b,
  output logic         signo
);

  logic signo_a, signo_b;

  assign signo_a = SIGNED ? datai_a[N-1] : 1'b0;
  assign signo_b = SIGNED ? datai_b[N-1] : 1'b0;

  assign datao_a = (datai_a ^ {N{signo_a}}) + N'(signo_a);
  assign datao_b = (datai_b ^ {N{signo_b}}) + N'(signo_b);
  assign signo   = signo_a ^ signo_b;

endmodule
