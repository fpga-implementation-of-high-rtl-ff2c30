// sign_set: gives the approximate product its sign.
//
// datai_a is the unsigned approximate product in kept columns (K guard
// columns below the output LSB). The guard columns are dropped, the low N
// bits kept, and when signi is 1 the value is negated by XOR-ing it with ones
// and adding 1. The result is the upper N bits of the approximate 2N-bit
// product in two's complement (or unsigned when the multiplier is built
// unsigned, where signi is always 0).
//
// Interface: datai_a (N+K+2 bits), signi, datao_a (N bits). Combinational.
// The two most significant input bits are carry room of the adders and are
// zero for every operand pair, so they are not read; lint reports them as
// unused.
//
// Adjusting the sign at the very end follows the reference design; the
// XOR-and-increment negation is this implementation's choice.
module sign_set #(
  parameter int unsigned N = roba_pkg::N_DEFAULT,
  parameter int unsigned K = 0
) (
  input  logic [N+K+1:0] datai_a,
  input  logic           signi,
  output logic [N-1:0]   datao_a
);

  logic [N-1:0] mag;

  assign mag     = datai_a[N+K-1:K];
  assign datao_a = (mag ^ {N{signi}}) + N'(signi);

endmodule
