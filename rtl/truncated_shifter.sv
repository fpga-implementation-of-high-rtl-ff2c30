// truncated_shifter: multiplies a value by a power of two, forming only the
// upper columns of the product.
//
// datai_b is a one-hot word 2^k (or zero) from the rounding block, so the
// product datai_a * datai_b is datai_a shifted left by k. Instead of a full
// barrel shifter, each kept output column c gathers datai_b[k] & datai_a[c-k]
// over the shifts k that land a bit in that column, ORed together. Columns
// below N-K (the right half of the 2N-bit product when K = 0) are never
// generated, which is what removes the lower half of the shifter.
//
// Interface: datai_a (N+1 bits: |A|, |B| or A_r), datai_b (N+1 bits, one-hot),
// datao_ab = bits 2N down to N-K of the product (N+K+1 bits; the top bit is
// only reached when both inputs are 2^N). Combinational.
//
// Forming only the most significant columns follows the reference design;
// the AND-OR structure and the guard-column parameter K are this
// implementation's choices.
module truncated_shifter #(
  parameter int unsigned N = roba_pkg::N_DEFAULT,
  parameter int unsigned K = 0
) (
  input  logic [N:0]     datai_a,
  input  logic [N:0]     datai_b,
  output logic [N+K:0]   datao_ab
);

  localparam int unsigned LOW = N - K;  // weight of the lowest kept column

  always_comb begin
    for (int j = 0; j <= int'(N + K); j++) begin
      datao_ab[j] = 1'b0;
      for (int k = 0; k <= int'(N); k++) begin
        if (int'(LOW) + j - k >= 0 && int'(LOW) + j - k <= int'(N))
          datao_ab[j] = datao_ab[j] | (datai_b[k] & datai_a[int'(LOW) + j - k]);
      end
    end
  end

endmodule
