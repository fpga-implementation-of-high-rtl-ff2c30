// rounding: rounds two unsigned magnitudes to their nearest powers of two.
//
// Each N-bit magnitude M is zero-extended to N+1 bits and mapped to a one-hot
// word Mr of N+1 bits by the rounding equations:
//   Mr[i] = (~M[i] & M[i-1] & M[i-2] | M[i] & ~M[i-1]) & ~|M[top:i+1]  (i >= 3)
//   Mr[2] =  M[2] & ~M[1]                              & ~|M[top:3]
//   Mr[1] =  M[1]                                      & ~|M[top:2]
//   Mr[0] =  M[0]                                      & ~|M[top:1]
// so a value whose leading bits are 1 0 keeps its leading power of two, one
// whose leading bits are 0 1 1 rounds up to the next power, and values exactly
// halfway (3 * 2^(p-2)) round up, except 3 which rounds to 2. Zero gives zero.
//
// The equations are those of the reference design. Applying them on N+1 bits
// (so unsigned magnitudes of 192..255 round to 256 for N = 8) is this
// implementation's choice; for signed operands the extra bit is never set.
//
// Interface: datai_a/datai_b (N bits) in, datao_a/datao_b (N+1 bits, one-hot
// or zero) out. Combinational.
module rounding #(
  parameter int unsigned N = roba_pkg::N_DEFAULT
) (
  input  logic [N-1:0] datai_a,
  input  logic [N-1:0] datai_b,
  output logic [N:0]   datao_a,
  output logic [N:0]   datao_b
);

  function automatic logic [N:0] round_pow2(input logic [N-1:0] mag);
    logic [N+1:0] m;      // zero-extended magnitude plus one zero above
    logic [N+1:0] zabove; // zabove[i]: every bit of m above i is zero
    logic [N:0]   r;
    m = {2'b00, mag};
    zabove[N+1] = 1'b1;
    for (int i = N; i >= 0; i--) zabove[i] = zabove[i+1] & ~m[i+1];
    for (int i = 0; i <= N; i++) begin
      if (i >= 3)
        r[i] = ((~m[i] & m[i-1] & m[i-2]) | (m[i] & ~m[i-1])) & zabove[i];
      else if (i == 2)
        r[i] = m[2] & ~m[1] & zabove[2];
      else
        r[i] = m[i] & zabove[i];
    end
    return r;
  endfunction

  assign datao_a = round_pow2(datai_a);
  assign datao_b = round_pow2(datai_b);

endmodule
