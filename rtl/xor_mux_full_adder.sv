// xor_mux_full_adder: one-bit full adder built from two XOR gates and a 2:1
// multiplexer.
//
// p = a ^ b is formed once. The sum is p ^ cin. The carry comes from a 2:1
// multiplexer selected by p: when a and b differ the carry out equals cin,
// when they agree it equals a (both 0 gives 0, both 1 gives 1). The critical
// path to cout is one XOR plus one multiplexer, and no node sees a
// short-circuit path through a majority gate.
//
// Purely combinational. This cell is the one all adders and the subtractor of
// the multiplier are made of; the structure (two XOR stages for the sum, a mux
// for the carry with input 0 from a and input 1 from cin) follows the
// reference circuit, the use of a continuous assignment per gate is this
// implementation's choice.
module xor_mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = p ? cin : a;

endmodule
