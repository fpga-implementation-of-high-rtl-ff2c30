// xor_mux_ripple_adder: W-bit carry-propagate adder made of a chain of
// XOR-MUX full adders.
//
// Bit i adds a[i], b[i] and the carry from bit i-1; the carry into bit 0 is
// cin and the carry out of bit W-1 is cout. Each stage's carry path is a
// single 2:1 multiplexer, so the chain delay is about W multiplexers.
// Combinational. Used as the final (merge) adder of the carry-save adder and,
// with an inverted operand, as the subtractor.
module xor_mux_ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    xor_mux_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
