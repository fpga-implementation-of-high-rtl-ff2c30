// subtractor_xor_mux: removes the truncated A_r*B_r term from the carry-save
// sum.
//
// datao_ab = datai_a - datai_b. XOR gates with a constant 1 complement the
// (zero-extended) subtrahend and the carry into a ripple of XOR-MUX full
// adders is 1, which adds its two's complement. The borrow out is dropped:
// with the default correction constant the difference is never negative.
//
// Interface: datai_a (N+K+2 bits), datai_b (N+K+1 bits), datao_ab (N+K+2
// bits). Combinational.
//
// Subtraction by XOR inversion feeding XOR-MUX full adders follows the
// reference design; the widths are this implementation's choice.
module subtractor_xor_mux #(
  parameter int unsigned N = roba_pkg::N_DEFAULT,
  parameter int unsigned K = 0
) (
  input  logic [N+K+1:0] datai_a,
  input  logic [N+K:0]   datai_b,
  output logic [N+K+1:0] datao_ab
);

  localparam int unsigned W = N + K + 2;

  logic [W-1:0] b_inv;
  logic         unused_cout;

  assign b_inv = {1'b0, datai_b} ^ {W{1'b1}};

  xor_mux_ripple_adder #(.W(W)) u_rca (
    .a   (datai_a),
    .b   (b_inv),
    .cin (1'b1),
    .sum (datao_ab),
    .cout(unused_cout)
  );

endmodule
