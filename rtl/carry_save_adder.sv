// carry_save_adder: adds the two truncated cross products and the
// truncation-correction constant.
//
// Three words enter: data_a (truncated B_r*A), data_b (truncated A_r*B) and
// the constant roba_pkg::corr_const(K, CORR). One row of XOR-MUX full adders
// reduces them, bit by bit and with no carry rippling, to a sum word and a
// carry word (the carry word weighs one column more). A ripple row of XOR-MUX
// full adders then merges sum and carry into the result.
//
// Interface: data_a, data_b (N+K+1 bits), sum_out (N+K+2 bits, wide enough
// that no carry is lost). Combinational.
//
// The carry-save row followed by a carry-propagate merge built from XOR-MUX
// full adders, and the added correction constant, follow the reference design.
// Feeding the constant in as the third carry-save operand and using a ripple
// merge adder are this implementation's choices.
module carry_save_adder #(
  parameter int unsigned N    = roba_pkg::N_DEFAULT,
  parameter int unsigned K    = 0,
  parameter int unsigned CORR = 1
) (
  input  logic [N+K:0]   data_a,
  input  logic [N+K:0]   data_b,
  output logic [N+K+1:0] sum_out
);

  localparam int unsigned W = N + K + 1;
  localparam logic [W-1:0] CONST_WORD = W'(roba_pkg::corr_const(K, CORR));

  logic [W-1:0] s_row;  // carry-save sum word
  logic [W-1:0] c_row;  // carry-save carry word, weight 2^(i+1)

  for (genvar i = 0; i < W; i++) begin : g_csa
    xor_mux_full_adder u_fa (
      .a   (data_a[i]),
      .b   (data_b[i]),
      .cin (CONST_WORD[i]),
      .sum (s_row[i]),
      .cout(c_row[i])
    );
  end

  logic unused_cout;

  xor_mux_ripple_adder #(.W(W + 1)) u_cpa (
    .a   ({1'b0, s_row}),
    .b   ({c_row, 1'b0}),
    .cin (1'b0),
    .sum (sum_out),
    .cout(unused_cout)
  );

endmodule
