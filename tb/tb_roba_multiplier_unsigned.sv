// tb_roba_multiplier_unsigned: end-to-end test of the multiplier built for
// unsigned operands (SIGNED = 0), over every 8-bit operand pair.
//
// The output is compared with the integer reference model and with the
// exact upper byte floor(A*B / 256), which it may miss by at most A*B/9
// (the rounding error bound) plus 2 LSBs. Counts, and requires, operands
// that round up to 2^N (values from 192 up), where the rounded value needs
// the extra bit, and the largest products, whose upper byte reaches 254.
module tb_roba_multiplier_unsigned;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;

  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;
  int n_top = 0, n_big = 0;

  roba_multiplier #(.SIGNED(1'b0)) dut (.datai_a(a), .datai_b(b), .datao_ab(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        longint exact_hi, bound;
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (longint'(p) != roba_ref(i, j, N, 0, 1, 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d -> %0d expected %0d", i, j, p, roba_ref(i, j, N, 0, 1, 1'b0));
        end
        exact_hi = (longint'(i) * j) >> N;
        bound    = (longint'(i) * j) / 9 / (1 << N) + 2;
        checks++;
        if (longint'(p) - exact_hi > bound || exact_hi - longint'(p) > bound) begin
          failures++;
          if (failures < 10) $display("FAIL error bound %0d x %0d -> %0d exact %0d", i, j, p, exact_hi);
        end
        if (dut.data_ar[N]) n_top++;
        if (p >= 8'd250) n_big++;
      end
    end
    checks++;
    if (n_top == 0 || n_big == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: top=%0d big=%0d", n_top, n_big);
    end
    $display("operand rounded to 2^N: %0d, output >= 250: %0d", n_top, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
