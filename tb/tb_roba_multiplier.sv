// tb_roba_multiplier: end-to-end test of the approximate multiplier with all
// parameters at their defaults (8-bit signed operands, no guard columns,
// correction constant 1).
//
// Every one of the 65536 operand pairs is applied. The output is compared
// with an integer reference model (tb_roba_ref_pkg), and with the exact
// product: the upper byte may differ from floor(A*B / 256) by no more than
// the rounding error bound of the method, |A*B|/9, plus 2 LSBs for the
// dropped columns and the correction constant. The pair 68 x 104 is checked
// in detail: it rounds to 64 and 128 and the approximate product
// 64*104 + 128*68 - 64*128 = 7168 gives upper byte 28, plus 1 correction.
//
// The test counts how often each mechanism of the data path is exercised and
// fails if one never is: negative products, rounding up, rounding down,
// rounding of 3 to 2, operands that are already powers of two (exact
// result), truncated shifts that discard non-zero bits, and a non-zero
// A_r*B_r term removed by the subtractor.
module tb_roba_multiplier;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;

  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;
  int n_neg = 0, n_up = 0, n_down = 0, n_three = 0, n_pow2 = 0, n_trunc = 0, n_sub = 0;

  roba_multiplier dut (.datai_a(a), .datai_b(b), .datao_ab(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        longint sa, sb, ma, mb, exact_hi, got, bound;
        a = N'(i);
        b = N'(j);
        #1;
        sa = longint'($signed(a));
        sb = longint'($signed(b));
        ma = (sa < 0) ? -sa : sa;
        mb = (sb < 0) ? -sb : sb;
        checks++;
        if (longint'(p) != roba_ref(i, j, N, 0, 1, 1'b1)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d -> %0d expected %0d", sa, sb, $signed(p), roba_ref(i, j, N, 0, 1, 1'b1));
        end
        got      = longint'($signed(p));
        exact_hi = (sa * sb) >>> N;
        bound    = (ma * mb) / 9 / (1 << N) + 2;
        checks++;
        if (got - exact_hi > bound || exact_hi - got > bound) begin
          failures++;
          if (failures < 10) $display("FAIL error bound %0d x %0d -> %0d exact %0d", sa, sb, got, exact_hi);
        end
        if ((sa < 0) != (sb < 0) && ma != 0 && mb != 0) n_neg++;
        if (longint'(dut.data_ar) > ma) n_up++;
        if (longint'(dut.data_ar) < ma) n_down++;
        if (ma == 3) n_three++;
        if (longint'(dut.data_ar) == ma && ma != 0) n_pow2++;
        if (((ma * longint'(dut.data_br)) % (1 << N)) != 0) n_trunc++;
        if (dut.data_arxbr != '0) n_sub++;
      end
    end
    a = 8'd68;
    b = 8'd104;
    #1;
    checks++;
    if (dut.data_ar != 9'd64 || dut.data_br != 9'd128 || dut.data_brxa != 9'd34 ||
        dut.data_arxb != 9'd26 || dut.data_arxbr != 9'd32 || p != 8'd29) begin
      failures++;
      $display("FAIL 68 x 104: ar=%0d br=%0d brxa=%0d arxb=%0d arxbr=%0d p=%0d",
               dut.data_ar, dut.data_br, dut.data_brxa, dut.data_arxb, dut.data_arxbr, p);
    end
    $display("mechanism counts:");
    count("negative product", n_neg);
    count("operand rounded up", n_up);
    count("operand rounded down", n_down);
    count("operand 3 rounded to 2", n_three);
    count("operand already a power of 2", n_pow2);
    count("shift discarded low bits", n_trunc);
    count("non-zero A_r*B_r subtracted", n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
