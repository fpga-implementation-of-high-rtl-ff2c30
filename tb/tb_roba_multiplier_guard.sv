// tb_roba_multiplier_guard: end-to-end test of the multiplier built with two
// guard columns (K = 2, CORR = 1), over every signed 8-bit operand pair.
//
// With guard columns the truncated shifters keep two columns below the
// output LSB, the carry-save row adds the correction constant plus half an
// output LSB, and the sign-set stage drops the guard columns, so the result
// is rounded instead of truncated. The output is compared with the integer
// reference model and against the exact upper byte within the method's
// error bound. Counts, and requires, results where the rounding constant
// carries into the kept columns (guard bits of the sum of the cross products
// at 10 or 11 binary).
module tb_roba_multiplier_guard;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;
  localparam int K = 2;

  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;
  int n_round_carry = 0;

  roba_multiplier #(.K(K), .CORR(1)) dut (.datai_a(a), .datai_b(b), .datao_ab(p));

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
        longint sa, sb, exact_hi, got, bound, raw;
        a = N'(i);
        b = N'(j);
        #1;
        sa = longint'($signed(a));
        sb = longint'($signed(b));
        checks++;
        if (longint'(p) != roba_ref(i, j, N, K, 1, 1'b1)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d -> %0d expected %0d", sa, sb, $signed(p), roba_ref(i, j, N, K, 1, 1'b1));
        end
        got      = longint'($signed(p));
        exact_hi = (sa * sb) >>> N;
        bound    = ((sa < 0 ? -sa : sa) * (sb < 0 ? -sb : sb)) / 9 / (1 << N) + 2;
        checks++;
        if (got - exact_hi > bound || exact_hi - got > bound) begin
          failures++;
          if (failures < 10) $display("FAIL error bound %0d x %0d -> %0d exact %0d", sa, sb, got, exact_hi);
        end
        raw = longint'(dut.data_brxa) + longint'(dut.data_arxb) - longint'(dut.data_arxbr);
        if ((raw & 3) >= 2) n_round_carry++;
      end
    end
    checks++;
    if (n_round_carry == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: rounding carry");
    end
    $display("rounding constant carried into the kept columns: %0d", n_round_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
