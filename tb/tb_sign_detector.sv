// tb_sign_detector: checks absolute values and product sign of the sign
// detector, in signed mode for every pair of operand values and in unsigned
// mode for a sweep of values. Expected values come from integer arithmetic
// on the operands read as signed numbers.
module tb_sign_detector;
  localparam int N = 8;
  logic [N-1:0] a, b, ma_s, mb_s, ma_u, mb_u;
  logic sg_s, sg_u;
  int checks = 0, failures = 0;

  sign_detector #(.N(N), .SIGNED(1'b1)) dut_s (.datai_a(a), .datai_b(b), .datao_a(ma_s), .datao_b(mb_s), .signo(sg_s));
  sign_detector #(.N(N), .SIGNED(1'b0)) dut_u (.datai_a(a), .datai_b(b), .datao_a(ma_u), .datao_b(mb_u), .signo(sg_u));

  function automatic int absval(logic [N-1:0] v);
    int s = int'($signed(v));
    return (s < 0) ? -s : s;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (int'(ma_s) != absval(a) || int'(mb_s) != absval(b) ||
            sg_s != ((int'($signed(a)) < 0) != (int'($signed(b)) < 0))) begin
          failures++;
          if (failures < 10) $display("FAIL signed a=%0d b=%0d -> %0d %0d %0d", $signed(a), $signed(b), ma_s, mb_s, sg_s);
        end
        checks++;
        if (ma_u != a || mb_u != b || sg_u != 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned a=%0d b=%0d", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
