// tb_sign_set: checks that sign_set returns the low N bits of its input
// (after dropping K guard columns) unchanged for sign 0 and negated for
// sign 1, with K = 0 and K = 2.
module tb_sign_set;
  localparam int N = 8;
  logic [N+1:0] x0;
  logic [N+3:0] x2;
  logic         s;
  logic [N-1:0] o0, o2;
  int checks = 0, failures = 0;

  sign_set #(.N(N))        dut0 (.datai_a(x0), .signi(s), .datao_a(o0));
  sign_set #(.N(N), .K(2)) dut2 (.datai_a(x2), .signi(s), .datao_a(o2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      for (int sg = 0; sg < 2; sg++) begin
        int e0, e2, r2;
        x0 = (N+2)'(v);
        r2 = int'($urandom_range(3, 0));
        x2 = (N+4)'((v << 2) + r2);
        s  = sg[0];
        e0 = sg ? ((256 - v) & 255) : v;
        #1;
        checks++;
        if (int'(o0) != e0) begin
          failures++;
          $display("FAIL K=0 v=%0d s=%0d -> %0d", v, sg, o0);
        end
        checks++;
        e2 = e0;
        if (int'(o2) != e2) begin
          failures++;
          $display("FAIL K=2 v=%0d s=%0d -> %0d", v, sg, o2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
