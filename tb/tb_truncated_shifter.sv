// tb_truncated_shifter: checks that the truncated shifter returns the upper
// columns of value * 2^k, for every shift k (and a zero shift word) and many
// values, with the default K = 0 and with two guard columns (K = 2).
// Expected: (value << k) >> (N - K), computed with integers.
module tb_truncated_shifter;
  localparam int N = 8;
  logic [N:0]   x, y;
  logic [N:0]   o0;
  logic [N+2:0] o2;
  int checks = 0, failures = 0;

  truncated_shifter #(.N(N))       dut0 (.datai_a(x), .datai_b(y), .datao_ab(o0));
  truncated_shifter #(.N(N), .K(2)) dut2 (.datai_a(x), .datai_b(y), .datao_ab(o2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= (1 << N); v++) begin
      for (int k = -1; k <= N; k++) begin
        longint p;
        x = (N+1)'(v);
        y = (k < 0) ? '0 : (N+1)'(1 << k);
        p = longint'(v) * longint'(y);
        #1;
        checks++;
        if (longint'(o0) != (p >> N)) begin
          failures++;
          if (failures < 10) $display("FAIL K=0 v=%0d k=%0d -> %0d", v, k, o0);
        end
        checks++;
        if (longint'(o2) != (p >> (N - 2))) begin
          failures++;
          if (failures < 10) $display("FAIL K=2 v=%0d k=%0d -> %0d", v, k, o2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
