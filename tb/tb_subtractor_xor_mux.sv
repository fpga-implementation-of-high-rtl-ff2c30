// tb_subtractor_xor_mux: checks datao_ab = datai_a - datai_b (modulo 2^10)
// for every subtrahend against a sweep of minuends, including minuends
// smaller than the subtrahend (wrap-around).
module tb_subtractor_xor_mux;
  localparam int N = 8;
  logic [N+1:0] a, d;
  logic [N:0]   b;
  int checks = 0, failures = 0;

  subtractor_xor_mux #(.N(N)) dut (.datai_a(a), .datai_b(b), .datao_ab(d));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (N + 2)); i += 3) begin
      for (int j = 0; j < (1 << (N + 1)); j++) begin
        a = (N+2)'(i);
        b = (N+1)'(j);
        #1;
        checks++;
        if (int'(d) != ((i - j) & ((1 << (N + 2)) - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d - %0d -> %0d", i, j, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
