// tb_rounding: checks the power-of-two rounding for every 8-bit magnitude on
// both ports, against a search over all powers of two for the nearest one
// (ties to the larger, 3 to 2). Also checks the operand pair 68, 104, which
// rounds to 64 and 128.
module tb_rounding;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N:0]   ar, br;
  int checks = 0, failures = 0;

  rounding #(.N(N)) dut (.datai_a(a), .datai_b(b), .datao_a(ar), .datao_b(br));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      a = N'(v);
      b = N'((1 << N) - 1 - v);
      #1;
      checks++;
      if (longint'(ar) != nearest_pow2(v)) begin
        failures++;
        $display("FAIL a=%0d -> %0d expected %0d", v, ar, nearest_pow2(v));
      end
      checks++;
      if (longint'(br) != nearest_pow2((1 << N) - 1 - v)) begin
        failures++;
        $display("FAIL b=%0d -> %0d", b, br);
      end
    end
    a = 8'd68;
    b = 8'd104;
    #1;
    checks++;
    if (ar != 9'd64 || br != 9'd128) begin
      failures++;
      $display("FAIL 68/104 -> %0d %0d", ar, br);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
