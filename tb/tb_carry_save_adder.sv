// tb_carry_save_adder: checks sum_out = data_a + data_b + constant for every
// pair of 9-bit inputs of the default adder (constant 1) and for random
// inputs of an adder with K = 2, CORR = 1 (constant 1 + 2 = 3).
module tb_carry_save_adder;
  localparam int N = 8;
  logic [N:0]   a0, b0;
  logic [N+1:0] s0;
  logic [N+2:0] a2, b2;
  logic [N+3:0] s2;
  int checks = 0, failures = 0;

  carry_save_adder #(.N(N))                 dut0 (.data_a(a0), .data_b(b0), .sum_out(s0));
  carry_save_adder #(.N(N), .K(2), .CORR(1)) dut2 (.data_a(a2), .data_b(b2), .sum_out(s2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (N + 1)); i++) begin
      for (int j = 0; j < (1 << (N + 1)); j++) begin
        a0 = (N+1)'(i);
        b0 = (N+1)'(j);
        a2 = (N+3)'($urandom);
        b2 = (N+3)'($urandom);
        #1;
        checks++;
        if (int'(s0) != i + j + 1) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", i, j, s0);
        end
        checks++;
        if (int'(s2) != int'(a2) + int'(b2) + 3) begin
          failures++;
          if (failures < 10) $display("FAIL K=2 %0d + %0d -> %0d", a2, b2, s2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
