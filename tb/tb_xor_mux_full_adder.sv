// tb_xor_mux_full_adder: exhaustive check of the XOR-MUX full adder.
// All eight input combinations are applied and {cout, sum} is compared with
// the integer sum a + b + cin. Combinational, so outputs are checked one time
// step after each change; a watchdog ends the run if it ever stalls.
module tb_xor_mux_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  xor_mux_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, a, b} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
