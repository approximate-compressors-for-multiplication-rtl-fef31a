// Self-checking testbench of full_adder: all eight input triples, {cout,sum}
// compared with the arithmetic sum a + b + c. Watchdog included.
module full_adder_tb;
  logic a, b, c, sum, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> cout=%b sum=%b", a, b, c, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
