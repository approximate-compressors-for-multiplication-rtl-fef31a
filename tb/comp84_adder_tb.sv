// Self-checking testbench of comp84_adder, the 8:4 compressor.
//
// Applies all 2**8 input patterns, one per nanosecond, and compares the
// 4-bit output with the number of ones in the pattern, counted here with
// $countones. It also checks the all-ones pattern gives the largest count
// (8) and that every count 0..8 is produced. A watchdog ends the run with
// a failure if the sweep does not finish.
module comp84_adder_tb;
  import compressor_pkg::*;

  localparam int unsigned N = 8;

  logic [N-1:0] i;
  count_t       x;
  int           checks   = 0;
  int           failures = 0;
  bit [N:0]     seen     = '0;   // seen[c]: count c was produced

  comp84_adder dut (.i(i), .x(x));

  initial begin
    #100000;
    failures++;
    $display("watchdog: sweep did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      i = N'(v);
      #1;
      checks++;
      if (int'(x) != $countones(i)) begin
        failures++;
        $display("FAIL i=%b x=%b expected %0d", i, x, $countones(i));
      end else begin
        seen[$countones(i)] = 1'b1;
      end
    end
    // all inputs high: the maximum count
    i = '1;
    #1;
    checks++;
    if (x != count_t'(N)) begin
      failures++;
      $display("FAIL all ones: x=%b", x);
    end
    for (int c = 0; c <= N; c++) begin
      checks++;
      if (!seen[c]) begin
        failures++;
        $display("FAIL count %0d never produced", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
