// Self-checking testbench of mux2: every data pair and select value; y must
// equal d[0] when sel is 0 and d[1] when sel is 1. Watchdog included.
module mux2_tb;
  logic [1:0] d;
  logic       sel, y;
  int         checks = 0, failures = 0;

  mux2 dut (.d(d), .sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d} = 3'(v);
      #1;
      checks++;
      if (y != 1'((v >> sel) & 1)) begin
        failures++;
        $display("FAIL d=%b sel=%b y=%b", d, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
