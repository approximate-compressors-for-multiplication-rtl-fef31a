// Self-checking testbench of mux4: all 16 data words with all four select
// values; y must be bit sel of d. Watchdog included.
module mux4_tb;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;
  int         checks = 0, failures = 0;

  mux4 dut (.d(d), .sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 16; w++) begin
      for (int s = 0; s < 4; s++) begin
        d   = 4'(w);
        sel = 2'(s);
        #1;
        checks++;
        if (y != 1'((w >> s) & 1)) begin
          failures++;
          $display("FAIL d=%b sel=%0d y=%b", d, sel, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
