// End-to-end testbench of compressor_top at its default (and only) size.
//
// Phase 1 drives the same pattern into both 8:4 compressors and the same
// pattern into both 9:4 compressors, sweeping all 512 nine-bit patterns
// (the 8:4 pair gets the low eight bits), and checks every output against
// the ones count of its input and the adder and multiplexer versions
// against each other.
// Phase 2 drives the four compressors with independent random patterns to
// check that each output follows only its own input.
// It counts, per compressor, how often each count value 0..8 / 0..9 was
// produced, including the all-ones maximum (4'b1000 and 4'b1001); a value
// never produced counts as a failure. Watchdog included.
module compressor_top_tb;
  import compressor_pkg::*;

  logic [N8-1:0] i84_add, i84_mux;
  logic [N9-1:0] i94_add, i94_mux;
  count_t        x84_add, x84_mux, x94_add, x94_mux;
  int            checks = 0, failures = 0;
  int            hits [4][N9+1];   // hits[compressor][count value]
  int            top;              // largest count of the compressor

  compressor_top dut (.*);

  task automatic check(input logic [1:0] which, input count_t got, input int exp_cnt, input string tag);
    checks++;
    if (int'(got) != exp_cnt) begin
      failures++;
      $display("FAIL %s: got %b expected %0d", tag, got, exp_cnt);
    end else begin
      hits[which][exp_cnt]++;
    end
  endtask

  task automatic check_all();
    #1;
    check(0, x84_add, $countones(i84_add), "8:4 adder");
    check(1, x94_add, $countones(i94_add), "9:4 adder");
    check(2, x84_mux, $countones(i84_mux), "8:4 mux");
    check(3, x94_mux, $countones(i94_mux), "9:4 mux");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits[w, c]) hits[w][c] = 0;

    // phase 1: exhaustive, shared inputs
    for (int v = 0; v < (1 << N9); v++) begin
      i94_add = N9'(v);
      i94_mux = N9'(v);
      i84_add = N8'(v);
      i84_mux = N8'(v);
      check_all();
      checks++;
      if (x84_add != x84_mux || x94_add != x94_mux) begin
        failures++;
        $display("FAIL designs disagree at %b", i94_add);
      end
    end

    // phase 2: independent random inputs
    for (int n = 0; n < 2000; n++) begin
      i84_add = N8'($urandom);
      i94_add = N9'($urandom);
      i84_mux = N8'($urandom);
      i94_mux = N9'($urandom);
      check_all();
    end

    // every count value, the maxima included, must have been produced
    for (int w = 0; w < 4; w++) begin
      top = (w % 2 == 0) ? N8 : N9;
      for (int c = 0; c <= top; c++) begin
        checks++;
        if (hits[w][c] == 0) begin
          failures++;
          $display("FAIL compressor %0d never produced count %0d", w, c);
        end
      end
      $write("compressor %0d, occurrences of count 0..%0d:", w, top);
      for (int c = 0; c <= top; c++) $write(" %0d", hits[w][c]);
      $write("\n");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
