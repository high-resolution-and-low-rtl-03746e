// prescaler_2_3_tb: self-checking test of the 2/3 prescaler.
//
// The mode input mc is randomised every input clock. The reference is the
// rule of the block: the value of mc while fo is high sets the length of that
// output period, 2 clocks for mc = 1 and 3 for mc = 0. The bench measures the
// distance between rising edges of fo, checks that fo is high for exactly one
// clock, and that fo_rise announces every rising edge one clock ahead. Both
// division modes must occur.
module prescaler_2_3_tb;
  logic clk = 1'b0;
  logic rst_n, mc, fo, fo_rise;
  int checks = 0, failures = 0;
  int n_div2 = 0, n_div3 = 0;

  prescaler_2_3 dut (.clk(clk), .rst_n(rst_n), .mc(mc), .fo(fo), .fo_rise(fo_rise));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycle, last_rise, expected_len;
    bit prev_fo, prev_rise, have_rise;
    rst_n = 1'b0;
    mc = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #1;
    prev_fo = fo; prev_rise = fo_rise; have_rise = 1'b0;
    expected_len = 0; last_rise = 0;
    for (cycle = 0; cycle < 4000; cycle++) begin
      @(negedge clk);
      // fo_rise announced the edge seen now?
      check(prev_rise == (fo && !prev_fo), "fo_rise does not predict rising edge of fo");
      check(!(fo && prev_fo), "fo high for two clocks");
      if (fo && !prev_fo) begin
        if (have_rise) begin
          check(cycle - last_rise == expected_len, "output period length");
          if (expected_len == 2) n_div2++; else n_div3++;
        end
        have_rise = 1'b1;
        last_rise = cycle;
      end
      prev_fo = fo;
      prev_rise = fo_rise;
      mc = 1'($urandom_range(0, 1));
      if (fo) expected_len = mc ? 2 : 3;
    end
    check(n_div2 > 0, "divide-by-2 never happened");
    check(n_div3 > 0, "divide-by-3 never happened");
    $display("divide-by-2 periods %0d, divide-by-3 periods %0d", n_div2, n_div3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
