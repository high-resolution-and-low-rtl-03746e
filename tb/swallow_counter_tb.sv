// swallow_counter_tb: self-checking test of the 6-bit swallow counter.
//
// Ticks arrive at random; loads (ld with tick) are requested at random with
// random swallow values 0..47. The reference is a plain integer model: a load
// sets the count and lowers MOD (or keeps it high for zero), each tick while
// MOD is low counts down and raises MOD on reaching zero. The bench also
// counts, after each load, how many ticks MOD stays low and checks that this
// equals the programmed value when the next load comes late enough.
module swallow_counter_tb;
  logic clk = 1'b0;
  logic rst_n, tick, ld, mod;
  logic [5:0] s_prog, count;
  int checks = 0, failures = 0;
  int n_zero_load = 0, n_swallow_done = 0;

  swallow_counter dut (.clk(clk), .rst_n(rst_n), .tick(tick), .ld(ld), .s_prog(s_prog),
                       .mod(mod), .count(count));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt_ref, loaded_s, low_ticks;
    bit mod_ref;
    rst_n = 1'b0;
    tick = 1'b0; ld = 1'b0; s_prog = '0;
    repeat (2) @(negedge clk);
    check(mod == 1'b1 && count == 0, "reset state");
    rst_n = 1'b1;
    cnt_ref = 0; mod_ref = 1'b1; loaded_s = -1; low_ticks = 0;
    for (int i = 0; i < 20000; i++) begin
      tick   = ($urandom_range(0, 2) == 0);
      ld     = ($urandom_range(0, 69) == 0);
      s_prog = 6'($urandom_range(0, 47));
      if ($urandom_range(0, 9) == 0) s_prog = '0;
      @(negedge clk);
      if (tick && ld) begin
        if (loaded_s >= 0 && loaded_s == low_ticks) n_swallow_done++;
        cnt_ref = int'(s_prog);
        mod_ref = (s_prog == 0);
        if (s_prog == 0) n_zero_load++;
        loaded_s = int'(s_prog);
        low_ticks = 0;
      end else if (tick && !mod_ref) begin
        low_ticks++;
        cnt_ref--;
        if (cnt_ref == 0) begin
          mod_ref = 1'b1;
          check(low_ticks == loaded_s, "MOD low for the programmed number of ticks");
        end
      end
      check(mod == mod_ref, "MOD");
      check(count == 6'(cnt_ref), "count");
    end
    check(n_zero_load > 0, "zero swallow value never loaded");
    check(n_swallow_done > 0, "no complete swallow phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
