// mm_prescaler_tb: self-checking test of the 32/33/47/48 prescaler.
//
// At every end-of-period tick the bench picks a new random band select and
// MOD for the next period. The expected period length comes from a table
// written from the moduli alone: SEL=0/MOD=0 -> 33, SEL=0/MOD=1 -> 32,
// SEL=1/MOD=0 -> 47, SEL=1/MOD=1 -> 48. It also checks that the square-wave
// output fout rises and falls exactly once per period and that the first tick
// comes in the first clock after reset. All four moduli must occur.
module mm_prescaler_tb;
  import divider_pkg::*;
  logic clk = 1'b0;
  logic rst_n, mod, fout, tick, mc;
  band_e sel;
  int checks = 0, failures = 0;
  int seen[4];

  mm_prescaler dut (.clk(clk), .rst_n(rst_n), .sel(sel), .mod(mod),
                    .fout(fout), .tick(tick), .mc(mc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int modulus(input bit s, input bit m);
    case ({s, m})
      2'b00: return 33;
      2'b01: return 32;
      2'b10: return 47;
      default: return 48;
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycle, last_tick, expected, periods, rises, falls;
    bit prev_fout, first;
    rst_n = 1'b0;
    sel = BAND_LOW;
    mod = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    first = 1'b1; prev_fout = fout; periods = 0; rises = 0; falls = 0;
    last_tick = 0; expected = 0;
    for (cycle = 0; periods < 400; cycle++) begin
      // Cycle 0 is the clock in which reset is released.
      if (cycle > 0) @(negedge clk); else #1;
      if (fout && !prev_fout) rises++;
      if (!fout && prev_fout) falls++;
      prev_fout = fout;
      if (tick) begin
        if (first) begin
          check(cycle == 0, "first tick not in first clock after reset");
          first = 1'b0;
        end else begin
          check(cycle - last_tick == expected, "prescaler period length");
          check(rises == 1 && falls == 1, "fout not one square-wave period");
          periods++;
        end
        rises = 0; falls = 0;
        last_tick = cycle;
        sel = band_e'($urandom_range(0, 1));
        mod = 1'($urandom_range(0, 1));
        expected = modulus(sel, mod);
        seen[{sel, mod}]++;
      end
      if (cycle > 30000) break;
    end
    foreach (seen[i]) check(seen[i] > 0, "a modulus never happened");
    $display("periods: /33 %0d, /32 %0d, /47 %0d, /48 %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
