// band_channels_tb: channel sweep of the multiband divider over its three bands.
//
// With a 1 MHz reference, a synthesizer output of f MHz needs a division
// ratio of N = f. The bench programs every 1 MHz channel of the three bands
//   2410..2483 MHz (SEL = 0, N = 32*P + S: P = N / 32, S = N mod 32)
//   5140..5300 MHz and 5715..5815 MHz (SEL = 1, N = 48*P - S:
//                    P = ceil(N / 48), S = 48*P - N)
// plus a coarse sweep of the whole programmable range 992..6096, and
// measures one frame of the divider per channel, which must last N input
// clocks. A new programming is applied right after a frame_tick, so the very
// next frame must already be exact.
module band_channels_tb;
  import divider_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  band_e sel;
  logic [6:0] p_prog;
  logic [5:0] s_prog;
  logic fout, frame_tick, pre_out, pre_tick, mod;
  int checks = 0, failures = 0;

  multiband_divider dut (.clk(clk), .rst_n(rst_n), .sel(sel), .p_prog(p_prog), .s_prog(s_prog),
                         .fout(fout), .frame_tick(frame_tick), .pre_out(pre_out),
                         .pre_tick(pre_tick), .mod(mod));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (sel=%0d P=%0d S=%0d)", what, $time, sel, p_prog, s_prog);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Program the divider for ratio n and wait for the frame_tick that ends
  // the next frame; return its length.
  task automatic run_channel(input int n, input bit high_band);
    int p, s, len;
    if (high_band) begin
      p = (n + 47) / 48;
      s = 48 * p - n;
    end else begin
      p = n / 32;
      s = n % 32;
    end
    // Wait for the end of the current frame, then program.
    do @(negedge clk); while (!frame_tick);
    sel = high_band ? BAND_HIGH : BAND_LOW;
    p_prog = 7'(p);
    s_prog = 6'(s);
    len = 0;
    do begin
      @(negedge clk);
      len++;
    end while (!frame_tick);
    check(len == n, $sformatf("channel N=%0d: frame of %0d clocks", n, len));
  endtask

  initial begin
    automatic int n_low = 0, n_mid = 0, n_top = 0, n_wide = 0;
    rst_n = 1'b0;
    sel = BAND_LOW; p_prog = 7'd75; s_prog = 6'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 2410; f <= 2483; f++) begin run_channel(f, 1'b0); n_low++; end
    for (int f = 5140; f <= 5300; f++) begin run_channel(f, 1'b1); n_mid++; end
    for (int f = 5715; f <= 5815; f++) begin run_channel(f, 1'b1); n_top++; end
    for (int f = 992; f <= 6096; f += 97) begin run_channel(f, f > 4095); n_wide++; end
    run_channel(4095, 1'b0); n_wide++;
    run_channel(6096, 1'b1); n_wide++;
    $display("channels: 2.4 GHz %0d, 5.14-5.30 GHz %0d, 5.715-5.815 GHz %0d, wide sweep %0d",
             n_low, n_mid, n_top, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
