// multiband_divider_tb: end-to-end test of the multiband pulse-swallow divider.
//
// The divider runs at its default sizes (7-bit P, 6-bit S, AD = 16). A list of
// programmings is applied, each for two frames, and changed right after a
// frame_tick so that the next frame already uses it. The list holds directed
// cases (both bands at their published P ranges, S = 0, S = P, P = 1, the
// largest S of each band) and random ones. For every frame the bench checks,
// against values computed here from P, S and SEL alone:
//   - the frame length: 32*P + S input clocks (SEL = 0) or 48*P - S (SEL = 1);
//   - the number of prescaler periods at the swallow modulus (33 or 47),
//     which must be S, and at the other modulus (32 or 48), P - S;
//   - the width of the fout pulse, which is the last prescaler period.
// Each mechanism is counted and must happen: all four moduli, a zero swallow
// value, a frame made only of swallow periods, a band switch and a reload.
module multiband_divider_tb;
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
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit sel;
    int p;
    int s;
  } cfg_t;

  cfg_t cfgs[$];

  initial begin
    automatic int n_div32 = 0, n_div33 = 0, n_div47 = 0, n_div48 = 0;
    automatic int n_s_zero = 0, n_all_swallow = 0, n_band_switch = 0, n_frames = 0;
    int cycle, last_frame, last_pre, swallowed, normal, fout_cycles, frames_in_cfg, ci;
    int expected_len, expected_fout, plen;
    cfg_t cur;

    // Directed programmings.
    cfgs.push_back('{0, 75, 10});   // 2410 in the low band
    cfgs.push_back('{0, 77, 19});   // 2483
    cfgs.push_back('{1, 108, 44});  // 5140 in the high band
    cfgs.push_back('{1, 111, 28});  // 5300
    cfgs.push_back('{1, 120, 45});  // 5715
    cfgs.push_back('{1, 122, 41});  // 5815
    cfgs.push_back('{0, 78, 0});    // S = 0, low band
    cfgs.push_back('{1, 105, 0});   // S = 0, high band
    cfgs.push_back('{0, 5, 5});     // S = P, low band
    cfgs.push_back('{1, 9, 9});     // S = P, high band
    cfgs.push_back('{0, 1, 0});     // P = 1
    cfgs.push_back('{1, 1, 1});
    cfgs.push_back('{0, 127, 31});  // largest values
    cfgs.push_back('{1, 127, 47});
    for (int i = 0; i < 24; i++) begin
      cfg_t c;
      c.sel = 1'($urandom_range(0, 1));
      c.p   = $urandom_range(1, 127);
      c.s   = $urandom_range(0, c.sel ? 47 : 31);
      if (c.s > c.p) c.s = c.p;
      cfgs.push_back(c);
    end

    rst_n = 1'b0;
    ci = 0;
    cur = cfgs[0];
    sel = band_e'(cur.sel); p_prog = 7'(cur.p); s_prog = 6'(cur.s);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    last_frame = -1; last_pre = -1;
    swallowed = 0; normal = 0; fout_cycles = 0; frames_in_cfg = 0;
    for (cycle = 0; ci < cfgs.size(); cycle++) begin
      // Cycle 0 is the clock in which reset is released.
      if (cycle > 0) @(negedge clk); else #1;
      if (fout) fout_cycles++;
      if (pre_tick) begin
        if (last_pre >= 0) begin
          plen = cycle - last_pre;
          if (!cur.sel && plen == 33) begin swallowed++; n_div33++; end
          else if (!cur.sel && plen == 32) begin normal++; n_div32++; end
          else if (cur.sel && plen == 47) begin swallowed++; n_div47++; end
          else if (cur.sel && plen == 48) begin normal++; n_div48++; end
          else check(1'b0, $sformatf("prescaler period of %0d clocks", plen));
        end
        last_pre = cycle;
      end
      if (frame_tick) begin
        if (last_frame < 0) begin
          check(cycle == 0, "first frame does not start right after reset");
        end else begin
          expected_len  = cur.sel ? 48 * cur.p - cur.s : 32 * cur.p + cur.s;
          expected_fout = (cur.s == cur.p) ? (cur.sel ? 47 : 33) : (cur.sel ? 48 : 32);
          check(cycle - last_frame == expected_len, $sformatf("frame length %0d, expected %0d",
                cycle - last_frame, expected_len));
          check(swallowed == cur.s, "number of swallow-modulus periods");
          check(normal == cur.p - cur.s, "number of normal-modulus periods");
          check(fout_cycles == expected_fout, "fout pulse width");
          n_frames++;
          if (cur.s == 0) n_s_zero++;
          if (cur.s == cur.p) n_all_swallow++;
          frames_in_cfg++;
          if (frames_in_cfg == 2) begin
            frames_in_cfg = 0;
            ci++;
            if (ci < cfgs.size()) begin
              if (cfgs[ci].sel != cur.sel) n_band_switch++;
              cur = cfgs[ci];
              sel = band_e'(cur.sel); p_prog = 7'(cur.p); s_prog = 6'(cur.s);
            end
          end
        end
        last_frame = cycle;
        swallowed = 0; normal = 0; fout_cycles = 0;
      end
    end
    check(n_div32 > 0, "divide-by-32 never happened");
    check(n_div33 > 0, "divide-by-33 never happened");
    check(n_div47 > 0, "divide-by-47 never happened");
    check(n_div48 > 0, "divide-by-48 never happened");
    check(n_s_zero > 0, "zero swallow value never ran");
    check(n_all_swallow > 0, "all-swallow frame never ran");
    check(n_band_switch > 0, "band switch never happened");
    check(n_frames > 0, "no reload");
    $display("frames %0d, /32 %0d, /33 %0d, /47 %0d, /48 %0d, S=0 %0d, S=P %0d, band switches %0d, clocks %0d",
             n_frames, n_div32, n_div33, n_div47, n_div48, n_s_zero, n_all_swallow, n_band_switch, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
