// multiband_divider: pulse-swallow multiband flexible integer-N divider.
//
// How it works: the 32/33/47/48 prescaler divides the input clock by one of
// two moduli chosen by MOD. The swallow (S) counter keeps MOD low for the
// first S prescaler periods of every frame, and the programmable (P) counter
// ends the frame after P prescaler periods and reloads both counters. One
// frame, and so one period of the output, lasts
//   SEL = 0 (low band):  S*33 + (P-S)*32 = 32*P + S  input clocks
//   SEL = 1 (high band): S*47 + (P-S)*48 = 48*P - S  input clocks
// In the high band MOD = 0 selects 47 and MOD = 1 selects 48, because the
// prescaler's mode input is the inverted NAND output there; this follows the
// prescaler's gate-level description. Valid programming is 1 <= P < 2**P_W and
// S <= P, with S up to 31 (low band) or 47 (high band) for a contiguous set of
// ratios. The published design ties one P bit to SEL and holds two others at
// 1; here all P bits are programmable, which covers both of its P ranges
// (75..78 and 105..122).
//
// Interface: clk is the input frequency (the VCO output in a synthesizer);
// rst_n is an asynchronous active-low reset. sel, p_prog and s_prog are
// static programming inputs; a change takes full effect from the next frame
// (they are sampled when the counters reload and once per prescaler period).
// fout is the divided output (the P counter's LD, high for the last
// prescaler period of each frame); frame_tick is a one-clock pulse in the last
// input clock of each frame. pre_out is the prescaler's square-wave output,
// pre_tick its end-of-period pulse, and mod the modulus control. The first
// frame starts one clock after reset is released.
module multiband_divider
  import divider_pkg::*;
#(
  parameter int unsigned P_W     = P_W_DEFAULT,
  parameter int unsigned S_W     = S_W_DEFAULT,
  parameter int unsigned AD_BITS = AD_BITS_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  band_e          sel,
  input  logic [P_W-1:0] p_prog,
  input  logic [S_W-1:0] s_prog,
  output logic           fout,
  output logic           frame_tick,
  output logic           pre_out,
  output logic           pre_tick,
  output logic           mod
);

  logic           ld;
  logic           mc;
  logic [P_W-1:0] p_count;
  logic [S_W-1:0] s_count;

  mm_prescaler #(.AD_BITS(AD_BITS)) u_prescaler (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (sel),
    .mod  (mod),
    .fout (pre_out),
    .tick (pre_tick),
    .mc   (mc)
  );

  swallow_counter #(.S_W(S_W)) u_s_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (pre_tick),
    .ld    (ld),
    .s_prog(s_prog),
    .mod   (mod),
    .count (s_count)
  );

  program_counter #(.P_W(P_W)) u_p_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (pre_tick),
    .p_prog(p_prog),
    .ld    (ld),
    .count (p_count)
  );

  assign fout       = ld;
  assign frame_tick = ld & pre_tick;

  // Programming rules, checked when the counters reload.
  a_p_nonzero : assert property (@(posedge clk) disable iff (!rst_n)
                                 frame_tick |-> p_prog != '0)
    else $error("multiband_divider: P must be at least 1");
  a_s_le_p : assert property (@(posedge clk) disable iff (!rst_n)
                              frame_tick |-> {{P_W{1'b0}}, s_prog} <= {{S_W{1'b0}}, p_prog})
    else $error("multiband_divider: S must not exceed P");

endmodule
