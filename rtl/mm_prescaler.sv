// mm_prescaler: multi-modulus 32/33/47/48 prescaler.
//
// How it works: a 2/3 prescaler is followed by AD_BITS divide-by-2 stages
// (AD = 16 sub-periods per output period). A NAND2 of ~MOD and the terminal
// state of the divide-by-2 chain (all stages high) gives MC. With SEL = 0 the
// NAND output drives the 2/3 prescaler directly: MOD = 1 keeps it at /2 for
// all 16 sub-periods (16*2 = 32), MOD = 0 makes the last sub-period /3
// (15*2 + 3 = 33). With SEL = 1 the inverted NAND output is used instead:
// MOD = 1 keeps the 2/3 prescaler at /3 throughout (16*3 = 48), MOD = 0 makes
// the last sub-period /2 (15*3 + 2 = 47). No flip-flop is added for the 47/48
// moduli, only an inverter and a multiplexer. This structure follows the
// published design. The divide-by-2 stages are asynchronous ripple dividers in
// the original; here they are one synchronous counter clock-enabled by the
// 2/3 prescaler's output edge, which counts the same way in one clock domain.
//
// Interface: clk is the input frequency; sel is the band select; mod is the
// modulus control from the swallow counter. mod and sel are sampled once per
// output period, during the last sub-period, so they may change at any
// tick. fout is the last divide-by-2 stage (square wave at clk / modulus).
// tick is a one-clock pulse in the last input clock of every output period;
// the counters downstream advance on it. mc is the 2/3 prescaler's mode input.
// After reset the divide-by-2 chain sits in its terminal state, so the first
// tick comes in the first clock after reset.
module mm_prescaler
  import divider_pkg::*;
#(
  parameter int unsigned AD_BITS = AD_BITS_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  band_e sel,
  input  logic  mod,
  output logic  fout,
  output logic  tick,
  output logic  mc
);

  logic              fo23, fo23_rise;
  logic [AD_BITS-1:0] ad_q;
  logic              term;
  logic              nand_out;

  prescaler_2_3 u_p23 (
    .clk    (clk),
    .rst_n  (rst_n),
    .mc     (mc),
    .fo     (fo23),
    .fo_rise(fo23_rise)
  );

  // Divide-by-2 chain: counts 2/3 prescaler output periods.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ad_q <= '1;
    else if (fo23_rise) ad_q <= ad_q + 1'b1;
  end

  always_comb begin
    term     = &ad_q;
    nand_out = ~(~mod & term);
    mc       = (sel == BAND_HIGH) ? ~nand_out : nand_out;
  end

  assign fout = ad_q[AD_BITS-1];
  assign tick = fo23_rise & term;

endmodule
