// prescaler_2_3: single-clock 2/3 prescaler, two flip-flops and two NOR gates.
//
// How it works: flip-flop 2 takes NOR(Q1, Q2) and flip-flop 1 takes
// NOR(MC, ~Q2), i.e. it can only be set in the cycle after Q2 was high and only
// when MC is low. With MC = 1, Q1 stays 0 and Q2 toggles every input clock
// (divide by 2, states 00 -> 01). With MC = 0, Q1 inserts one extra state
// (00 -> 01 -> 10) and the output period is three input clocks. The illegal
// state 11 leaves itself in one clock. This two-gate structure is the published
// one; the gates are written here as logic around ordinary flip-flops instead of
// being merged into dynamic latches.
//
// Interface: clk is the input frequency. mc selects the modulus; it is sampled
// in the cycle where fo is high, which decides the length of that output
// period. fo (= Q2) is the divided output, high for one input clock per period.
// fo_rise is high in the cycle just before fo rises (state 00), i.e. in the
// last input clock of every output period; later stages use it as their
// clock enable. rst_n is an asynchronous active-low reset to state 00.
module prescaler_2_3 (
  input  logic clk,
  input  logic rst_n,
  input  logic mc,
  output logic fo,
  output logic fo_rise
);

  logic q1, q2;
  logic d1, d2;

  // The two embedded NOR gates.
  always_comb begin
    d1 = ~(mc | ~q2);
    d2 = ~(q1 | q2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= d1;
      q2 <= d2;
    end
  end

  assign fo      = q2;
  assign fo_rise = d2 & ~q2;

endmodule
