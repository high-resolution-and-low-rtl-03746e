// loadable_bit_cell: one bit of a loadable down counter, with a disable input.
//
// How it works: the cell holds one counter bit. When load is high it takes
// the value d. Otherwise, when a borrow arrives from the lower bits (t_in) and
// the cell is not disabled, it toggles. It passes a borrow on (t_out) when it
// toggles from 0 to 1, which is what makes a chain of cells count down. The
// dis input models the two extra MOD-controlled transistors of the improved
// swallow-counter cell: with dis high the cell neither toggles nor passes a
// borrow, so the counter freezes. The P counter ties dis low.
// The original cell is an asynchronous ripple stage clocked by the previous
// bit; here every cell runs on the common clock and the ripple is the
// combinational t_in/t_out chain, so all bits change in the same clock.
//
// Interface: clk, asynchronous active-low rst_n (to RST_VAL); load and d are
// sampled on the rising clock edge; t_in is the borrow (count enable) from the
// lower bit, or the count enable itself for bit 0; q is the bit; t_out is the
// borrow to the next higher bit.
module loadable_bit_cell #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic d,
  input  logic t_in,
  input  logic dis,
  output logic q,
  output logic t_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               q <= RST_VAL;
    else if (load)            q <= d;
    else if (t_in && !dis)    q <= ~q;
  end

  assign t_out = t_in & ~dis & ~q;

endmodule
