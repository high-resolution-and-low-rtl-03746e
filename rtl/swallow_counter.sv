// swallow_counter: 6-bit swallow (S) counter with the NOR-embedded MOD flip-flop.
//
// How it works: the counter is a chain of S_W loadable bit cells counting the
// prescaler's output periods (tick). When the P counter signals the end of a
// frame (ld with tick) the cells load s_prog and MOD goes low, putting the
// prescaler in its larger-swallow modulus (33 or 47). Each following tick
// counts the cells down by one; the tick that takes the count to zero sets
// MOD high, and from then on MOD disables the cells (they hold at zero) for the
// remaining P - S periods of the frame. A programmed value of zero sets MOD at
// the load itself, so no period of the frame is swallowed. MOD is a flip-flop
// fed by a NOR of the counter's next-state bits, as in the published counter.
// The ranges the counter is meant for are 0..31 (low band) and 0..47
// (high band); any 6-bit value up to the P count works.
//
// Interface: clk, asynchronous active-low rst_n (count 0, MOD high); tick
// is the prescaler's end-of-period pulse; ld is the P counter's load request,
// acted on only together with tick; s_prog is the programmed swallow value;
// mod is the modulus control to the prescaler, changing right after a tick;
// count is the current count.
module swallow_counter
  import divider_pkg::*;
#(
  parameter int unsigned S_W = S_W_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic           ld,
  input  logic [S_W-1:0] s_prog,
  output logic           mod,
  output logic [S_W-1:0] count
);

  logic           load;
  logic [S_W:0]   borrow;
  logic [S_W-1:0] next_count;

  assign load      = tick & ld;
  assign borrow[0] = tick;

  for (genvar i = 0; i < S_W; i++) begin : g_cell
    loadable_bit_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .d    (s_prog[i]),
      .t_in (borrow[i]),
      .dis  (mod),
      .q    (count[i]),
      .t_out(borrow[i+1])
    );
  end

  // Next state of the cells, seen by the NOR in front of the MOD flip-flop.
  always_comb begin
    if (load)                next_count = s_prog;
    else if (tick && !mod)   next_count = count - 1'b1;
    else                     next_count = count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mod <= 1'b1;
    else if (tick) mod <= ~|next_count;
  end

endmodule
