// program_counter: 7-bit programmable (P) down counter of the pulse-swallow divider.
//
// How it works: a chain of P_W loadable bit cells counts the prescaler's
// output periods (tick) down to zero. A NOR of all bits gives LD, which is
// high during the last prescaler period of a frame. The tick that ends that
// period reloads the cells with p_prog - 1, so a frame lasts exactly p_prog
// prescaler periods, and the same LD reloads the swallow counter. LD is also
// the divider's output: one pulse, one prescaler period wide, per frame.
// The published counter loads its program value and runs to zero; loading
// p_prog - 1 so that the frame is exactly p_prog periods long is this design's
// reading. p_prog must be at least 1.
//
// Interface: clk, asynchronous active-low rst_n (count 0, so the first tick
// after reset loads the counter); tick is the prescaler's end-of-period pulse;
// p_prog is the programmed value P; ld is the terminal-count flag; count is
// the current count.
module program_counter
  import divider_pkg::*;
#(
  parameter int unsigned P_W = P_W_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic [P_W-1:0] p_prog,
  output logic           ld,
  output logic [P_W-1:0] count
);

  logic [P_W:0]   borrow;
  logic [P_W-1:0] load_val;

  assign ld        = ~|count;
  assign load_val  = p_prog - 1'b1;
  assign borrow[0] = tick & ~ld;

  for (genvar i = 0; i < P_W; i++) begin : g_cell
    loadable_bit_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .load (tick & ld),
      .d    (load_val[i]),
      .t_in (borrow[i]),
      .dis  (1'b0),
      .q    (count[i]),
      .t_out(borrow[i+1])
    );
  end

endmodule
