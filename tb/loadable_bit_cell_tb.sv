// loadable_bit_cell_tb: self-checking test of one loadable counter bit.
//
// Random load, data, borrow-in and disable values are applied every clock and
// the cell's bit and borrow-out are compared with a reference written from
// the cell's rules: load wins, otherwise toggle on borrow-in when enabled;
// borrow-out on borrow-in when enabled and the bit is 0.
module loadable_bit_cell_tb;
  logic clk = 1'b0;
  logic rst_n, load, d, t_in, dis, q, t_out;
  int checks = 0, failures = 0;
  int n_load = 0, n_toggle = 0, n_hold_dis = 0;

  loadable_bit_cell dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .t_in(t_in),
                         .dis(dis), .q(q), .t_out(t_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q_ref;
    rst_n = 1'b0;
    {load, d, t_in, dis} = '0;
    repeat (2) @(negedge clk);
    check(q == 1'b0, "reset value");
    rst_n = 1'b1;
    q_ref = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      load = ($urandom_range(0, 7) == 0);
      d    = 1'($urandom_range(0, 1));
      t_in = 1'($urandom_range(0, 1));
      dis  = ($urandom_range(0, 3) == 0);
      #1;
      check(t_out == (t_in && !dis && !q_ref), "borrow out");
      @(negedge clk);
      if (load) begin q_ref = d; n_load++; end
      else if (t_in && !dis) begin q_ref = ~q_ref; n_toggle++; end
      else if (t_in) n_hold_dis++;
      check(q == q_ref, "bit value");
    end
    check(n_load > 0 && n_toggle > 0 && n_hold_dis > 0, "a cell operation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
