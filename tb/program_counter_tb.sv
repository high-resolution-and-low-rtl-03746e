// program_counter_tb: self-checking test of the 7-bit programmable counter.
//
// Ticks arrive at random and a new random P (1..127) is offered all the time.
// The reference model reloads P - 1 on the tick where the count is zero and
// counts down on other ticks; LD must be high exactly when the count is zero.
// It also measures the frame length in ticks between loads, which must equal
// the P value taken at the load that started the frame.
module program_counter_tb;
  logic clk = 1'b0;
  logic rst_n, tick, ld;
  logic [6:0] p_prog, count;
  int checks = 0, failures = 0;
  int n_frames = 0, n_p1 = 0;

  program_counter dut (.clk(clk), .rst_n(rst_n), .tick(tick), .p_prog(p_prog),
                       .ld(ld), .count(count));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt_ref, frame_p, frame_ticks;
    rst_n = 1'b0;
    tick = 1'b0; p_prog = 7'd1;
    repeat (2) @(negedge clk);
    check(ld == 1'b1 && count == 0, "reset state");
    rst_n = 1'b1;
    cnt_ref = 0; frame_p = -1; frame_ticks = 0;
    for (int i = 0; i < 40000; i++) begin
      tick   = ($urandom_range(0, 1) == 0);
      p_prog = ($urandom_range(0, 4) == 0) ? 7'd1 : 7'($urandom_range(1, 127));
      #1;
      check(ld == (cnt_ref == 0), "LD");
      @(negedge clk);
      if (tick) begin
        frame_ticks++;
        if (cnt_ref == 0) begin
          if (frame_p >= 0) begin
            check(frame_ticks == frame_p, "frame length in ticks");
            n_frames++;
          end
          frame_p = int'(p_prog);
          if (p_prog == 1) n_p1++;
          frame_ticks = 0;
          cnt_ref = int'(p_prog) - 1;
        end else begin
          cnt_ref--;
        end
      end
      check(count == 7'(cnt_ref), "count");
    end
    check(n_frames > 10 && n_p1 > 0, "too few frames");
    $display("frames %0d", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
