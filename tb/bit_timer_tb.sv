// bit_timer_tb: checks the divide-by-N counter at N = 6 (the encoder's
// divide-by-six) and N = 17 (the decoder's period). Over many periods it
// checks that count steps 0..N-1 and wraps, that shift_en is high exactly
// in count N-1 (one pulse every N clocks), that z1select is high for the
// first N/2 counts and that mid_edge marks count N/2-1.
module bit_timer_tb;
  logic clk = 1'b0, reset_n = 1'b0;
  int checks = 0, failures = 0;

  logic [2:0] c6;  logic se6, z6, m6;
  logic [4:0] c17; logic se17, z17, m17;

  bit_timer #(.N(6))  dut6  (.clk, .reset_n, .count(c6),  .shift_en(se6),  .z1select(z6),  .mid_edge(m6));
  bit_timer #(.N(17)) dut17 (.clk, .reset_n, .count(c17), .shift_en(se17), .z1select(z17), .mid_edge(m17));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last6, last17, gap6, gap17;
    last6 = -1; last17 = -1;
    #12 reset_n = 1'b1;
    // cycle cyc runs from release (or a posedge) to the next posedge
    for (cyc = 0; cyc < 6 * 17 * 3; cyc++) begin
      check(c6 == 3'(cyc % 6), "count N=6");
      check(se6 == (cyc % 6 == 5), "shift_en N=6");
      check(z6 == (cyc % 6 < 3), "z1select N=6");
      check(m6 == (cyc % 6 == 2), "mid_edge N=6");
      check(c17 == 5'(cyc % 17), "count N=17");
      check(se17 == (cyc % 17 == 16), "shift_en N=17");
      check(z17 == (cyc % 17 < 8), "z1select N=17");
      check(m17 == (cyc % 17 == 7), "mid_edge N=17");
      if (se6) begin
        if (last6 >= 0) check(cyc - last6 == 6, "shift_en period 6");
        last6 = cyc;
      end
      if (se17) begin
        if (last17 >= 0) check(cyc - last17 == 17, "shift_en period 17");
        last17 = cyc;
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
