// survivor_mem_tb: checks the trace back with the default depth of 15.
// The testbench invents a random information sequence, walks the trellis
// with it and, for every step, writes a came_from column in which the
// entries of the states on the true path point back along it and all other
// entries are random; the path metrics make the true state the only best
// one (metric 0, all others 1..6).
// Each write is followed by 16 read clocks, so symbols arrive every 17
// clocks. Checked: no dataOut_valid for the first 16 symbols; after the
// t-th write (t >= 17) exactly one dataOut_valid pulse, 17 clocks after the
// write, carrying information bit t-16; busy high during the 16 reads.
module survivor_mem_tb;
  logic clk = 1'b0, reset_n = 1'b0, wr_en = 1'b0;
  logic [3:0] came_from = '0;
  logic [3:0][8:0] H = '0;
  logic busy, dout, dvalid;
  int checks = 0, failures = 0;
  int cf_of_state[4] = '{0, 2, 1, 3};

  survivor_mem dut (.clk, .reset_n, .wr_en, .came_from, .H, .busy, .dataOut(dout), .dataOut_valid(dvalid));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit x[$];
    int st = 0;                          // true state {x(n-1), x(n-2)} as J
    int nsym = 400;
    @(negedge clk);
    @(negedge clk);
    reset_n = 1'b1;
    for (int t = 1; t <= nsym; t++) begin
      automatic bit xb = 1'($urandom);
      automatic int prev = st;
      automatic int pulses = 0;
      x.push_back(xb);                   // x[t-1] is the bit of symbol t
      st = 2 * int'(xb) + prev / 2;
      for (int j = 0; j < 4; j++) begin
        came_from[cf_of_state[j]] = 1'($urandom);
        H[j] = 9'(1 + $urandom_range(0, 5));
      end
      came_from[cf_of_state[st]] = 1'(prev % 2);
      H[st] = '0;
      @(negedge clk);
      wr_en = 1'b1;
      @(negedge clk);
      wr_en = 1'b0;
      for (int k = 1; k <= 16; k++) begin
        check(busy == 1'b1, "busy during trace back");
        check(dvalid == 1'b0, "no output before the walk ends");
        @(negedge clk);
      end
      // 17 clocks after the write
      check(busy == 1'b0, "idle after trace back");
      if (dvalid) pulses++;
      check(dvalid == (t >= 17), "dataOut_valid");
      if (t >= 17) check(dout == x[t-17], "decoded bit");
      check(pulses <= 1, "single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
