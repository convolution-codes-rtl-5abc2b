// ser2par_tb: drives random symbols on a serial line at N = 17 (z1 for the
// first 8 clocks of a period, z0 for the other 9, with the line held at the
// other value outside the sampling clocks to catch early or late sampling)
// and checks that convSig = {z1, z0} with a one-clock sym_valid pulse in the
// first clock of the following period.
module ser2par_tb;
  localparam int N = 17;
  logic clk = 1'b0, reset_n = 1'b0, serial = 1'b0;
  logic [4:0] count;
  logic shift_en, z1select, mid_edge, sym_valid;
  logic [1:0] convSig;
  int checks = 0, failures = 0;

  bit_timer #(.N(N)) u_t (.clk, .reset_n, .count, .shift_en, .z1select, .mid_edge);
  ser2par dut (.clk, .reset_n, .serial, .mid_edge, .shift_en, .convSig, .sym_valid);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sym[$];
    int nsym = 200;
    for (int i = 0; i < nsym; i++) sym.push_back(2'($urandom));
    @(negedge clk);
    @(negedge clk);
    reset_n = 1'b1;
    for (int cyc = 0; cyc < N * (nsym + 1); cyc++) begin
      automatic int p = cyc / N;
      automatic int ph = cyc % N;
      if (p < nsym) begin
        if (ph == N / 2 - 1)  serial = sym[p][1];
        else if (ph == N - 1) serial = sym[p][0];
        else                  serial = (ph < N / 2) ? ~sym[p][1] : ~sym[p][0];
      end
      #1;
      check(sym_valid == (ph == 0 && p >= 1), "sym_valid timing");
      if (ph == 0 && p >= 1) check(convSig == sym[p-1], "convSig");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
