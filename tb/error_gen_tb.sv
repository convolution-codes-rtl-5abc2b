// error_gen_tb: checks the channel error generator at N = 6.
// A model of the 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1, four new bits
// per channel bit, error when the low four bits are 1110) predicts in which
// channel bits an error must appear. The line is driven with random data
// every clock; the testbench checks that serial_in_err differs from
// serial_in exactly in the predicted channel bits, that an error lasts a
// whole channel bit (three clocks), that err_count follows, that the rate
// over 4000 channel bits is near one in 16, and that nothing is flipped while
// err_en is low.
module error_gen_tb;
  localparam int N = 6;
  logic clk = 1'b0, reset_n = 1'b0, err_en = 1'b1, sin = 1'b0;
  logic sout, flag;
  logic [15:0] cnt;
  int checks = 0, failures = 0;

  error_gen #(.N(N)) dut (.clk, .reset_n, .err_en, .serial_in(sin), .serial_in_err(sout),
                          .err_flag(flag), .err_count(cnt));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] l = 16'hACE1;
    bit   e = 0;
    int   nerr = 0, nbits = 0, cyc;
    @(negedge clk);
    @(negedge clk);
    reset_n = 1'b1;
    for (cyc = 0; cyc < 2 * 4000 * N / 2 + 600; cyc++) begin
      if (cyc == 24000) err_en = 1'b0;
      sin = 1'($urandom);
      #1;
      check((sout ^ sin) == e, "flip matches model");
      check(int'(cnt) == nerr, "error count");
      @(posedge clk);
      // model: advance on the last clock of each half bit
      if (cyc % N == N / 2 - 1 || cyc % N == N - 1) begin
        for (int i = 0; i < 4; i++) l = {l[14:0], l[15] ^ l[13] ^ l[12] ^ l[10]};
        e = err_en && (l[3:0] == 4'b1110);
        if (e) nerr++;
        if (cyc < 24000) nbits++;
      end
      @(negedge clk);
    end
    $display("errors %0d in %0d channel bits", nerr, nbits);
    check(nerr > nbits / 16 - 80 && nerr < nbits / 16 + 80, "error rate near 1/16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
