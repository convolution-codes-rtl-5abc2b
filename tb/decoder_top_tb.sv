// decoder_top_tb: end-to-end check of the Viterbi decoder at its defaults
// (17 clocks per bit, trace-back depth 15). The testbench encodes random
// information bits itself, puts them on the serial line (z1 for 8 clocks,
// z0 for 9) and inverts chosen channel bits: none in the first 300 symbols,
// isolated single errors at least 24 channel bits apart in the next 300, and
// random errors at a rate of one in 10 in the last 400. Every decoded bit
// must equal the reference decoder's, and, in the first two parts, the
// transmitted bit. Timing: the bit of symbol p must leave in the first clock
// of period p+18, one output every 17 clocks.
module decoder_top_tb;
  import viterbi_ref_pkg::*;
  localparam int N = 17;
  localparam int NSYM = 1000;
  logic clk = 1'b0, reset_n = 1'b0, line = 1'b0;
  logic dout, dvalid;
  int checks = 0, failures = 0;

  decoder_top dut (.clk, .reset_n, .serial_in_err(line), .dataOut(dout), .dataOut_valid(dvalid));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (N * (NSYM + 40)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit x[NSYM];
    logic [1:0] tx[NSYM], rx[NSYM];
    bit expd[NSYM];
    int st = 0, last_err = -100, nerr = 0, corrected = 0, outs = 0;
    viterbi_ref m = new();
    for (int p = 0; p < NSYM; p++) begin
      x[p]  = 1'($urandom);
      tx[p] = enc_pair(st, x[p]);
      st    = 2 * int'(x[p]) + st / 2;
      rx[p] = tx[p];
      for (int b = 1; b >= 0; b--) begin
        automatic int cb = 2 * p + (1 - b);
        automatic bit flip = 0;
        if (p >= 300 && p < 600) flip = (cb - last_err >= 24) && ($urandom_range(0, 7) == 0);
        if (p >= 600) flip = ($urandom_range(0, 9) == 0);
        if (flip) begin rx[p][b] = ~rx[p][b]; last_err = cb; nerr++; end
      end
      m.step(rx[p]);
      if (p >= 16) expd[p] = m.traceback(15);
    end

    @(negedge clk);
    @(negedge clk);
    reset_n = 1'b1;
    for (int cyc = 0; cyc < N * (NSYM + 2); cyc++) begin
      automatic int q = cyc / N;
      automatic int ph = cyc % N;
      automatic bit want;
      if (q < NSYM) line = (ph < N / 2) ? rx[q][1] : rx[q][0];
      else          line = 1'b0;
      #1;
      want = (ph == 0) && (q >= 18) && (q - 2 < NSYM);
      check(dvalid == want, "dataOut_valid timing");
      if (want && dvalid) begin
        automatic int p = q - 2;
        outs++;
        check(dout == expd[p], "matches reference decoder");
        if (p < 616) check(dout == x[p - 16], "recovers transmitted bit");
        if (p >= 316 && p < 616 && dout == x[p - 16]) corrected++;
      end
      @(negedge clk);
    end
    $display("channel errors %0d, outputs %0d, ties %0d", nerr, outs, m.ties);
    check(outs == NSYM - 16, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
