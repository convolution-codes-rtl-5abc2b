// conv_top_tb: the whole link at its default parameters (17 clocks per
// bit, trace-back depth 15, 9-bit metrics, error rate 1/16 per channel bit).
// Three runs, each after a reset:
//  1. loopback, no errors: 300 random bits must come back unchanged, bit i
//     in the first clock of bit period i+19. (Period 0 carries the symbol of
//     the encoder's reset state, which is decoded as a 0 in period 18.)
//  2. loopback with the error generator on: 1500 random bits. The channel
//     symbols the decoder sees are read off the internal line and fed to the
//     reference decoder, whose output every decoded bit must match; the
//     generator's err_count must equal the channel bits seen inverted.
//  3. external input: the encoder output is looped back outside the chip
//     with isolated errors the testbench inserts (at least 24 channel bits
//     apart); all 400 bits must come back unchanged.
// Each mechanism must occur at least once: encoder shifts, z1 and z0 on the
// line, injected errors, errors corrected, equal-metric ties in the
// add-compare-select, metric normalisation, decoded outputs, and use of the
// external decoder input.
module conv_top_tb;
  import viterbi_ref_pkg::*;
  localparam int N = 17;
  logic clk = 1'b0, reset_n = 1'b0, dataIn = 1'b0, err_en = 1'b0, loopback = 1'b1, ExtDecodeIn = 1'b0;
  logic ExtEncodeOut, dataOut, dataOut_valid;
  logic [15:0] err_count;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_shift = 0, n_z1 = 0, n_z0 = 0, n_inject = 0, n_corrected = 0, n_ties = 0,
      n_norm = 0, n_out = 0, n_ext = 0;

  conv_top dut (.clk, .reset_n, .dataIn, .err_en, .loopback, .ExtDecodeIn,
                .ExtEncodeOut, .dataOut, .dataOut_valid, .err_count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (N * 2400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // metric normalisation happens when the smallest new metric is not zero
  always @(posedge clk)
    if (reset_n && dut.u_dec.sym_valid && dut.u_dec.u_acs.h_min != '0) n_norm++;

  // mode: 0 clean loopback, 1 loopback with generator, 2 external with tb errors
  task automatic run(int mode, int nbits);
    bit x[];
    logic [1:0] tx[], rx[];
    bit expd[];
    int st = 0, last_err = -100, flips = 0, outs = 0, wrong = 0;
    viterbi_ref m = new();
    m.step(2'b00);                 // period 0 carries the encoder's reset state
    x = new[nbits]; tx = new[nbits + 1]; rx = new[nbits + 1]; expd = new[nbits + 1];
    for (int i = 0; i < nbits; i++) begin
      x[i] = 1'($urandom);
      tx[i] = enc_pair(st, x[i]);
      st = 2 * int'(x[i]) + st / 2;
    end
    err_en   = (mode == 1);
    loopback = (mode != 2);
    @(negedge clk);
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
    // cycle 0 starts now. Bit i is presented in period i and sampled at its
    // end; its symbol is on the line in period i+1.
    for (int cyc = 0; cyc < N * (nbits + 20); cyc++) begin
      automatic int q = cyc / N;
      automatic int ph = cyc % N;
      automatic int p = q - 1;               // symbol on the line
      automatic int cb = 2 * p + ((ph < N / 2) ? 0 : 1);
      automatic bit want;
      dataIn = (q < nbits) ? x[q] : 1'b0;
      #1;
      // encoder output against the code
      if (p >= 0 && p < nbits) begin
        check(ExtEncodeOut == ((ph < N / 2) ? tx[p][1] : tx[p][0]), "encoder line");
        if (ph < N / 2) n_z1++; else n_z0++;
      end
      if (dut.u_enc.shift_en) n_shift++;
      // the line seen by the decoder, sampled where the decoder samples it
      if (mode == 2) begin
        // insert isolated errors outside the chip, one decision per channel bit
        if (p >= 0 && p < nbits && (ph == 0 || ph == N / 2)) begin
          if (cb - last_err >= 24 && $urandom_range(0, 7) == 0) begin
            last_err = cb;
            flips++;
          end
        end
        ExtDecodeIn = ExtEncodeOut ^ (cb == last_err);
        if (ExtDecodeIn != ExtEncodeOut) n_ext++;
        #0;
      end
      if (mode == 1 && (ph == N / 2 - 1 || ph == N - 1))
        flips += int'(dut.u_dec.serial_in_err != ExtEncodeOut);
      if (p >= 0 && p < nbits) begin
        if (ph == N / 2 - 1) rx[p][1] = dut.u_dec.serial_in_err;
        if (ph == N - 1) begin
          rx[p][0] = dut.u_dec.serial_in_err;
          m.step(rx[p]);
          if (p >= 16) expd[p] = m.traceback(15);
        end
      end
      // decoded output: symbol p leaves in the first clock of period p+19
      want = (ph == 0) && (q - 19 >= 0) && (q - 19 < nbits) && (q - 3 < nbits);
      check(dataOut_valid == (ph == 0 && q >= 18), "dataOut_valid timing");
      // period 18 releases the bit of the reset-state symbol, always 0
      if (ph == 0 && q == 18) check(dataOut == 1'b0, "leading reset-state bit");
      if (want && dataOut_valid) begin
        automatic int i = q - 19;             // information bit index
        outs++;
        n_out++;
        check(dataOut == expd[i + 16], "matches reference decoder");
        if (mode != 1) check(dataOut == x[i], "loopback data");
        if (dataOut != x[i]) wrong++;
      end
      @(negedge clk);
    end
    check(outs > nbits - 20, "outputs delivered");
    if (mode == 1) begin
      check(int'(err_count) == flips, "err_count matches inverted channel bits");
      n_inject += flips;
      if (flips > wrong) n_corrected += flips - wrong;
      $display("generator run: %0d channel errors, %0d decoded bits wrong of %0d", flips, wrong, outs);
    end
    if (mode == 2) begin
      n_corrected += flips;
      $display("external run: %0d channel errors, %0d decoded bits wrong", flips, wrong);
    end
    n_ties += m.ties;
  endtask

  initial begin
    run(0, 300);
    run(1, 1500);
    run(2, 400);
    $display("mechanisms: shifts=%0d z1=%0d z0=%0d injected=%0d corrected=%0d ties=%0d normalised=%0d outputs=%0d external_errors=%0d",
             n_shift, n_z1, n_z0, n_inject, n_corrected, n_ties, n_norm, n_out, n_ext);
    check(n_shift > 0, "mechanism: encoder shift");
    check(n_z1 > 0 && n_z0 > 0, "mechanism: z1/z0 multiplexing");
    check(n_inject > 0, "mechanism: error injection");
    check(n_corrected > 0, "mechanism: error correction");
    check(n_ties > 0, "mechanism: metric tie");
    check(n_norm > 0, "mechanism: metric normalisation");
    check(n_out > 0, "mechanism: decoded output");
    check(n_ext > 0, "mechanism: external decoder input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
