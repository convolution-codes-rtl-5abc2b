// encoder_top_tb: checks the serial encoder at a divide-by-six, in
// both encoder forms (shift register and FSM). dataIn changes once per bit
// period; the line must carry z1 for three clocks and then z0 for three
// clocks of the following period. The expected pairs are the hand-worked answer
// for 00001101001011 (rightmost bit first) plus two zeros, then a random
// stream checked against the code equations. The internal shift_en pulse is
// checked to come every six clocks.
module encoder_top_tb;
  localparam int N = 6;
  logic clk = 1'b0, reset_n = 1'b0;
  logic din = 1'b0;
  logic ser_sr, ser_fsm;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit bits[$];
  logic [1:0] expz[$];

  encoder_top #(.N(N), .USE_FSM(1'b0)) dut_sr  (.clk, .reset_n, .dataIn(din), .serial_in(ser_sr));
  encoder_top #(.N(N), .USE_FSM(1'b1)) dut_fsm (.clk, .reset_n, .dataIn(din), .serial_in(ser_fsm));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
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
    string s = "00001101001011";
    logic [1:0] ans[16] = '{2'b11,2'b01,2'b01,2'b00,2'b10,2'b11,2'b11,2'b10,
                            2'b00,2'b01,2'b01,2'b11,2'b00,2'b00,2'b00,2'b00};
    bit a = 0, b = 0;
    int last_se = -1;
    for (int i = s.len() - 1; i >= 0; i--) bits.push_back(s[i] == "1");
    bits.push_back(0); bits.push_back(0);
    foreach (ans[i]) expz.push_back(ans[i]);
    for (int i = 0; i < 100; i++) begin
      automatic bit xx = 1'($urandom);
      bits.push_back(xx);
    end
    // equations for the random part; the encoder state after the fixed part is 00
    for (int i = 16; i < bits.size(); i++) begin
      expz.push_back({bits[i] ^ a ^ b, bits[i] ^ b});
      b = a; a = bits[i];
    end

    @(negedge clk);
    @(negedge clk);
    reset_n = 1'b1;                       // cycle 0 starts here
    for (cyc = 0; cyc < N * (bits.size() + 1); cyc++) begin
      automatic int q = cyc / N;
      automatic int ph = cyc % N;
      din = (q < bits.size()) ? bits[q] : 1'b0;
      #1;
      if (q >= 1) begin
        automatic logic expbit = (ph < N / 2) ? expz[q-1][1] : expz[q-1][0];
        check(ser_sr == expbit, "serial (shift register)");
        check(ser_fsm == expbit, "serial (FSM)");
      end
      if (dut_sr.shift_en) begin
        check(ph == N - 1, "shift_en phase");
        if (last_se >= 0) check(cyc - last_se == N, "shift_en period");
        last_se = cyc;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
