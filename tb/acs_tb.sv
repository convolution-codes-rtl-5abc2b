// acs_tb: checks the add-compare-select unit against the reference decoder
// model. First a hand-worked example: after reset (start in S00)
// the received symbols 11 11 01 00 10 leave S01 as the only state at path
// distance 1 and every other state at 3 or more, i.e. normalised metrics of
// 0 for S01 and at least 2 elsewhere. Then 3000 random symbols, presented
// every other clock: before each update came_from must match the model's
// decisions (index order S00, S10, S01, S11) and after it the metrics must
// equal the model's unnormalised metrics less their minimum. Metrics must not
// change in clocks without sym_valid.
module acs_tb;
  import viterbi_ref_pkg::*;
  logic clk = 1'b0, reset_n = 1'b0, sym_valid = 1'b0;
  logic [1:0] convSig = 2'b00;
  logic [3:0] came_from;
  logic [3:0][8:0] H;
  int checks = 0, failures = 0;
  int cf_of_state[4] = '{0, 2, 1, 3};   // J -> came_from position

  acs dut (.clk, .reset_n, .sym_valid, .convSig, .came_from, .H);

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

  task automatic compare_metrics(viterbi_ref m);
    int mn = m.H[0];
    for (int j = 1; j < 4; j++) if (m.H[j] < mn) mn = m.H[j];
    for (int j = 0; j < 4; j++) check(int'(H[j]) == m.H[j] - mn, "metric");
  endtask

  task automatic apply(viterbi_ref m, logic [1:0] sym);
    @(negedge clk);
    convSig = sym;
    sym_valid = 1'b1;
    #1;
    m.step(sym);
    for (int j = 0; j < 4; j++)
      check(came_from[cf_of_state[j]] == m.dec[m.dec.size()-1][j], "came_from");
    @(negedge clk);
    sym_valid = 1'b0;
    convSig = ~sym;
    compare_metrics(m);
    @(negedge clk);
    compare_metrics(m);                 // unchanged without sym_valid
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
  endtask

  initial begin
    viterbi_ref m;
    logic [1:0] ex[5] = '{2'b11, 2'b11, 2'b01, 2'b00, 2'b10};
    do_reset();
    m = new();
    foreach (ex[i]) apply(m, ex[i]);
    check(H[1] == 0, "example: S01 best");
    check(H[0] >= 2 && H[2] >= 2 && H[3] >= 2, "example: others at distance 3 or more");
    check(m.H[1] == 1, "example: model path distance 1");

    do_reset();
    m = new();
    for (int i = 0; i < 3000; i++) apply(m, 2'($urandom));
    $display("ties seen: %0d", m.ties);
    check(m.ties > 0, "ties exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
