// conv_encoder_sr_tb: checks the shift-register encoder against hand-worked
// answers. Constraint length 3 ([111], [101]): the data
// 00001101001011 (rightmost bit first) followed by two zeros must give
// 11,01,01,00,10,11,11,10,00,01,01,11,00,00,00,00, and the trellis example
// 1,0,1,1,0,0 must give 11 10 00 01 01 11. Constraint length 4 ([1101],
// [1111]) with three flushing zeros must give
// 11,00,10,01,00,01,00,11,10,11,10,10,11,00,00,00,00. shift_en is pulsed
// every third clock; the outputs are checked in all three clocks, so an
// encoder that moves without shift_en fails.
module conv_encoder_sr_tb;
  logic clk = 1'b0, reset_n = 1'b0, shift_en = 1'b0, x = 1'b0;
  logic z1_3, z0_3, z1_4, z0_4;
  logic [1:0] st3;
  logic [2:0] st4;
  int checks = 0, failures = 0;

  conv_encoder_sr dut3 (.clk, .reset_n, .shift_en, .x, .z1(z1_3), .z0(z0_3), .state(st3));
  conv_encoder_sr #(.K(4), .GZ1(4'b1101), .GZ0(4'b1111)) dut4
    (.clk, .reset_n, .shift_en, .x, .z1(z1_4), .z0(z0_4), .state(st4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feed bits (index 0 first) and compare each output pair for the chosen K
  task automatic run(input bit bits[$], input logic [1:0] expz[$], input int k);
    @(negedge clk);
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
    foreach (bits[i]) begin
      @(negedge clk);
      x = bits[i];
      shift_en = 1'b1;
      @(negedge clk);
      shift_en = 1'b0;
      x = ~bits[i];                     // input must be ignored now
      repeat (3) begin
        logic [1:0] got;
        got = (k == 3) ? {z1_3, z0_3} : {z1_4, z0_4};
        checks++;
        if (got !== expz[i]) begin
          failures++;
          $display("FAIL K=%0d step %0d: got %b expected %b", k, i, got, expz[i]);
        end
        @(negedge clk);
      end
    end
  endtask

  initial begin
    bit d[$];
    bit dd[$];
    string s = "00001101001011";
    for (int i = s.len() - 1; i >= 0; i--) d.push_back(s[i] == "1");
    dd = d; dd.push_back(0); dd.push_back(0);
    run(dd, '{2'b11,2'b01,2'b01,2'b00,2'b10,2'b11,2'b11,2'b10,2'b00,2'b01,2'b01,2'b11,2'b00,2'b00,2'b00,2'b00}, 3);
    run('{1,0,1,1,0,0}, '{2'b11,2'b10,2'b00,2'b01,2'b01,2'b11}, 3);
    dd.push_back(0);
    run(dd, '{2'b11,2'b00,2'b10,2'b01,2'b00,2'b01,2'b00,2'b11,2'b10,2'b11,2'b10,2'b10,2'b11,2'b00,2'b00,2'b00,2'b00}, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
