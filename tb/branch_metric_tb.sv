// branch_metric_tb: exhaustive check of the four Hamming branch metrics
// against a bit-by-bit count of differing positions.
module branch_metric_tb;
  logic [1:0] convSig, h00, h01, h10, h11;
  int checks = 0, failures = 0;

  branch_metric dut (.convSig, .h00exp(h00), .h01exp(h01), .h10exp(h10), .h11exp(h11));

  function automatic int hdist(logic [1:0] a, logic [1:0] b);
    return int'(a[1] != b[1]) + int'(a[0] != b[0]);
  endfunction

  task automatic check(logic [1:0] got, logic [1:0] expsym);
    checks++;
    if (int'(got) != hdist(convSig, expsym)) begin
      failures++;
      $display("FAIL convSig=%b expected symbol %b: got %0d", convSig, expsym, got);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      convSig = 2'(v);
      #1;
      check(h00, 2'b00);
      check(h01, 2'b01);
      check(h10, 2'b10);
      check(h11, 2'b11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
