// bit_timer: divide-by-N counter that paces one information bit.
//
// The counter runs 0..N-1 and wraps. shift_en is high in the last count
// (N-1), so any register enabled by it moves on the clock edge that starts
// the next bit period. z1select is high for the first N/2 counts, when the
// serial channel carries z1, and low for the rest, when it carries z0.
// With the default N = 6 this gives the classic encoder waveform: a
// shift_en pulse every six clocks and z1/z0 each held for three clocks.
// mid_edge marks the last count of the z1 half (count N/2-1); it lets
// downstream blocks act at the z1->z0 boundary without decoding the count.
//
// Reset is asynchronous and active low, as library flip-flops usually are;
// the counter restarts at 0, so every bit_timer reset together stays in step.
module bit_timer #(
  parameter int unsigned N = 6                  // clocks per information bit
) (
  input  logic                 clk,
  input  logic                 reset_n,
  output logic [$clog2(N)-1:0] count,
  output logic                 shift_en,
  output logic                 z1select,
  output logic                 mid_edge
);
  localparam int unsigned CW   = $clog2(N);
  localparam int unsigned HALF = N / 2;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)                   count <= '0;
    else if (count == CW'(N - 1))   count <= '0;
    else                            count <= count + 1'b1;
  end

  assign shift_en = (count == CW'(N - 1));
  assign z1select = (count < CW'(HALF));
  assign mid_edge = (count == CW'(HALF - 1));

  initial assert (N >= 2) else $error("bit_timer: N must be at least 2");
endmodule
