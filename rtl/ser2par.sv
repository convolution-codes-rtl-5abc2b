// ser2par: serial-to-parallel converter at the decoder input.
//
// The channel carries z1 during the first half of each bit period and z0
// during the second. The converter samples the line on the last clock of
// each half: on the mid_edge cycle it keeps z1, and on the shift_en cycle it
// loads convSig <= {z1, line} and raises sym_valid for one clock. So convSig
// holds a complete symbol from the first clock of the next bit period until
// it is replaced one period later, and sym_valid marks the clock in which
// the add-compare-select unit should take it. Sampling at the end of each
// half (rather than the start) keeps clear of the edges where the line
// changes. The strobes come from a bit_timer reset together with the
// encoder's. Reset clears convSig and sym_valid.
module ser2par (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       serial,
  input  logic       mid_edge,     // last clock of the z1 half
  input  logic       shift_en,     // last clock of the z0 half
  output logic [1:0] convSig,      // {z1, z0}
  output logic       sym_valid
);
  logic z1_hold;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      z1_hold   <= 1'b0;
      convSig   <= 2'b00;
      sym_valid <= 1'b0;
    end else begin
      if (mid_edge) z1_hold <= serial;
      if (shift_en) convSig <= {z1_hold, serial};
      sym_valid <= shift_en;
    end
  end
endmodule
