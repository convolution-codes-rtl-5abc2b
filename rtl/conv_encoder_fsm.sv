// conv_encoder_fsm: the constraint-length-3 encoder (Gz1 = [111],
// Gz0 = [101]) written as a Mealy finite-state machine.
//
// The state is {x(n-1), x(n-2)}; the present bit x(n) is held in xreg,
// which loads the input x when shift_en is high. The next state and the
// output pair {z1, z0} come from an explicit table over (state, xreg), the
// trellis of the code: from S00 input 0 gives 00 and input 1 gives 11, from
// S10 10/01, from S01 11/00, from S11 01/10. State and xreg advance together
// on the shift_en edge, so this module behaves cycle for cycle like
// conv_encoder_sr with its default parameters and has the same interface.
// Reset (asynchronous, active low) puts the machine in S00 with xreg = 0.
module conv_encoder_fsm
  import conv_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  logic   shift_en,
  input  logic   x,
  output logic   z1,
  output logic   z0,
  output state_t state
);
  typedef enum logic [1:0] {S00 = 2'b00, S01 = 2'b01, S10 = 2'b10, S11 = 2'b11} enc_state_e;

  enc_state_e st, nxt;
  logic       xreg;
  symbol_t    z;

  always_comb begin
    unique case (st)
      S00: begin nxt = xreg ? S10 : S00; z = xreg ? 2'b11 : 2'b00; end
      S10: begin nxt = xreg ? S11 : S01; z = xreg ? 2'b01 : 2'b10; end
      S01: begin nxt = xreg ? S10 : S00; z = xreg ? 2'b00 : 2'b11; end
      S11: begin nxt = xreg ? S11 : S01; z = xreg ? 2'b10 : 2'b01; end
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      st   <= S00;
      xreg <= 1'b0;
    end else if (shift_en) begin
      st   <= nxt;
      xreg <= x;
    end
  end

  assign {z1, z0} = z;
  assign state    = st;
endmodule
