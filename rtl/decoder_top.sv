// decoder_top: hard-decision Viterbi decoder for the rate-1/2,
// constraint-length-3 code (Gz1 = [111], Gz0 = [101]).
//
// A bit_timer, reset together with the encoder's, paces the decoder at N
// clocks per information bit. The serial-to-parallel converter turns the
// two channel bits of each period into convSig[1:0]; in the first clock of
// the next period (sym_valid) the add-compare-select unit updates the four
// path metrics and hands its came_from bits to the survivor memory, which is
// written in that clock and then spends TB_DEPTH+1 clocks tracing back to
// release one decoded bit on dataOut with a dataOut_valid pulse.
//
// Timing: one decoded bit per N clocks. The bit released in period p is the
// information bit of the symbol received TB_DEPTH+1 periods earlier; the
// first valid output appears once TB_DEPTH+2 symbols have arrived. N must be
// at least TB_DEPTH+2 (17 by default).
module decoder_top
  import conv_pkg::*;
#(
  parameter int unsigned N        = 17,
  parameter int unsigned TB_DEPTH = 15,
  parameter int unsigned W        = 9
) (
  input  logic clk,
  input  logic reset_n,
  input  logic serial_in_err,
  output logic dataOut,
  output logic dataOut_valid
);
  logic [$clog2(N)-1:0] count;
  logic shift_en, z1select, mid_edge;
  symbol_t convSig;
  logic sym_valid, busy;
  logic [NS-1:0] came_from;
  logic [NS-1:0][W-1:0] H;

  bit_timer #(.N(N)) u_timer (
    .clk, .reset_n, .count, .shift_en, .z1select, .mid_edge
  );

  ser2par u_s2p (
    .clk, .reset_n, .serial(serial_in_err), .mid_edge, .shift_en, .convSig, .sym_valid
  );

  acs #(.W(W)) u_acs (
    .clk, .reset_n, .sym_valid, .convSig, .came_from, .H
  );

  survivor_mem #(.TB_DEPTH(TB_DEPTH), .W(W)) u_sm (
    .clk, .reset_n, .wr_en(sym_valid), .came_from, .H, .busy, .dataOut, .dataOut_valid
  );

  initial assert (N >= TB_DEPTH + 2)
    else $error("decoder_top: N must be at least TB_DEPTH+2 for the trace back to finish");
endmodule
