// acs: add-compare-select unit of the Viterbi decoder for the constraint-
// length-3, Gz1 = [111] / Gz0 = [101] code.
//
// It keeps one path metric H per trellis state (H00, H10, H01, H11). For
// each state at the next time step there are two incoming edges, from the
// "upper" predecessor (oldest bit 0) and the "lower" one (oldest bit 1). The
// unit adds each predecessor's H to the Hamming branch metric of its edge,
// compares the two sums and keeps the smaller as the new H. The choice is
// reported in came_from (0 = up, 1 = down) for the survivor memory;
// came_from is in trellis drawing order: [0] S00, [1] S10, [2] S01, [3] S11.
// When the two sums are equal the upper edge is kept; this fixed rule stands
// in for a random pick and is a choice of this design, as is the metric
// normalisation below. The add-compare-select structure, the metric names and
// the came_from order follow the usual description of the decoder.
//
// The metrics would grow without bound, so after each step the smallest new
// metric is subtracted from all four; this keeps every comparison the same
// and the registers need only a few bits (W = 9 leaves a wide margin).
// At reset the decoder is assumed to start in S00: H00 = 0 and the other
// metrics start at 2^(W-2), a value no surviving path can reach, so only
// paths leaving S00 survive.
//
// Timing: came_from and H_next are combinational from H and convSig; H is
// loaded on the clock edge in which sym_valid is high, one update per symbol.
module acs
  import conv_pkg::*;
#(
  parameter int unsigned W = 9                     // path metric width
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  sym_valid,
  input  symbol_t               convSig,
  output logic [NS-1:0]         came_from,
  output logic [NS-1:0][W-1:0]  H                  // indexed by state number J
);
  localparam logic [W-1:0] H_START = W'(1) << (W - 2);

  logic [1:0] h00exp, h01exp, h10exp, h11exp;
  logic [3:0][1:0] hexp;                           // indexed by the expected symbol
  logic [NS-1:0][W-1:0] h_raw, h_next;
  logic [W-1:0] h_min;

  branch_metric u_bm (.convSig, .h00exp, .h01exp, .h10exp, .h11exp);
  assign hexp = {h11exp, h10exp, h01exp, h00exp};

  always_comb begin
    for (int j = 0; j < int'(NS); j++) begin
      state_t  nxt, up, dn;
      logic    xin;
      logic [W-1:0] sum_up, sum_dn;
      nxt    = state_t'(j);
      xin    = nxt[1];
      up     = {nxt[0], 1'b0};
      dn     = {nxt[0], 1'b1};
      sum_up = H[up] + W'(hexp[enc_out(up, xin)]);
      sum_dn = H[dn] + W'(hexp[enc_out(dn, xin)]);
      came_from[cf_index(nxt)] = (sum_dn < sum_up);
      h_raw[j] = (sum_dn < sum_up) ? sum_dn : sum_up;
    end
    h_min = h_raw[0];
    for (int j = 1; j < int'(NS); j++)
      if (h_raw[j] < h_min) h_min = h_raw[j];
    for (int j = 0; j < int'(NS); j++)
      h_next[j] = h_raw[j] - h_min;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int j = 0; j < int'(NS); j++) H[j] <= (j == 0) ? '0 : H_START;
    end else if (sym_valid) begin
      H <= h_next;
    end
  end

  initial assert (W >= 4) else $error("acs: W must be at least 4");
endmodule
