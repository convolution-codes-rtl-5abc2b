// error_gen: channel error generator for the loopback test.
//
// A 16-bit maximal-length linear feedback shift register (taps 16, 14, 13,
// 11; period 65535, far longer than the 31 of a 5-bit generator, so errors
// do not repeat with a short period) stands in for a random number source.
// It is advanced once per channel bit, not once per clock: on the edge that
// starts each z1 half and each z0 half of the bit period, as given by the
// module's own bit_timer, which runs in step with the encoder's because both
// leave reset together. Each advance shifts in ERR_BITS fresh bits; if the
// low ERR_BITS bits then equal the low bits of the pattern 01110, err_flag
// is set for that whole channel bit and serial_in_err is serial_in inverted.
// With ERR_BITS = 4 that is one error per 16 channel bits on average, i.e.
// one per 8 information bits. err_count counts the errors introduced
// (wrapping at 2^16). err_en = 0 turns the generator into a plain wire
// (the LFSR still runs).
module error_gen #(
  parameter int unsigned    N        = 6,           // clocks per information bit
  parameter int unsigned    ERR_BITS = 4,           // error probability 2^-ERR_BITS per channel bit
  parameter logic [15:0]    SEED     = 16'hACE1     // any non-zero value
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        err_en,
  input  logic        serial_in,
  output logic        serial_in_err,
  output logic        err_flag,
  output logic [15:0] err_count
);
  localparam logic [4:0] PATTERN = 5'b01110;

  logic [$clog2(N)-1:0] count;
  logic shift_en, z1select, mid_edge;
  logic advance;
  logic [15:0] lfsr, lfsr_nxt;
  logic        hit;

  bit_timer #(.N(N)) u_timer (
    .clk, .reset_n, .count, .shift_en, .z1select, .mid_edge
  );

  assign advance = shift_en | mid_edge;

  always_comb begin
    lfsr_nxt = lfsr;
    for (int i = 0; i < int'(ERR_BITS); i++)
      lfsr_nxt = {lfsr_nxt[14:0], lfsr_nxt[15] ^ lfsr_nxt[13] ^ lfsr_nxt[12] ^ lfsr_nxt[10]};
  end

  assign hit = err_en && (lfsr_nxt[ERR_BITS-1:0] == PATTERN[ERR_BITS-1:0]);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      lfsr      <= SEED;
      err_flag  <= 1'b0;
      err_count <= '0;
    end else if (advance) begin
      lfsr      <= lfsr_nxt;
      err_flag  <= hit;
      if (hit) err_count <= err_count + 1'b1;
    end
  end

  assign serial_in_err = serial_in ^ err_flag;

  initial assert (ERR_BITS >= 1 && ERR_BITS <= 5 && SEED != '0)
    else $error("error_gen: ERR_BITS must be 1..5 and SEED non-zero");
endmodule
