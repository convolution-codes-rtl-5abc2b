// conv_top: convolution-coded link with loopback test path.
//
// dataIn is convolution encoded (rate 1/2, constraint length 3, generator
// vectors [111] and [101]) into a serial stream, two channel bits per
// information bit, which leaves the chip on ExtEncodeOut. In loopback
// (loopback = 1) the same stream passes through the error generator, which
// inverts about one channel bit in 16 when err_en is high, and into the
// Viterbi decoder; with loopback = 0 the decoder takes ExtDecodeIn instead.
// The decoder corrects isolated errors and returns the information bits on
// dataOut, each marked by a one-clock dataOut_valid pulse. err_count counts
// the errors the generator has introduced.
//
// All parts share one clock and one active-low asynchronous reset, and each
// paces itself with its own divide-by-N counter, so they stay in step only
// if they leave reset together. N = 17 clocks per information bit lets the
// decoder write one survivor column and trace back 16 columns per bit; the
// encoder samples dataIn on the last clock of each period. The decoded bit
// released in a period belongs to the input taken TB_DEPTH+2 periods before.
module conv_top #(
  parameter int unsigned TB_DEPTH = 15,            // trace-back depth in symbols
  parameter int unsigned N        = TB_DEPTH + 2,  // clocks per information bit
  parameter int unsigned W        = 9,             // path metric width
  parameter int unsigned ERR_BITS = 4,             // error rate 2^-ERR_BITS per channel bit
  parameter bit          USE_FSM  = 1'b0           // FSM form of the encoder
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        dataIn,
  input  logic        err_en,
  input  logic        loopback,
  input  logic        ExtDecodeIn,
  output logic        ExtEncodeOut,
  output logic        dataOut,
  output logic        dataOut_valid,
  output logic [15:0] err_count
);
  logic serial_in, serial_in_err, err_flag, dec_in;

  encoder_top #(.N(N), .USE_FSM(USE_FSM)) u_enc (
    .clk, .reset_n, .dataIn, .serial_in
  );

  error_gen #(.N(N), .ERR_BITS(ERR_BITS)) u_err (
    .clk, .reset_n, .err_en, .serial_in, .serial_in_err, .err_flag, .err_count
  );

  assign ExtEncodeOut = serial_in;
  assign dec_in       = loopback ? serial_in_err : ExtDecodeIn;

  decoder_top #(.N(N), .TB_DEPTH(TB_DEPTH), .W(W)) u_dec (
    .clk, .reset_n, .serial_in_err(dec_in), .dataOut, .dataOut_valid
  );
endmodule
