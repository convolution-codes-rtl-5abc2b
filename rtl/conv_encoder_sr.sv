// conv_encoder_sr: rate-1/2 convolution encoder built as a shift register.
//
// The input bit x is first caught in the register x0 (the present bit x(n)),
// and x0 then moves on through K-1 further flip-flops holding x(n-1) ...
// x(n-K+1). All K flip-flops load only when shift_en is high, so the
// encoder can share a fast clock with the decoder. The two outputs are XOR
// trees over the taps named by the generator vectors: bit K-1 of a vector
// is the tap on x(n), bit 0 the tap on x(n-K+1), so Gz1 = [1101] is written
// 4'b1101 and has no connection to x(n-2).
//
// Timing: x is sampled on the clock edge that ends a shift_en cycle; z1/z0
// are combinational from the registers and are valid for the whole following
// bit period. After reset all flip-flops are 0 (state S00).
// The defaults are the constraint-length-3 code, Gz1 = [111], Gz0 = [101];
// constraint length 4 with Gz1 = [1101], Gz0 = [1111] is the other code the
// worked examples use. The separate input register x0 follows the usual
// circuit diagram of the encoder.
module conv_encoder_sr #(
  parameter int unsigned    K   = 3,
  parameter logic [K-1:0]   GZ1 = 3'b111,
  parameter logic [K-1:0]   GZ0 = 3'b101
) (
  input  logic         clk,
  input  logic         reset_n,
  input  logic         shift_en,
  input  logic         x,
  output logic         z1,
  output logic         z0,
  output logic [K-2:0] state        // {x(n-1), ..., x(n-K+1)}
);
  logic [K-1:0] window;             // {x(n), x(n-1), ..., x(n-K+1)}

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)      window <= '0;
    else if (shift_en) window <= {x, window[K-1:1]};   // right shift, x enters at the top
  end

  assign z1    = ^(window & GZ1);
  assign z0    = ^(window & GZ0);
  assign state = window[K-2:0];
endmodule
