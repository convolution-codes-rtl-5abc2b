// encoder_top: the transmitting side. A bit_timer divides the clock by N;
// once per bit period the encoder takes in dataIn, and a multiplexer steered
// by z1select sends the two code bits out on one serial line, z1 during the
// first N/2 clocks of the period and z0 during the rest (two channel bits per
// information bit).
//
// Interface: dataIn must be stable on the clock edge that ends count N-1
// (the shift_en cycle); the code bits for that input appear on serial_in
// during the next bit period. serial_in is combinational from registers, so
// it changes only just after clock edges.
// The default N = 6 is a divide-by-six encoder on its own; the complete
// system uses a longer period so the decoder has time for its trace back.
// USE_FSM selects the Mealy-machine form of the constraint-length-3 encoder
// instead of the shift-register form; both give the same output.
module encoder_top #(
  parameter int unsigned  N       = 6,
  parameter bit           USE_FSM = 1'b0,
  parameter int unsigned  K       = 3,
  parameter logic [K-1:0] GZ1     = 3'b111,
  parameter logic [K-1:0] GZ0     = 3'b101
) (
  input  logic clk,
  input  logic reset_n,
  input  logic dataIn,
  output logic serial_in
);
  logic [$clog2(N)-1:0] count;
  logic shift_en, z1select, mid_edge;
  logic z1, z0;

  bit_timer #(.N(N)) u_timer (
    .clk, .reset_n, .count, .shift_en, .z1select, .mid_edge
  );

  if (USE_FSM) begin : g_fsm
    logic [1:0] state;
    conv_encoder_fsm u_enc (
      .clk, .reset_n, .shift_en, .x(dataIn), .z1, .z0, .state
    );
    initial assert (K == 3 && GZ1 == 3'b111 && GZ0 == 3'b101)
      else $error("encoder_top: the FSM encoder exists only for K=3, [111]/[101]");
  end else begin : g_sr
    logic [K-2:0] state;
    conv_encoder_sr #(.K(K), .GZ1(GZ1), .GZ0(GZ0)) u_enc (
      .clk, .reset_n, .shift_en, .x(dataIn), .z1, .z0, .state
    );
  end

  assign serial_in = z1select ? z1 : z0;
endmodule
