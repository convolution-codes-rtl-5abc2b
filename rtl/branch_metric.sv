// branch_metric: Hamming branch metrics for one received symbol.
//
// For the received pair convSig = {z1, z0} it gives, as 2-bit numbers, the
// Hamming distance to each symbol a trellis edge can expect: hXXexp is the
// number of bit positions in which convSig differs from XX (0, 1 or 2).
// Each metric is two gates: the high bit is set only when both bits differ
// and the low bit is the XOR of the two difference bits. Purely
// combinational.
module branch_metric (
  input  logic [1:0] convSig,
  output logic [1:0] h00exp,
  output logic [1:0] h01exp,
  output logic [1:0] h10exp,
  output logic [1:0] h11exp
);
  logic y, x;
  assign {y, x} = convSig;

  assign h00exp = { y &  x,   y ^  x };
  assign h01exp = { y & ~x,   y ^ ~x };
  assign h10exp = {~y &  x,  ~y ^  x };
  assign h11exp = {~y & ~x,   y ^  x };
endmodule
