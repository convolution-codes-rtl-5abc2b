// conv_pkg: constants, types and helper functions shared by the rate-1/2,
// constraint-length-3 convolution encoder and its Viterbi decoder.
//
// The code is the one the whole design is built around: generator vectors
// Gz1 = [111] and Gz0 = [101], i.e. z1 = x(n)^x(n-1)^x(n-2) and
// z0 = x(n)^x(n-2). The trellis state is the two shift-register bits
// {x(n-1), x(n-2)}, written S_{x(n-1)x(n-2)}; as a number J = 2*x(n-1)+x(n-2).
//
// The decision vector came_from[3:0] is ordered as the states are drawn in
// the trellis (S00, S10, S01, S11), so came_from[i] belongs to the state
// whose J is i with its two bits swapped. A decision bit of 0 means the
// surviving path came from the upper predecessor (the one whose oldest bit
// x(n-2) was 0), 1 means the lower one.
package conv_pkg;

  localparam int unsigned K     = 3;           // constraint length
  localparam int unsigned NS    = 1 << (K-1);  // number of trellis states
  localparam logic [K-1:0] GZ1  = 3'b111;      // taps on x(n), x(n-1), x(n-2)
  localparam logic [K-1:0] GZ0  = 3'b101;

  typedef logic [K-2:0] state_t;               // {x(n-1), x(n-2)}
  typedef logic [1:0]   symbol_t;              // {z1, z0}

  // Encoder output for present input x leaving trellis state s.
  function automatic symbol_t enc_out(state_t s, logic x);
    logic [K-1:0] w;
    w = {x, s};
    return {^(w & GZ1), ^(w & GZ0)};
  endfunction

  // Position of state s in the came_from vector (trellis drawing order).
  function automatic int unsigned cf_index(state_t s);
    return int'({s[0], s[1]});
  endfunction

endpackage
