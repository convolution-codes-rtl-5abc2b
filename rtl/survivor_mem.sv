// survivor_mem: survivor path memory with trace back.
//
// Every symbol the add-compare-select unit produces four came_from bits, one
// per trellis state, telling whether the surviving path into that state came
// from the upper or the lower predecessor. These four bits are all that is
// needed to walk the trellis backwards: from state {a, b} a decision bit c
// leads back to state {b, c}, and the information bit on the edge into any
// state is that state's most significant bit.
//
// The memory is a ring of DEPTH = TB_DEPTH+1 words of four bits. On the
// clock where wr_en (WriteMem) is high the new column is written. In the
// following TB_DEPTH+1 clocks (ReadMem, busy high) the unit reads one
// column per clock, newest first: the walk starts in the state with the
// smallest path metric H (lowest state number on a tie) and steps back one
// symbol per clock. The first TB_DEPTH steps only let the candidate paths
// merge; the bit decided by the last step is sent out on dataOut with a
// one-clock dataOut_valid pulse (OutputData). The decoded bit therefore
// belongs to the symbol TB_DEPTH+1 symbols before the one just written, and
// a symbol period must be at least TB_DEPTH+2 clocks: one write plus
// TB_DEPTH+1 reads, 17 clocks for the default depth of 15 (about five times
// the constraint length). dataOut_valid stays low until enough symbols have
// been written for the walk to stay inside written data.
// Reset empties the memory (no symbols written) and stops any walk.
// The write-one/read-sixteen schedule is that of the simplest trace-back
// decoder; starting from the best metric, the tie rule and the validity
// count are choices of this design.
module survivor_mem
  import conv_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 15,
  parameter int unsigned W        = 9
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  wr_en,
  input  logic [NS-1:0]         came_from,
  input  logic [NS-1:0][W-1:0]  H,
  output logic                  busy,
  output logic                  dataOut,
  output logic                  dataOut_valid
);
  localparam int unsigned DEPTH = TB_DEPTH + 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned SW    = $clog2(TB_DEPTH + 3);

  logic [NS-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [SW-1:0] steps_left;
  logic [SW-1:0] written;            // symbols written, saturating at TB_DEPTH+2
  logic          first;
  state_t        s, s_eff, best;
  logic          c;

  function automatic logic [AW-1:0] ptr_dec(logic [AW-1:0] p);
    return (p == '0) ? AW'(DEPTH - 1) : p - 1'b1;
  endfunction

  function automatic logic [AW-1:0] ptr_inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // state with the smallest path metric
  always_comb begin
    best = '0;
    for (int j = 1; j < int'(NS); j++)
      if (H[j] < H[best]) best = state_t'(j);
  end

  assign busy  = (steps_left != '0);
  assign s_eff = first ? best : s;
  assign c     = mem[rd_ptr][cf_index(s_eff)];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= came_from;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      wr_ptr        <= '0;
      rd_ptr        <= '0;
      steps_left    <= '0;
      written       <= '0;
      first         <= 1'b0;
      s             <= '0;
      dataOut       <= 1'b0;
      dataOut_valid <= 1'b0;
    end else begin
      dataOut_valid <= 1'b0;
      if (wr_en) begin
        rd_ptr     <= wr_ptr;
        wr_ptr     <= ptr_inc(wr_ptr);
        steps_left <= SW'(DEPTH);
        first      <= 1'b1;
        if (written != SW'(TB_DEPTH + 2)) written <= written + 1'b1;
      end else if (busy) begin
        s          <= {s_eff[0], c};
        rd_ptr     <= ptr_dec(rd_ptr);
        steps_left <= steps_left - 1'b1;
        first      <= 1'b0;
        if (steps_left == SW'(1)) begin
          dataOut       <= s_eff[0];
          dataOut_valid <= (written == SW'(TB_DEPTH + 2));
        end
      end
    end
  end

  // A new column must not arrive before the walk for the previous one ends.
  assert property (@(posedge clk) disable iff (!reset_n) wr_en |-> !busy)
    else $error("survivor_mem: symbol arrived during trace back");
endmodule
