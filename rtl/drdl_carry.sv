// drdl_carry: dual-rail domino carry (majority) gate of the domino ALU's adder.
//
// Inputs a and bb are single-rail and stable (they come from the ALU's operand
// registers); the carry-in arrives dual-rail (ci_t / ci_f, both 0 until the
// previous carry gate has evaluated).  The carry-out rails are
//   co_t = dc_n . (a.bb + (a+bb).ci_t)
//   co_f = dc_n . (a'.bb' + (a'+bb').ci_f)
// so co_t or co_f rises only once the carry-in is valid, and both are 0 in
// precharge.  The document builds only the bitwise AND in domino logic; this
// ripple carry is this design's own extension to give the ALU add, sub and slt.
module drdl_carry (
  input  logic dc_n,
  input  logic a,
  input  logic bb,
  input  logic ci_t,
  input  logic ci_f,
  output logic co_t,
  output logic co_f
);

  always_comb begin
    co_t = dc_n & ((a & bb) | ((a | bb) & ci_t));
    co_f = dc_n & ((~a & ~bb) | ((~a | ~bb) & ci_f));
  end

endmodule
