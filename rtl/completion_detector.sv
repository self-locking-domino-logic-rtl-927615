// completion_detector: completion detection over W dual-rail gates.
//
// Each gate's rails are XORed: the XOR is 1 only once exactly one rail is
// high, i.e. the gate has switched to a valid state.  The AND of all XORs is
// the enable en (the ACK of the handshake): it is 0 during precharge and while
// any gate is still switching, and 1 once every gate is complete.  All gates
// are checked, not only the last one of a chain, as the document does for
// safety.  Combinational, no delay in this model.
module completion_detector #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] f,
  input  logic [W-1:0] f_n,
  output logic         en
);

  logic [W-1:0] done;

  always_comb begin
    done = f ^ f_n;
    en   = &done;
  end

endmodule
