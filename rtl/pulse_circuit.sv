// pulse_circuit: self-locking, self-resetting input pulse circuit (the Delta block).
//
// A request pulse P is accepted only while the enable/acknowledge En is high
// and the circuit has recovered from its previous pulse.  Accepting it drops
// the state Q; Q (buffered, it is the duty-cycle signal DC-bar) stays low for
// tau-Delta, which is the precharge phase of the domino gates it drives.  The
// delayed copy Delta(Q) then sets Q again (self-reset), and the rising edge of
// dc_n starts evaluation.  Delta(Q) stays low for a further tau-Delta after Q
// rises, so the input is locked until then.
//
// State rules (from the document's signal flow graph):
//   Q-bar <= Q . En . P . Delta(Q)        fire
//   Q     <= Q-bar . not Delta(Q-bar)     self-reset after tau-Delta
//   Q holds while En or P is low.
// Y = P and En is the gating AND at the input.
//
// The asynchronous delay line is this design's own synchronous rendering: a
// DELTA-stage shift register clocked by clk, so tau-Delta = DELTA cycles and Q
// changes one cycle after the P/En condition is seen.  dc_n is Q; ready says the
// circuit will accept P (Q and Delta(Q) high); fall_next / rise_next announce
// the falling / rising edge of dc_n at the next clk edge.
module pulse_circuit #(
  parameter int unsigned DELTA = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic p,
  input  logic en,
  output logic y,
  output logic q,
  output logic dq,
  output logic dc_n,
  output logic ready,
  output logic fall_next,
  output logic rise_next
);

  logic [DELTA-1:0] dline;   // delay line: dline[DELTA-1] is Delta(Q)

  assign y     = p & en;
  assign dq    = dline[DELTA-1];
  assign dc_n  = q;
  assign ready = q & dq;
  // The next clk edge drops Q (fire) / raises Q (self-reset).  Blocks that are
  // clocked by the edges of dc_n use these as the enables of those edges.
  assign fall_next = q & y & dq;
  assign rise_next = ~q & ~dq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= 1'b1;
      dline <= '1;
    end else begin
      if (fall_next)
        q <= 1'b0;             // fire: lock the input, start precharge
      else if (rise_next)
        q <= 1'b1;             // self-reset after tau-Delta
      dline <= DELTA'({dline, q});
    end
  end

endmodule
