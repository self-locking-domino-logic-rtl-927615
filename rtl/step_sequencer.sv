// step_sequencer: runs the request/acknowledge handshakes of one controller
// state at a time and tells the synchronous datapath when to load.
//
// For every state of the domino controller it
//   1. holds ctrl_req until the controller accepts it (ctrl_ack high, the
//      pulse circuit fires in that cycle),
//   2. waits for ctrl_ack again: the new state and its control outputs are
//      valid,
//   3. if the state uses the ALU, holds alu_req until the DRDL ALU accepts it
//      and then waits for alu_ack: the ALU result is valid,
//   4. raises commit for one cycle, in which the datapath registers load.
// Then it requests the next state.  So each state takes as long as its own
// handshakes, not a fixed clock period.  The document says the controller
// drives the other components synchronously and starts the ALU handshake
// itself; the sequencing states are this design's own.
// Interface: level req signals, level ack inputs; run = 0 stops before the
// next request.
module step_sequencer (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic ctrl_ack,
  input  logic uses_alu,
  input  logic alu_ack,
  output logic ctrl_req,
  output logic alu_req,
  output logic commit
);

  typedef enum logic [2:0] {
    S_IDLE, S_CREQ, S_CWAIT, S_AREQ, S_AWAIT, S_COMMIT
  } seq_state_e;

  seq_state_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= S_IDLE;
    else begin
      unique case (st)
        S_IDLE:   if (run)      st <= S_CREQ;
        S_CREQ:   if (ctrl_ack) st <= S_CWAIT;
        S_CWAIT:  if (ctrl_ack) st <= uses_alu ? S_AREQ : S_COMMIT;
        S_AREQ:   if (alu_ack)  st <= S_AWAIT;
        S_AWAIT:  if (alu_ack)  st <= S_COMMIT;
        S_COMMIT: st <= run ? S_CREQ : S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

  assign ctrl_req = (st == S_CREQ);
  assign alu_req  = (st == S_AREQ);
  assign commit   = (st == S_COMMIT);

  // Handshake rules: a request is held until it is accepted, and the two
  // handshakes and the commit never overlap
  a_creq_held: assert property (@(posedge clk) disable iff (!rst_n)
                                ctrl_req && !ctrl_ack |=> ctrl_req);
  a_areq_held: assert property (@(posedge clk) disable iff (!rst_n)
                                alu_req && !alu_ack |=> alu_req);
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({ctrl_req, alu_req, commit}));

endmodule
