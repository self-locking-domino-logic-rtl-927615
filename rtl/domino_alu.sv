// domino_alu: self-locking dual-rail domino ALU.
//
// The ALU is one handshake stage.  A request pulse on req enters a
// pulse_circuit (the Delta block); if the ALU is idle and complete, its duty
// cycle dc_n drops for the precharge phase and every domino gate empties.  At
// the rising edge of dc_n the operand registers take a, b and the operation,
// and all XLEN result gates evaluate in parallel.  A completion_detector XORs
// the two rails of every result bit and ANDs the XORs: that enable en is fed
// back to the pulse circuit (it unlocks the input) and, once the pulse circuit
// has recovered, is given out as ack.  The result rails stay valid until the
// next request; the output register f_q takes them at the falling edge of
// dc_n, just before they are precharged, as in the document.
//
// The document designs the bitwise AND this way (one AND2 DRDL gate per bit,
// all in parallel).  The other operations the processor needs are this
// design's own extension in the same style: each result bit is a 6-input DRDL
// gate over (sel[2:0], carry, b, a), a dual-rail domino ripple carry chain
// (drdl_carry) feeds add and sub, and a separate DRDL gate forms the slt bit.
// Arithmetic bit gates evaluate only once their carry-in is valid, so en
// waits for the whole carry chain.
//
// Operations (alu_op_e): add, sub, and, or, xor, slt (signed).
// Timing (clk cycles, DELTA = d): req seen at cycle t, dc_n low from t+1 to
// t+d+1, result and en valid from t+d+2, ack from t+2d+2.  req is ignored
// while ack is low.
module domino_alu
  import slp_pkg::*;
#(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DELTA = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         alu_ctrl,
  output logic [XLEN-1:0] result,
  output logic            zero,
  output logic            en,
  output logic            ack,
  output logic            dc_n,
  output logic [XLEN-1:0] f_q
);

  // Truth table of one result bit: index {sel[2:0], c, bb, a}
  function automatic logic [63:0] bit_table();
    logic [63:0] t;
    for (int k = 0; k < 64; k++) begin
      logic ka, kb, kc;
      logic [2:0] ks;
      ka = k[0]; kb = k[1]; kc = k[2]; ks = k[5:3];
      case (ks)
        3'd0:    t[k] = ka ^ kb ^ kc;   // add / sub
        3'd1:    t[k] = ka & kb;        // and
        3'd2:    t[k] = ka | kb;        // or
        3'd3:    t[k] = ka ^ kb;        // xor
        default: t[k] = 1'b0;           // slt: upper bits are 0
      endcase
    end
    return t;
  endfunction

  // Truth table of the slt gate: index {slt, c31, bb31, a31}
  function automatic logic [15:0] lt_table();
    logic [15:0] t;
    for (int k = 0; k < 16; k++) begin
      logic ka, kb, kc, ks;
      ka = k[0]; kb = k[1]; kc = k[2]; ks = k[3];
      // bb = ~b in slt mode: signs differ when a == bb
      t[k] = ks & ((ka == kb) ? ka : ~kc);
    end
    return t;
  endfunction

  localparam logic [63:0] BIT_FUNC = bit_table();
  localparam logic [15:0] LT_FUNC  = lt_table();

  logic ready, fall_next, rise_next;

  pulse_circuit #(.DELTA(DELTA)) u_delta (
    .clk, .rst_n, .p(req), .en, .y(), .q(), .dq(), .dc_n, .ready, .fall_next, .rise_next
  );

  // Operand registers: loaded on the rising edge of dc_n
  logic [XLEN-1:0] a_q, b_q;
  (* fsm_encoding = "none" *) alu_op_e op_q;   // a data register, not a state machine

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      op_q <= ALU_ADD;
    end else if (rise_next) begin
      a_q  <= a;
      b_q  <= b;
      op_q <= alu_ctrl;
    end
  end

  logic            sub;
  logic            arith;
  logic [2:0]      sel;
  logic [XLEN-1:0] bb;

  always_comb begin
    sub   = (op_q == ALU_SUB) || (op_q == ALU_SLT);
    arith = (op_q == ALU_ADD) || (op_q == ALU_SUB);
    unique case (op_q)
      ALU_ADD, ALU_SUB: sel = 3'd0;
      ALU_AND:          sel = 3'd1;
      ALU_OR:           sel = 3'd2;
      ALU_XOR:          sel = 3'd3;
      default:          sel = 3'd4;
    endcase
    bb = sub ? ~b_q : b_q;
  end

  // Dual-rail ripple carry chain
  logic [XLEN:0] c_t, c_f;
  assign c_t[0] = dc_n &  sub;
  assign c_f[0] = dc_n & ~sub;

  logic [XLEN-1:0] g_f, g_fn, bit_dc;

  for (genvar i = 0; i < XLEN; i++) begin : g_bit
    drdl_carry u_carry (
      .dc_n, .a(a_q[i]), .bb(bb[i]), .ci_t(c_t[i]), .ci_f(c_f[i]),
      .co_t(c_t[i+1]), .co_f(c_f[i+1])
    );
    // arithmetic bits evaluate once their carry-in is valid
    assign bit_dc[i] = dc_n & (~arith | c_t[i] | c_f[i]);
    drdl_gate #(.N(6), .FUNC(BIT_FUNC)) u_gate (
      .dc_n(bit_dc[i]), .x({sel, c_t[i], bb[i], a_q[i]}), .f(g_f[i]), .f_n(g_fn[i])
    );
  end

  logic lt_f, lt_fn;
  drdl_gate #(.N(4), .FUNC(LT_FUNC)) u_lt (
    .dc_n(dc_n & (c_t[XLEN-1] | c_f[XLEN-1])),
    .x({sel[2], c_t[XLEN-1], bb[XLEN-1], a_q[XLEN-1]}),
    .f(lt_f), .f_n(lt_fn)
  );

  // Result rails; bit 0 is the dual-rail OR of the bit gate and the slt gate
  logic [XLEN-1:0] r_f, r_fn;
  always_comb begin
    r_f  = g_f;
    r_fn = g_fn;
    r_f[0]  = g_f[0] | lt_f;
    r_fn[0] = g_fn[0] & lt_fn;
  end

  completion_detector #(.W(XLEN)) u_cd (.f(r_f), .f_n(r_fn), .en);

  assign result = r_f;
  assign zero   = (r_f == '0);
  assign ack    = en & ready;

  // Output register F: loaded on the falling edge of dc_n
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         f_q <= '0;
    else if (fall_next) f_q <= r_f;
  end

  // The rails of a complete gate are never both 1
  a_disjoint: assert property (@(posedge clk) disable iff (!rst_n) (r_f & r_fn) == '0);
  // Precharge empties every gate
  a_precharge: assert property (@(posedge clk) disable iff (!rst_n) !dc_n |-> !en);

endmodule
