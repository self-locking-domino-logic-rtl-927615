// drdl_gate: dual-rail domino logic (DRDL) gate.
//
// A domino gate works in two phases set by the duty-cycle input dc_n.  While
// dc_n is 0 (precharge) both rails F and F-bar are 0: the gate is "empty".
// When dc_n rises (evaluate) exactly one rail goes to 1: F if the function of
// the inputs is true, F-bar if it is false.  Because the two rails are
// disjoint once the gate has switched, F xor F-bar tells whether the gate has
// finished (see completion_detector).
//
// As on the FPGA, where one LUT6_2 holds both rails, the function is given as
// a truth table FUNC indexed by the input vector x (bit k of FUNC is the value
// for x == k).  The default is the AND of all inputs, the table of the
// document's AND gate.  N up to 5 fits one LUT6_2 with the dc input; N = 6
// stands for a pair of LUT6s (this design's own use, for wide decodes).
//
// Timing: purely combinational; the rails follow dc_n and x with no delay in
// this model.
module drdl_gate #(
  parameter int unsigned N = 5,
  parameter logic [(1<<N)-1:0] FUNC = {1'b1, {((1<<N)-1){1'b0}}}
) (
  input  logic         dc_n,
  input  logic [N-1:0] x,
  output logic         f,
  output logic         f_n
);

  logic v;

  always_comb begin
    v   = FUNC[x];
    f   = dc_n &  v;
    f_n = dc_n & ~v;
  end

endmodule
