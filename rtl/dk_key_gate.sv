// dk_key_gate: the integration logic of DK Lock, one per key bit.
//
// A conventional key gate followed by blocker logic, inserted on a signal x
// of the host circuit; its output y replaces x at all of x's loads.
//   key gate : g = x XOR k (when the correct final key bit KF is 0) or
//              x XNOR k (when KF is 1), so g == x exactly when k == KF.
//   blockers : the functional-counter bits w. While w equals INIT (the
//              activation phase, w = 00 for the default counter) the blocker
//              forces y to a constant, whatever x and k are. STYLE picks the
//              constant: BLOCK_LOW gives y = g AND (w0 OR w1), stuck at 0;
//              BLOCK_HIGH gives y = g OR NOR(w0, w1), stuck at 1. In every
//              other state of w, y = g.
// The gate is purely combinational.
//
// Follows the scheme: traditional key gate, blockers that hold the output at
// a fixed value before activation and release it in every later counter
// state, y == x only with the correct final key bit, more than one gate-level
// form of the same function. Own choices: XOR/XNOR as the key gate and the
// two blocker forms (AND/OR).
module dk_key_gate
  import dk_pkg::*;
#(
  parameter int unsigned  N     = dk_pkg::FC_N,
  parameter logic [N-1:0] INIT  = dk_pkg::FC_INIT,
  parameter logic         KF    = 1'b0,
  parameter block_style_e STYLE = BLOCK_LOW
) (
  input  logic         x,
  input  logic         k,
  input  logic [N-1:0] w,
  output logic         y
);

  logic g;
  logic unblock;

  always_comb begin
    g       = x ^ k ^ KF;
    // Any difference from the initial state releases the blocker; for INIT =
    // 00 this is simply w0 OR w1.
    unblock = |(w ^ INIT);
    if (STYLE == BLOCK_LOW) y = g & unblock;
    else                    y = g | ~unblock;
  end

endmodule
