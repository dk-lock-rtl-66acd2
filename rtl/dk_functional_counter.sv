// dk_functional_counter: the functional logic of DK Lock.
//
// A modified N-bit ring counter. It resets to INIT and stays there through
// the activation phase. The first clock edge that sees `act` high moves it to
// INIT+1; from then on it advances by one on every clock, wrapping from the
// all-ones state to 0 and skipping INIT, so it never returns to INIT. For the
// 2-bit counter with INIT = 00 the sequence is 00 (held) -> 01 -> 10 -> 11 ->
// 01 -> ..., the state table of the scheme. Leaving INIT is therefore also
// the latch that remembers that the circuit was activated.
//
// The counter bits W drive the blockers of every key gate: all key gates are
// blocked while W == INIT and pass their key gate output otherwise. `phase`
// is the same condition (1 = functional phase) for local use.
//
// Interface: clk, asynchronous active-low reset rst_n (state = INIT), act
// (from the activation counter), w[N-1:0], phase. Needs N >= 2 so that at
// least two states remain after INIT is excluded.
//
// Follows the scheme: state table, n extra flip-flops, no return to the
// initial state, configurable initial state. Own choices: the generalisation
// of the 2-bit table to N bits as "increment, skip INIT", and the reset.
module dk_functional_counter #(
  parameter int unsigned  N    = dk_pkg::FC_N,
  parameter logic [N-1:0] INIT = dk_pkg::FC_INIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act,
  output logic [N-1:0] w,
  output logic         phase
);

  logic [N-1:0] inc;
  logic [N-1:0] w_d;

  assign phase = (w != INIT);

  always_comb begin
    inc = w + N'(1);
    if (inc == INIT) inc = INIT + N'(1);
    // Hold INIT until activated; once out of INIT, run freely.
    w_d = (phase || act) ? inc : w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w <= INIT;
    else        w <= w_d;
  end

  initial begin
    assert (N >= 2) else $error("dk_functional_counter: N must be at least 2");
  end

endmodule
