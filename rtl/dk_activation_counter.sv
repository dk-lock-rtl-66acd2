// dk_activation_counter: the activation logic of DK Lock.
//
// A W-bit up-counter whose every flip-flop input passes through a key-bit
// gate: bit i of the incremented value reaches flip-flop i only when key bit
// i equals bit i of the correct activation key, otherwise a 0 is loaded. The
// 2:1 multiplexer of the scheme (incremented bit or constant 0, selected by
// the key bit) is written in its reduced form, an AND of the incremented bit
// with the key bit or with its inverse. With the correct key the counter
// advances by one per clock; with a wrong key, the bits under wrong key bits
// are cleared each cycle.
//
// The activation signal `act` is a decode of the count against the constant
// M. M is not stored in a register: it exists only as the shape of this
// comparator. `act` is high while count == M, i.e. in the cycle after the
// M-th clock edge at which the correct key was sampled (counting from reset).
//
// Interface: clk, asynchronous active-low reset rst_n (count cleared to 0),
// key[W-1:0] sampled at every rising edge, count[W-1:0] (the flip-flops, for
// observation), act.
//
// Follows the scheme: per-bit key gating of the counter flip-flops, counter
// start at 0, decode of the hidden constant m, one activation flip-flop per
// key bit (so W equals the key size). Own choices: the asynchronous reset and
// the counter simply keeping on counting past M (the functional counter
// latches the activation, so later values of the count do not matter).
module dk_activation_counter #(
  parameter int unsigned      W       = dk_pkg::KEY_N,
  parameter int unsigned      M       = dk_pkg::ACT_M,
  parameter logic [W-1:0]     KEY_ACT = dk_pkg::KEY_ACT[W-1:0]
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] key,
  output logic [W-1:0] count,
  output logic         act
);

  logic [W-1:0] inc;
  logic [W-1:0] key_ok;
  logic [W-1:0] count_d;

  always_comb begin
    inc = count + W'(1);
    // Bit i is 1 when the key bit matches the correct activation key bit:
    // the key bit itself where KEY_ACT[i] = 1, its inverse where it is 0.
    key_ok  = ~(key ^ KEY_ACT);
    count_d = inc & key_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count_d;
  end

  assign act = (count == W'(M));

  initial begin
    assert (M >= 1 && 64'(M) < (64'd1 << W))
      else $error("dk_activation_counter: M=%0d does not fit in %0d bits", M, W);
  end

endmodule
