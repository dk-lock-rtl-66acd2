// dk_fixed_key_mux: the key source of the DK Lock oracle (activated chip).
//
// The oracle is the locked netlist with its key inputs removed and each key
// bit driven by a 2:1 multiplexer between two constants: bit i of the
// activation key while the circuit is in the activation phase, bit i of the
// final key once it is in the functional phase. The select is the phase
// flag of the functional counter, so the oracle activates itself after m
// cycles and then runs with the final key. Combinational; key bits on which
// the two keys agree come out as constants.
//
// Interface: phase (0 = activation, 1 = functional), key[W-1:0].
//
// Follows the scheme: one fixed-key multiplexer per key bit, fed by the two
// correct key bits. Own choice: the select signal, which the scheme does not
// name; the functional-phase flag is used.
module dk_fixed_key_mux #(
  parameter int unsigned  W         = dk_pkg::KEY_N,
  parameter logic [W-1:0] KEY_ACT   = dk_pkg::KEY_ACT[W-1:0],
  parameter logic [W-1:0] KEY_FINAL = dk_pkg::KEY_FINAL[W-1:0]
) (
  input  logic         phase,
  output logic [W-1:0] key
);

  always_comb begin
    for (int i = 0; i < W; i++)
      key[i] = phase ? KEY_FINAL[i] : KEY_ACT[i];
  end

endmodule
