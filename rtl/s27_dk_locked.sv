// s27_dk_locked: the ISCAS'89 benchmark s27 locked with DK Lock.
//
// s27 is a small sequential benchmark: four inputs G0..G3, one output G17,
// three D flip-flops G5, G6, G7 and ten gates. DK Lock is added to it as
// three structural parts:
//   activation logic  dk_activation_counter, KEY_N flip-flops, one per key
//                     bit, counting only under the activation key, with the
//                     decode of the hidden cycle count ACT_M;
//   functional logic  dk_functional_counter, FC_N flip-flops that stay in
//                     FC_INIT until activated and never return to it; its
//                     bits are the blockers;
//   integration logic one dk_key_gate per key bit, each on a different gate
//                     output of s27 (in key-bit order: G14, G8, G12, G15,
//                     G16, G9, G11, G10, G13, G17). Key gates alternate between
//                     the stuck-at-0 and stuck-at-1 blocker forms.
// All three see the same key inputs. After reset the key inputs must carry
// the activation key for ACT_M clock edges; the count then equals ACT_M, the
// next edge moves the functional counter out of its initial state, and from
// then on the key gates are released. With the final key on the key inputs
// every key gate is then transparent and the circuit computes s27 exactly;
// with any other key it computes a corrupted s27. Before activation every
// key gate output is stuck, so G17 and the next state do not depend on the
// key gates' inputs.
//
// ORACLE = 1 builds the oracle h(x) instead of g(x,k): the key port is
// ignored and the key wires come from dk_fixed_key_mux, which supplies the
// activation key in the activation phase and the final key after it. The
// oracle thus behaves as an activated chip with its keys built in.
//
// Interface: clk, asynchronous active-low reset rst_n (clears the s27
// flip-flops, the activation counter and the functional counter), x[3:0] =
// G3..G0, key[KEY_N-1:0], y = G17. All state changes on the rising clock
// edge; y is combinational from x, key and the state.
//
// Follows the scheme: the three added parts, one activation flip-flop and
// one key gate per key bit, key gates on chosen host signals, the oracle
// built by replacing the key inputs with fixed-key multiplexers, s27 with a
// 10-bit key as the main configuration. Own choices: which s27 signals carry
// the key gates, the key values, the reset of the s27 flip-flops to 0 and
// KEY_N limited to 1..10 (one key gate per s27 gate).
module s27_dk_locked #(
  parameter int unsigned         KEY_N     = dk_pkg::KEY_N,
  parameter int unsigned         ACT_M     = dk_pkg::ACT_M,
  parameter int unsigned         FC_N      = dk_pkg::FC_N,
  parameter logic [FC_N-1:0]     FC_INIT   = dk_pkg::FC_INIT,
  parameter logic [KEY_N-1:0]    KEY_ACT   = dk_pkg::KEY_ACT[KEY_N-1:0],
  parameter logic [KEY_N-1:0]    KEY_FINAL = dk_pkg::KEY_FINAL[KEY_N-1:0],
  parameter bit                  ORACLE    = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       x,
  input  logic [KEY_N-1:0] key,
  output logic             y
);

  localparam int unsigned SITES = 10;

  // ---------------------------------------------------------------- keys
  logic [KEY_N-1:0] k;
  logic [FC_N-1:0]  w;
  logic             phase;

  if (ORACLE) begin : g_oracle_key
    dk_fixed_key_mux #(
      .W(KEY_N), .KEY_ACT(KEY_ACT), .KEY_FINAL(KEY_FINAL)
    ) u_fixed_key_mux (
      .phase (phase),
      .key   (k)
    );
  end else begin : g_key_port
    assign k = key;
  end

  // ---------------------------------------------------- activation logic
  logic [KEY_N-1:0] act_count;
  logic             act;

  dk_activation_counter #(
    .W(KEY_N), .M(ACT_M), .KEY_ACT(KEY_ACT)
  ) u_activation (
    .clk   (clk),
    .rst_n (rst_n),
    .key   (k),
    .count (act_count),
    .act   (act)
  );

  // ---------------------------------------------------- functional logic
  dk_functional_counter #(
    .N(FC_N), .INIT(FC_INIT)
  ) u_functional (
    .clk   (clk),
    .rst_n (rst_n),
    .act   (act),
    .w     (w),
    .phase (phase)
  );

  // ------------------------------------------------------ host circuit
  // s27 flip-flops
  logic g5, g6, g7;
  // raw gate outputs (before their key gate) and the signals their loads see
  logic [SITES-1:0] raw, lk;
  // site order: 0 G14, 1 G8, 2 G12, 3 G15, 4 G16, 5 G9, 6 G11, 7 G10, 8 G13, 9 G17
  logic g14, g8, g12, g15, g16, g9, g11, g10, g13, g17;

  always_comb begin
    raw[0] = ~x[0];                 // G14 = NOT(G0)
    raw[1] = g14 & g6;              // G8  = AND(G14, G6)
    raw[2] = ~(x[1] | g7);          // G12 = NOR(G1, G7)
    raw[3] = g12 | g8;              // G15 = OR(G12, G8)
    raw[4] = x[3] | g8;             // G16 = OR(G3, G8)
    raw[5] = ~(g16 & g15);          // G9  = NAND(G16, G15)
    raw[6] = ~(g5 | g9);            // G11 = NOR(G5, G9)
    raw[7] = ~(g14 | g11);          // G10 = NOR(G14, G11)
    raw[8] = ~(x[2] | g12);         // G13 = NOR(G2, G12)
    raw[9] = ~g11;                  // G17 = NOT(G11)
  end

  assign {g17, g13, g10, g11, g9, g16, g15, g12, g8, g14} = lk;

  for (genvar i = 0; i < SITES; i++) begin : g_site
    if (i < KEY_N) begin : g_locked
      dk_key_gate #(
        .N     (FC_N),
        .INIT  (FC_INIT),
        .KF    (KEY_FINAL[i]),
        .STYLE ((i % 2 == 0) ? dk_pkg::BLOCK_LOW : dk_pkg::BLOCK_HIGH)
      ) u_key_gate (
        .x (raw[i]),
        .k (k[i]),
        .w (w),
        .y (lk[i])
      );
    end else begin : g_plain
      assign lk[i] = raw[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g5 <= 1'b0;
      g6 <= 1'b0;
      g7 <= 1'b0;
    end else begin
      g5 <= g10;
      g6 <= g11;
      g7 <= g13;
    end
  end

  assign y = g17;

  initial begin
    assert (KEY_N >= 1 && KEY_N <= SITES)
      else $error("s27_dk_locked: KEY_N=%0d outside 1..%0d", KEY_N, SITES);
  end

endmodule
