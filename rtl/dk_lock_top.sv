// dk_lock_top: the two products of DK Lock for s27, side by side.
//
// u_locked is the locked netlist g(x,k): s27 with activation logic,
// functional logic and key gates, whose key inputs are the port `key`. A
// user activates it by driving the activation key for ACT_M clock edges
// after reset and the final key from then on. u_oracle is the oracle h(x),
// the same netlist with its key inputs replaced by fixed-key multiplexers:
// it activates itself and afterwards computes s27. Both share clock and
// reset; each has its own primary inputs and output so that they can be
// driven with the same or different stimuli.
//
// Interface: clk, rst_n (asynchronous, active low), x_lock[3:0] and key for
// the locked netlist, y_lock its output G17; x_oracle[3:0] and y_oracle for
// the oracle. Timing is that of s27_dk_locked.
//
// Follows the scheme: the locking flow yields exactly these two circuits.
// Own choice: presenting them in one top with separate ports.
module dk_lock_top #(
  parameter int unsigned KEY_N = dk_pkg::KEY_N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       x_lock,
  input  logic [KEY_N-1:0] key,
  output logic             y_lock,
  input  logic [3:0]       x_oracle,
  output logic             y_oracle
);

  s27_dk_locked #(.KEY_N(KEY_N), .ORACLE(1'b0)) u_locked (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (x_lock),
    .key   (key),
    .y     (y_lock)
  );

  s27_dk_locked #(.KEY_N(KEY_N), .ORACLE(1'b1)) u_oracle (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (x_oracle),
    .key   ('0),
    .y     (y_oracle)
  );

endmodule
