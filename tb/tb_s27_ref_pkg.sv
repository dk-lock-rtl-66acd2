// tb_s27_ref_pkg: golden model of the unlocked ISCAS'89 s27 benchmark for the
// testbenches, written from the benchmark's gate list independently of the
// RTL. State is {G7, G6, G5}; inputs are {G3, G2, G1, G0}.
package tb_s27_ref_pkg;

  typedef struct packed {
    logic g7;
    logic g6;
    logic g5;
  } s27_state_t;

  // Output G17 for a given state and input.
  function automatic logic s27_out(s27_state_t s, logic [3:0] x);
    logic g14, g8, g12, g15, g16, g9, g11;
    g14 = !x[0];
    g8  = g14 && s.g6;
    g12 = !(x[1] || s.g7);
    g15 = g12 || g8;
    g16 = x[3] || g8;
    g9  = !(g16 && g15);
    g11 = !(s.g5 || g9);
    return !g11;
  endfunction

  // Next state for a given state and input.
  function automatic s27_state_t s27_next(s27_state_t s, logic [3:0] x);
    logic g14, g8, g12, g15, g16, g9, g11, g10, g13;
    s27_state_t n;
    g14 = !x[0];
    g8  = g14 && s.g6;
    g12 = !(x[1] || s.g7);
    g15 = g12 || g8;
    g16 = x[3] || g8;
    g9  = !(g16 && g15);
    g11 = !(s.g5 || g9);
    g10 = !(g14 || g11);
    g13 = !(x[2] || g12);
    n.g5 = g10;
    n.g6 = g11;
    n.g7 = g13;
    return n;
  endfunction

endpackage
