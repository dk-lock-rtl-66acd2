// dk_pkg: constants shared by the DK Lock modules.
//
// DK Lock protects a sequential circuit with two keys that are applied, one
// after the other, to the same key inputs. The defaults below describe the
// main configuration: a 10-bit key (one activation flip-flop and one key gate
// per key bit), activation after m = 9 cycles of the activation key, and a
// 2-bit functional counter whose initial state is 00. The key size of 10 and
// the 2-bit counter with initial state 00 follow the published scheme; m = 9
// is the scheme's worked example. The two key values are this design's own
// random choice; any pair of distinct values works.
package dk_pkg;

  // Key size N (number of key inputs, activation flip-flops and key gates).
  parameter int unsigned KEY_N = 10;

  // Number of cycles m the activation key must be applied for.
  parameter int unsigned ACT_M = 9;

  // Width n of the functional (ring) counter and its initial state.
  parameter int unsigned FC_N    = 2;
  parameter logic [FC_N-1:0] FC_INIT = '0;

  // Correct activation key k_a* and final (functional) key k_f*.
  parameter logic [KEY_N-1:0] KEY_ACT   = 10'b10_1100_1110;
  parameter logic [KEY_N-1:0] KEY_FINAL = 10'b01_1010_0101;

  // Key gate styles: which stuck value a blocked key gate produces.
  typedef enum logic {
    BLOCK_LOW  = 1'b0,  // blocked output stuck at 0 (AND-type blocker)
    BLOCK_HIGH = 1'b1   // blocked output stuck at 1 (OR-type blocker)
  } block_style_e;

endpackage
