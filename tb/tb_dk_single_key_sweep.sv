// tb_dk_single_key_sweep: the property the dual-key scheme is built on.
// For every one of the 2^10 possible key values, the locked netlist is reset
// and run with that key held constant, beside the oracle, on the same random
// input sequence. No constant key may reproduce the oracle's output sequence
// (keys that never activate leave G17 stuck; keys that activate are wrong
// final keys, because the activation and final keys differ). As a control,
// the two-key schedule (activation key for ACT_M cycles, then the final key)
// must reproduce the oracle on every cycle.
module tb_dk_single_key_sweep;

  localparam int unsigned M = dk_pkg::ACT_M;
  localparam logic [9:0] KA = dk_pkg::KEY_ACT;
  localparam logic [9:0] KF = dk_pkg::KEY_FINAL;
  localparam int unsigned RUN = 120;

  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] x;
  logic [9:0] key;
  logic y_lock, y_oracle;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dk_lock_top dut (
    .clk(clk), .rst_n(rst_n),
    .x_lock(x), .key(key), .y_lock(y_lock),
    .x_oracle(x), .y_oracle(y_oracle));

  // Fixed input sequence, the same for every key.
  logic [3:0] stim [RUN];

  // Runs one session; returns the number of cycles where the outputs differ
  // and whether the locked netlist reached the functional phase.
  task automatic run(input bit two_key, input logic [9:0] k,
                     output int mismatches, output bit activated);
    rst_n = 1'b0;
    x = '0;
    key = k;
    @(negedge clk);
    rst_n = 1'b1;
    mismatches = 0;
    for (int i = 0; i < RUN; i++) begin
      x = stim[i];
      key = two_key ? ((i < M) ? KA : KF) : k;
      #1;
      if (y_lock != y_oracle) mismatches++;
      @(negedge clk);
    end
    activated = dut.u_locked.u_functional.phase;
  endtask

  int mm, n_activating, n_never;
  bit act;

  initial begin
    foreach (stim[i]) stim[i] = 4'($urandom);
    // Control: the correct two-key schedule matches the oracle everywhere.
    run(1'b1, '0, mm, act);
    checks++;
    if (mm != 0 || !act) begin
      failures++;
      $display("FAIL two-key schedule: %0d mismatches, activated=%0b", mm, act);
    end
    n_activating = 0;
    n_never = 0;
    for (int k = 0; k < 1024; k++) begin
      run(1'b0, 10'(k), mm, act);
      if (act) n_activating++;
      else     n_never++;
      checks++;
      if (mm == 0) begin
        failures++;
        $display("FAIL constant key %b reproduces the oracle", 10'(k));
      end
    end
    $display("constant keys: %0d activate the circuit, %0d never do; none matches the oracle",
             n_activating, n_never);
    // Both kinds of wrong key must have been met.
    checks++;
    if (n_activating == 0 || n_never == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
