// tb_s27_dk_locked: checks s27 locked with DK Lock against a golden s27
// model. Three instances run from the same inputs: the default locked
// netlist g(x,k) (10-bit key), its oracle h(x) (ORACLE = 1) and a locked
// netlist with a 6-bit key. Scenarios:
//   1. correct use: activation key for ACT_M cycles, then the final key.
//      Before activation G17 is stuck; the functional phase must start on
//      edge ACT_M+1; afterwards the locked netlist and the oracle must match
//      the golden s27 every cycle.
//   2. the final key applied from reset: the circuit must never activate.
//   3. the activation key kept after activation (a single global key):
//      the circuit must be corrupted.
//   4. random wrong final keys after activation: corruption must show.
// Per-cycle corruption is measured by loading the golden model with the
// netlist's own s27 state and comparing output and next state.
module tb_s27_dk_locked;
  import tb_s27_ref_pkg::*;

  localparam int unsigned M = dk_pkg::ACT_M;
  localparam logic [9:0] KA = dk_pkg::KEY_ACT;
  localparam logic [9:0] KF = dk_pkg::KEY_FINAL;

  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] x;
  logic [9:0] key;
  logic y, y_orc, y6;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  s27_dk_locked dut (.clk(clk), .rst_n(rst_n), .x(x), .key(key), .y(y));
  s27_dk_locked #(.ORACLE(1'b1)) orc (.clk(clk), .rst_n(rst_n), .x(x), .key('0), .y(y_orc));
  s27_dk_locked #(.KEY_N(6)) dut6 (.clk(clk), .rst_n(rst_n), .x(x), .key(key[5:0]), .y(y6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: x=%b key=%b y=%b y_orc=%b y6=%b", what, $time, x, key, y, y_orc, y6);
    end
  endtask

  function automatic s27_state_t st_dut();
    return '{g7: dut.g7, g6: dut.g6, g5: dut.g5};
  endfunction
  function automatic s27_state_t st_orc();
    return '{g7: orc.g7, g6: orc.g6, g5: orc.g5};
  endfunction
  function automatic s27_state_t st_dut6();
    return '{g7: dut6.g7, g6: dut6.g6, g5: dut6.g5};
  endfunction

  task automatic do_reset();
    rst_n = 1'b0;
    x = '0;
    key = KA;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // One cycle: inputs set after the falling edge, sampled on the rising one.
  // Returns 1 when the locked netlist deviated from s27 in this cycle.
  task automatic cycle(input logic [9:0] k, output bit corrupt);
    s27_state_t s;
    logic yo;
    x   = 4'($urandom);
    key = k;
    #1;
    s  = st_dut();
    yo = s27_out(s, x);
    corrupt = (y != yo);
    @(posedge clk);
    #1;
    if (st_dut() != s27_next(s, x)) corrupt = 1'b1;
    @(negedge clk);
  endtask

  bit c;
  int n_corrupt;

  initial begin
    // ---------------------------------------------- 1. correct use
    do_reset();
    for (int i = 1; i <= M + 1; i++) begin
      x = 4'($urandom);
      key = (i <= M) ? KA : KF;
      #1;
      check(y == 1'b1 && y6 == 1'b1, "G17 stuck at 1 before activation");
      check(y == y_orc, "locked equals oracle before activation");
      check(!dut.phase && !orc.phase && !dut6.phase, "still in activation phase");
      @(posedge clk); #1;
      check(dut.act == (i == M) && dut6.act == (i == M), "activation decode on edge M");
      @(negedge clk);
    end
    check(dut.phase && orc.phase && dut6.phase, "functional phase after edge M+1");
    check(dut.u_functional.w == 2'b01, "functional counter left 00 to 01");
    check(orc.k == KF, "oracle switched to the final key");
    // Transparent operation with the final key.
    for (int i = 0; i < 300; i++) begin
      s27_state_t s, s_o, s_6;
      x = 4'($urandom);
      key = KF;
      #1;
      s = st_dut(); s_o = st_orc(); s_6 = st_dut6();
      check(y == s27_out(s, x), "locked output equals s27");
      check(y_orc == s27_out(s_o, x), "oracle output equals s27");
      check(y6 == s27_out(s_6, x), "6-bit-key output equals s27");
      check(y == y_orc, "locked equals oracle");
      @(posedge clk); #1;
      check(st_dut() == s27_next(s, x), "locked next state equals s27");
      check(st_orc() == s27_next(s_o, x), "oracle next state equals s27");
      check(st_dut6() == s27_next(s_6, x), "6-bit-key next state equals s27");
      check(dut.phase && dut.u_functional.w != 2'b00, "never back to 00");
      @(negedge clk);
    end

    // ---------------------------------------------- 2. final key from reset
    do_reset();
    for (int i = 0; i < 60; i++) begin
      cycle(KF, c);
      check(!dut.phase && y == 1'b1, "final key alone never activates");
    end

    // ---------------------------------------------- 3. single global key
    do_reset();
    for (int i = 0; i < M + 1; i++) cycle(KA, c);
    check(dut.phase, "activated by the activation key");
    n_corrupt = 0;
    for (int i = 0; i < 200; i++) begin
      cycle(KA, c);
      if (c) n_corrupt++;
    end
    check(n_corrupt > 0, "activation key as final key corrupts");

    // ---------------------------------------------- 4. wrong final keys
    do_reset();
    for (int i = 0; i < M + 1; i++) cycle(KA, c);
    n_corrupt = 0;
    for (int i = 0; i < 300; i++) begin
      logic [9:0] kw;
      kw = KF ^ (10'b1 << $urandom_range(0, 9));
      cycle(kw, c);
      if (c) n_corrupt++;
    end
    check(n_corrupt > 0, "one wrong final key bit corrupts");
    $display("corrupted cycles with a one-bit-wrong final key: %0d of 300", n_corrupt);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
