// tb_dk_activation_counter: checks the key-gated activation counter.
// Two instances: the four-bit example of the scheme (m = 9, activation when
// the count is 1001) and the default ten-bit counter. A reference model
// (increment, then clear the bits whose key bit is wrong) is run beside
// each; the tests cover the exact activation cycle under the correct key,
// a fully wrong key that never lets the counter move, a partly wrong key
// and random keys.
module tb_dk_activation_counter;

  localparam int unsigned W4 = 4;
  localparam int unsigned M4 = 9;
  localparam logic [W4-1:0] KA4 = 4'b0110;
  localparam int unsigned W10 = dk_pkg::KEY_N;
  localparam int unsigned M10 = dk_pkg::ACT_M;
  localparam logic [W10-1:0] KA10 = dk_pkg::KEY_ACT;

  logic clk = 1'b0;
  logic rst_n;
  logic [W4-1:0]  key4,  count4;
  logic [W10-1:0] key10, count10;
  logic act4, act10;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dk_activation_counter #(.W(W4), .M(M4), .KEY_ACT(KA4)) dut4 (
    .clk(clk), .rst_n(rst_n), .key(key4), .count(count4), .act(act4));
  dk_activation_counter dut10 (
    .clk(clk), .rst_n(rst_n), .key(key10), .count(count10), .act(act10));

  logic [W4-1:0]  m4;
  logic [W10-1:0] m10;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count4=%0d model4=%0d act4=%0b count10=%0d model10=%0d act10=%0b",
               what, count4, m4, act4, count10, m10, act10);
    end
  endtask

  // One clock edge with the given keys; models advance alongside.
  task automatic step(input logic [W4-1:0] k4, input logic [W10-1:0] k10);
    key4  = k4;
    key10 = k10;
    @(posedge clk);
    m4  = (m4 + 1'b1) & ~(k4 ^ KA4);
    m10 = (m10 + 1'b1) & ~(k10 ^ KA10);
    #1;
    check(count4 == m4 && count10 == m10, "count");
    check(act4 == (m4 == W4'(M4)) && act10 == (m10 == W10'(M10)), "act");
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    key4 = '0; key10 = '0;
    m4 = '0; m10 = '0;
    @(negedge clk);
    #1;
    check(count4 == 0 && count10 == 0 && !act4 && !act10, "reset");
    rst_n = 1'b1;
  endtask

  int n_act;

  initial begin
    do_reset();
    // Correct key: activation after exactly M edges, not before.
    for (int i = 1; i <= 12; i++) begin
      step(KA4, KA10);
      check(act4 == (i == M4), "act4 on cycle M");
      check(act10 == (i == M10), "act10 on cycle M");
      if (i == M4) check(count4 == 4'b1001, "count is 1001 at activation");
      @(negedge clk);
    end
    // Fully wrong key: the counter never leaves 0.
    do_reset();
    for (int i = 0; i < 40; i++) begin
      step(~KA4, ~KA10);
      check(count4 == 0 && count10 == 0 && !act4 && !act10, "wrong key holds 0");
      @(negedge clk);
    end
    // Key wrong in bit 0 only: the counter can never become odd, so it can
    // never show 9.
    do_reset();
    for (int i = 0; i < 40; i++) begin
      step(KA4 ^ 4'b0001, KA10 ^ 10'b1);
      check(!act4 && !act10, "bit-0-wrong key never activates");
      @(negedge clk);
    end
    // Random keys against the model.
    do_reset();
    n_act = 0;
    for (int i = 0; i < 2000; i++) begin
      // mostly correct keys so that the counters do move
      step(($urandom_range(0, 3) == 0) ? W4'($urandom) : KA4,
           ($urandom_range(0, 3) == 0) ? W10'($urandom) : KA10);
      if (act4) n_act++;
      @(negedge clk);
    end
    check(n_act > 0, "random run reached activation at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
