// tb_dk_functional_counter: checks the functional (ring) counter against the
// 2-bit state table of the scheme (00 held until activation, then 01, 10,
// 11, 01, ...) and a 3-bit counter with initial state 101, which must hold
// 101, then visit the other seven states in order and never return to 101.
module tb_dk_functional_counter;

  logic clk = 1'b0;
  logic rst_n;
  logic act2, act3;
  logic [1:0] w2;
  logic [2:0] w3;
  logic ph2, ph3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dk_functional_counter dut2 (
    .clk(clk), .rst_n(rst_n), .act(act2), .w(w2), .phase(ph2));
  dk_functional_counter #(.N(3), .INIT(3'b101)) dut3 (
    .clk(clk), .rst_n(rst_n), .act(act3), .w(w3), .phase(ph3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: w2=%b ph2=%b w3=%b ph3=%b", what, w2, ph2, w3, ph3);
    end
  endtask

  // Expected 2-bit sequence after activation (Table of the scheme).
  logic [1:0] seq2 [0:3] = '{2'b01, 2'b10, 2'b11, 2'b01};
  // Expected 3-bit sequence from 101, skipping 101.
  logic [2:0] seq3 [0:7] = '{3'b110, 3'b111, 3'b000, 3'b001, 3'b010,
                             3'b011, 3'b100, 3'b110};

  initial begin
    rst_n = 1'b0;
    act2 = 1'b0; act3 = 1'b0;
    #12;
    check(w2 == 2'b00 && !ph2 && w3 == 3'b101 && !ph3, "reset state");
    rst_n = 1'b1;
    // Activation phase: hold the initial state.
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      check(w2 == 2'b00 && !ph2, "2-bit holds 00");
      check(w3 == 3'b101 && !ph3, "3-bit holds 101");
    end
    // One-cycle activation pulse.
    @(negedge clk);
    act2 = 1'b1; act3 = 1'b1;
    @(negedge clk);
    act2 = 1'b0; act3 = 1'b0;
    check(w2 == 2'b01 && ph2, "2-bit 00 -> 01 on act");
    check(w3 == 3'b110 && ph3, "3-bit 101 -> 110 on act");
    for (int i = 1; i < 4; i++) begin
      @(negedge clk);
      check(w2 == seq2[i], "2-bit sequence");
      check(w3 == seq3[i], "3-bit sequence");
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      // act is ignored once running, and the initial state never returns
      act2 = $urandom_range(0, 1);
      act3 = $urandom_range(0, 1);
      check(w2 != 2'b00 && ph2, "2-bit never returns to 00");
      check(w3 != 3'b101 && ph3, "3-bit never returns to 101");
    end
    // Sequence check of the 3-bit counter over one full lap.
    begin
      logic [2:0] prev;
      prev = w3;
      for (int i = 0; i < 14; i++) begin
        @(negedge clk);
        check(w3 == ((prev + 3'd1 == 3'b101) ? 3'b110 : prev + 3'd1), "3-bit step");
        prev = w3;
      end
    end
    // Reset returns to the initial state.
    rst_n = 1'b0;
    #1;
    check(w2 == 2'b00 && w3 == 3'b101, "reset again");
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
