// tb_dk_key_gate: exhaustive check of the key gate with blockers, in all
// four variants (final key bit 0/1, stuck-at-0/stuck-at-1 blocker), for the
// default 2-bit blocker bus with initial state 00 and for a 3-bit bus with
// initial state 101. Expected: while w equals the initial state, y is the
// blocker's constant; otherwise y equals x when k is the final key bit and
// NOT x when it is not.
module tb_dk_key_gate;
  import dk_pkg::*;

  logic x, k;
  logic [1:0] w2;
  logic [2:0] w3;
  logic [3:0] y2;
  logic [1:0] y3;
  int checks = 0, failures = 0;

  dk_key_gate #(.KF(1'b0), .STYLE(BLOCK_LOW))  u00 (.x(x), .k(k), .w(w2), .y(y2[0]));
  dk_key_gate #(.KF(1'b1), .STYLE(BLOCK_LOW))  u10 (.x(x), .k(k), .w(w2), .y(y2[1]));
  dk_key_gate #(.KF(1'b0), .STYLE(BLOCK_HIGH)) u01 (.x(x), .k(k), .w(w2), .y(y2[2]));
  dk_key_gate #(.KF(1'b1), .STYLE(BLOCK_HIGH)) u11 (.x(x), .k(k), .w(w2), .y(y2[3]));
  dk_key_gate #(.N(3), .INIT(3'b101), .KF(1'b1), .STYLE(BLOCK_LOW))
    u3l (.x(x), .k(k), .w(w3), .y(y3[0]));
  dk_key_gate #(.N(3), .INIT(3'b101), .KF(1'b0), .STYLE(BLOCK_HIGH))
    u3h (.x(x), .k(k), .w(w3), .y(y3[1]));

  function automatic logic expect_y(logic xx, logic kk, logic kf, logic blocked,
                                    logic stuck_high);
    if (blocked) return stuck_high;
    return (kk == kf) ? xx : !xx;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b k=%b w2=%b w3=%b y2=%b y3=%b", what, x, k, w2, w3, y2, y3);
    end
  endtask

  int n_blocked = 0, n_pass = 0, n_corrupt = 0;

  initial begin
    for (int i = 0; i < 32; i++) begin
      {w3, w2} = 5'(i >> 0);
      for (int j = 0; j < 4; j++) begin
        {x, k} = 2'(j);
        #1;
        check(y2[0] == expect_y(x, k, 1'b0, w2 == 2'b00, 1'b0), "KF=0 stuck-0");
        check(y2[1] == expect_y(x, k, 1'b1, w2 == 2'b00, 1'b0), "KF=1 stuck-0");
        check(y2[2] == expect_y(x, k, 1'b0, w2 == 2'b00, 1'b1), "KF=0 stuck-1");
        check(y2[3] == expect_y(x, k, 1'b1, w2 == 2'b00, 1'b1), "KF=1 stuck-1");
        check(y3[0] == expect_y(x, k, 1'b1, w3 == 3'b101, 1'b0), "3-bit stuck-0");
        check(y3[1] == expect_y(x, k, 1'b0, w3 == 3'b101, 1'b1), "3-bit stuck-1");
        if (w2 == 2'b00) n_blocked++;
        else if (k == 1'b0) n_pass++;
        else n_corrupt++;
      end
    end
    check(n_blocked > 0 && n_pass > 0 && n_corrupt > 0, "all cases visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
