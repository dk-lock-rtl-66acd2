// tb_dk_lock_top: end-to-end test of the DK Lock top at its default
// parameters (s27, 10-bit key, activation after 9 cycles, 2-bit functional
// counter). The locked netlist and the oracle are driven with the same
// random primary inputs over several sessions, each started by a reset:
//   correct   activation key for ACT_M cycles, then the final key;
//   wrongact  a wrong activation key (must never activate);
//   wrongfin  correct activation, then a wrong final key (must corrupt).
// In each session the oracle activates itself. Checked every cycle: the
// activation latency (functional phase from edge ACT_M+1 on), G17 stuck
// while blocked, the locked netlist equal to the oracle when both hold the
// correct keys, and both equal to a golden s27 model loaded with their own
// state. Each mechanism is counted and must occur at least once:
// activation, blocked cycle that hid a different s27 output, functional
// counter wrap 11 -> 01, oracle key switch, transparent cycle with the final
// key, corrupted cycle with a wrong final key, held-off activation.
module tb_dk_lock_top;
  import tb_s27_ref_pkg::*;

  localparam int unsigned M = dk_pkg::ACT_M;
  localparam logic [9:0] KA = dk_pkg::KEY_ACT;
  localparam logic [9:0] KF = dk_pkg::KEY_FINAL;

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

  int n_activation = 0, n_blocked_hid = 0, n_wrap = 0, n_oracle_switch = 0;
  int n_transparent = 0, n_corrupt = 0, n_held_off = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: x=%b key=%b y_lock=%b y_oracle=%b", what, $time,
               x, key, y_lock, y_oracle);
    end
  endtask

  function automatic s27_state_t st_lock();
    return '{g7: dut.u_locked.g7, g6: dut.u_locked.g6, g5: dut.u_locked.g5};
  endfunction
  function automatic s27_state_t st_orc();
    return '{g7: dut.u_oracle.g7, g6: dut.u_oracle.g6, g5: dut.u_oracle.g5};
  endfunction

  typedef enum {CORRECT, WRONGACT, WRONGFIN} session_e;

  task automatic session(input session_e kind, input int len);
    s27_state_t sl, so;
    logic [1:0] w_prev;
    logic orc_phase_prev;
    logic [9:0] kw;
    bit corrupt;
    int corrupt_here;
    rst_n = 1'b0;
    x = '0;
    key = '0;
    @(negedge clk);
    rst_n = 1'b1;
    corrupt_here = 0;
    // a wrong activation key: correct except in the counter's bit 0
    kw = KA ^ 10'b1;
    for (int i = 1; i <= len; i++) begin
      x = 4'($urandom);
      case (kind)
        CORRECT:  key = (i <= M) ? KA : KF;
        WRONGACT: key = kw;
        WRONGFIN: key = (i <= M) ? KA : (KF ^ (10'b1 << $urandom_range(0, 9)));
      endcase
      #1;
      sl = st_lock();
      so = st_orc();
      w_prev = dut.u_locked.w;
      orc_phase_prev = dut.u_oracle.phase;
      // The oracle is never different from the locked netlist under the
      // correct key schedule, and always follows s27 once active.
      if (kind == CORRECT) check(y_lock == y_oracle, "locked equals oracle");
      if (dut.u_oracle.phase)
        check(y_oracle == s27_out(so, x), "oracle output equals s27");
      if (!dut.u_locked.phase) begin
        check(y_lock == 1'b1, "G17 stuck while blocked");
        if (s27_out(sl, x) != 1'b1) n_blocked_hid++;
      end else begin
        corrupt = (y_lock != s27_out(sl, x));
        if (kind == CORRECT) begin
          check(!corrupt, "locked output equals s27 with the final key");
          if (!corrupt) n_transparent++;
        end
      end
      @(posedge clk); #1;
      // activation latency: functional phase exactly from edge M+1 on
      if (kind != WRONGACT)
        check(dut.u_locked.phase == (i >= M + 1), "activation on edge M+1");
      else
        check(!dut.u_locked.phase, "wrong activation key never activates");
      check(dut.u_oracle.phase == (i >= M + 1), "oracle activates on edge M+1");
      if (dut.u_locked.phase && w_prev == 2'b00) n_activation++;
      if (w_prev == 2'b11) begin
        check(dut.u_locked.w == 2'b01, "counter wraps 11 -> 01");
        n_wrap++;
      end
      if (!orc_phase_prev && dut.u_oracle.phase) begin
        check(dut.u_oracle.g_oracle_key.u_fixed_key_mux.key == KF, "oracle key is final key");
        n_oracle_switch++;
      end
      if (dut.u_oracle.phase && orc_phase_prev)
        check(st_orc() == s27_next(so, x), "oracle next state equals s27");
      begin
        if (dut.u_locked.phase && w_prev != 2'b00) begin
          if (kind == CORRECT)
            check(st_lock() == s27_next(sl, x), "locked next state equals s27");
          else if (st_lock() != s27_next(sl, x) || y_lock != s27_out(sl, x))
            corrupt_here++;
        end
      end
      @(negedge clk);
    end
    if (kind == WRONGFIN) begin
      check(corrupt_here > 0, "wrong final key corrupts");
      n_corrupt += corrupt_here;
    end
    if (kind == WRONGACT) begin
      check(!dut.u_locked.phase, "held off");
      n_held_off++;
    end
  endtask

  initial begin
    session(CORRECT,  200);
    session(WRONGACT, 100);
    session(WRONGFIN, 200);
    session(CORRECT,  50);
    $display("mechanisms: activation=%0d blocked_hid=%0d wrap=%0d oracle_switch=%0d transparent=%0d corrupt=%0d held_off=%0d",
             n_activation, n_blocked_hid, n_wrap, n_oracle_switch, n_transparent,
             n_corrupt, n_held_off);
    check(n_activation > 0, "activation happened");
    check(n_blocked_hid > 0, "blocker hid s27 output");
    check(n_wrap > 0, "functional counter wrapped");
    check(n_oracle_switch > 0, "oracle key switched");
    check(n_transparent > 0, "transparent operation");
    check(n_corrupt > 0, "wrong final key corruption");
    check(n_held_off > 0, "activation held off");
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
