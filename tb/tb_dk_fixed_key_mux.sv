// tb_dk_fixed_key_mux: checks that the oracle key source gives the
// activation key in the activation phase and the final key afterwards, for
// the default 10-bit keys and a 4-bit instance with its own keys.
module tb_dk_fixed_key_mux;

  localparam logic [3:0] KA4 = 4'b0110;
  localparam logic [3:0] KF4 = 4'b1011;

  logic phase;
  logic [9:0] key10;
  logic [3:0] key4;
  int checks = 0, failures = 0;

  dk_fixed_key_mux u10 (.phase(phase), .key(key10));
  dk_fixed_key_mux #(.W(4), .KEY_ACT(KA4), .KEY_FINAL(KF4)) u4 (.phase(phase), .key(key4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: phase=%b key10=%b key4=%b", what, phase, key10, key4);
    end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) begin
      phase = i[0];
      #1;
      check(key10 == (phase ? 10'b01_1010_0101 : 10'b10_1100_1110), "10-bit key");
      check(key4 == (phase ? 4'b1011 : 4'b0110), "4-bit key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
