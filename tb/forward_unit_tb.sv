// forward_unit_tb: self-checking test of the forwarding hazard detector.
// Exhaustive over the control bits and random register numbers, with
// directed cases for $0, loads and matching registers.
module forward_unit_tb;
  logic [4:0] x_rs, x_rt, m_wa;
  logic       m_we, m_load, fwd_a, fwd_b;
  int checks = 0, failures = 0;

  forward_unit dut (.x_rs, .x_rt, .m_we, .m_load, .m_wa, .fwd_a, .fwd_b);

  task automatic run(logic [4:0] rs, logic [4:0] rt, logic we, logic ld, logic [4:0] wa);
    logic ea, eb;
    x_rs = rs; x_rt = rt; m_we = we; m_load = ld; m_wa = wa;
    #1;
    ea = we && !ld && wa != 0 && rs == wa;
    eb = we && !ld && wa != 0 && rt == wa;
    checks++;
    if (fwd_a !== ea || fwd_b !== eb) begin
      failures++;
      $display("FAIL rs=%0d rt=%0d we=%b ld=%b wa=%0d : %b%b exp %b%b", rs, rt, we, ld, wa, fwd_a, fwd_b, ea, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 32; w++)
      for (int c = 0; c < 4; c++) begin
        run(5'(w), 5'(w), c[0], c[1], 5'(w));
        run(5'(w), 5'(w + 1), c[0], c[1], 5'(w));
        run(5'(w + 1), 5'(w), c[0], c[1], 5'(w));
      end
    repeat (2000) run(5'($urandom_range(3)), 5'($urandom_range(3)), 1'($urandom), 1'($urandom), 5'($urandom_range(3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
