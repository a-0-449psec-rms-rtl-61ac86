// tb_pfd: tests the three-state PFD and the cycle-slip detector on it.
// Phase cases: with equal frequencies and the reference leading by d, the
// UP pulse must last d (to 1 ps) and no DN pulse may last longer than
// zero; with the DCO leading, the roles swap. Frequency cases: a faster
// reference must give mostly UP pulses and UP slips ("slow"), a faster DCO
// mostly DN pulses and DN slips ("fast"), allowing one slip of the other
// kind where the bursts start or stop. With en low both flags stay low.
`timescale 1ns/1ps
module tb_pfd;
  logic rst_n = 1'b0, en = 1'b1, a = 1'b0, b = 1'b0;
  logic up, dn, slow, fast;
  int checks = 0, failures = 0;

  pfd      dut  (.rst_n, .en, .a, .b, .up, .dn);
  pfd_slip slip (.rst_n, .a, .b, .up, .dn, .slow, .fast);

  realtime up_rise, dn_rise, up_w, dn_w;
  int n_up, n_dn, n_slow, n_fast;
  // only pulses of non-zero width count (the later flag of a pair is
  // cleared in the same instant it is set)
  always @(posedge up) up_rise = $realtime;
  always @(negedge up) begin up_w = $realtime - up_rise; if (up_w > 0.001) n_up++; end
  always @(posedge dn) dn_rise = $realtime;
  always @(negedge dn) begin dn_w = $realtime - dn_rise; if (dn_w > 0.001) n_dn++; end
  always @(posedge a) begin if (slow) n_slow++; if (fast) n_fast++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive a (period ta) and b (period tb) for n periods of a, b offset by
  // off (a negative offset delays a instead); both stop at the same time
  task automatic run(input real ta, input real tb, input real off, input int n);
    realtime tend;
    tend = $realtime + n * ta;
    fork
      begin
        if (off < 0) #(-off);
        while ($realtime + ta <= tend) begin a = 1'b1; #(ta / 2); a = 1'b0; #(ta / 2); end
      end
      begin
        if (off > 0) #(off);
        while ($realtime + tb <= tend) begin b = 1'b1; #(tb / 2); b = 1'b0; #(tb / 2); end
      end
    join
  endtask

  task automatic clear();
    #1 rst_n = 1'b0;
    #0.1 rst_n = 1'b1;
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b1;
    // reference leads by 0.3 ns
    up_w = 0; dn_w = -1;
    run(2.0, 2.0, 0.3, 4);
    check(up_w > 0.299 && up_w < 0.301, $sformatf("UP width %.3f for 0.3 ns lead", up_w));
    check(dn_w <= 0.0, "no DN pulse width when reference leads");
    // DCO leads by 0.5 ns
    clear(); up_w = 0; dn_w = 0;
    run(2.0, 2.0, -0.5, 4);
    check(up_w <= 0.0, "no UP pulse width when DCO leads");
    check(dn_w > 0.499 && dn_w < 0.501, $sformatf("DN width %.3f for 0.5 ns lag", dn_w));
    clear();
    // reference faster: many UP pulses and slow slips
    n_up = 0; n_dn = 0; n_slow = 0; n_fast = 0;
    run(1.0, 1.25, 0.1, 40);
    check(n_up > n_dn, $sformatf("faster reference: up %0d > dn %0d", n_up, n_dn));
    check(n_slow >= 5 && n_fast <= 1, $sformatf("faster reference: slow slips %0d, fast %0d", n_slow, n_fast));
    clear();
    // DCO faster
    n_up = 0; n_dn = 0; n_slow = 0; n_fast = 0;
    run(1.25, 1.0, 0.1, 40);
    check(n_dn > n_up, $sformatf("faster DCO: dn %0d > up %0d", n_dn, n_up));
    check(n_fast >= 5 && n_slow <= 1, $sformatf("faster DCO: fast slips %0d, slow %0d", n_fast, n_slow));
    // disabled
    en = 1'b0; #1; n_up = 0; n_dn = 0;
    run(1.0, 1.3, 0.2, 10);
    check(n_up == 0 && n_dn == 0 && !up && !dn, "PFD disabled holds flags low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
