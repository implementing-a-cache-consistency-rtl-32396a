// tb_interlock: checks the asymmetric ProcHas / SnoopWants interlock.
//
// Directed cases, cycle by cycle: the processor takes a free lock one cycle
// after asking; the snoop reaches its safe state two cycles after asking (it
// must wait a full cycle); when both ask in the same cycle the processor wins
// and the snoop enters only after the processor releases; a processor that
// asks while SnoopWants is raised waits until the snoop releases. A random
// phase checks that the two critical sections never overlap and that both
// sides always get through.
module tb_interlock;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic proc_req = 0, proc_rel = 0, snoop_req = 0, snoop_rel = 0;
  logic proc_has, snoop_wants, snoop_safe;

  interlock dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p_in, s_in;
  logic ph_d, ss_d;

  initial begin
    repeat (2) tick();
    rst_n = 1;
    tick();
    check(!proc_has && !snoop_wants && !snoop_safe, "idle after reset");

    // processor alone: lock one cycle after the request
    proc_req = 1; tick();
    check(proc_has, "processor takes a free lock in one cycle");
    proc_req = 0; proc_rel = 1; tick(); proc_rel = 0;
    check(!proc_has, "processor releases");

    // snoop alone: SnoopWants after one cycle, safe after two
    snoop_req = 1; tick();
    check(snoop_wants && !snoop_safe, "snoop raises SnoopWants, not yet safe");
    tick();
    check(snoop_safe, "snoop safe two cycles after asking");
    snoop_req = 0; snoop_rel = 1; tick(); snoop_rel = 0;
    check(!snoop_wants && !snoop_safe, "snoop releases");

    // tie: the processor wins
    proc_req = 1; snoop_req = 1; tick();
    check(proc_has && snoop_wants, "tie: processor has, snoop wants");
    proc_req = 0;
    repeat (3) begin tick(); check(!snoop_safe, "snoop held off while ProcHas"); end
    proc_rel = 1; tick(); proc_rel = 0;
    check(!proc_has && !snoop_safe, "processor released, snoop not yet safe");
    tick();
    check(snoop_safe, "snoop enters after the processor");
    // processor asks while the snoop holds the lock
    proc_req = 1;
    repeat (3) begin tick(); check(!proc_has, "processor waits while SnoopWants"); end
    snoop_req = 0; snoop_rel = 1; tick(); snoop_rel = 0;
    check(!snoop_wants && !proc_has, "snoop released");
    tick();
    check(proc_has, "processor enters after the snoop");
    proc_req = 0; proc_rel = 1; tick(); proc_rel = 0;

    // snoop asks one cycle earlier than the processor: the snoop wins
    snoop_req = 1; tick();
    proc_req = 1; tick();
    check(snoop_safe && !proc_has, "earlier snoop wins");
    snoop_req = 0; snoop_rel = 1; tick(); snoop_rel = 0; tick();
    check(proc_has, "processor follows");
    proc_req = 0; proc_rel = 1; tick(); proc_rel = 0;

    // random: mutual exclusion and progress
    p_in = 0; s_in = 0;
    for (int k = 0; k < 3000; k++) begin
      proc_rel  = proc_has && ($urandom_range(0, 2) == 0);
      snoop_rel = snoop_safe && ($urandom_range(0, 2) == 0);
      if (!proc_has && !proc_req) proc_req = ($urandom_range(0, 3) == 0);
      else if (proc_has && proc_rel) proc_req = 0;
      if (!snoop_wants && !snoop_req) snoop_req = ($urandom_range(0, 3) == 0);
      else if (snoop_safe && snoop_rel) snoop_req = 0;
      ph_d = proc_has; ss_d = snoop_safe;
      tick();
      if (proc_has && !ph_d) p_in++;
      if (snoop_safe && !ss_d) s_in++;
      check(!(proc_has && snoop_safe), "mutual exclusion");
    end
    check(p_in > 100 && s_in > 100, $sformatf("progress: proc %0d snoop %0d", p_in, s_in));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
