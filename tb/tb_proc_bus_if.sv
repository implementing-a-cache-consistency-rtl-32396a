// tb_proc_bus_if: checks the processor bus handshake.
//
// The testbench plays the processor and the cache controller. For random
// reads, writes (with random byte strobes), test-and-sets and hinted reads
// it checks that the request reaches the controller with the right kind,
// address, byte lanes and data one cycle after the address strobe, that
// pr_valid drops with pr_done, that DTACK follows pr_done by one cycle with
// the controller's word, that DTACK stays high until the strobe drops and
// that no second request is raised meanwhile.
module tb_proc_bus_if;
  import bop_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic p_as = 0, p_rw = 1, p_uds = 0, p_lds = 0, p_tas = 0, p_own = 0;
  logic [18:0] p_adr = '0;
  logic [15:0] p_wdata = '0, p_rdata;
  logic p_dtack;
  logic pr_valid, pr_own, pr_done = 0;
  proc_op_e pr_op;
  logic [1:0] pr_be;
  logic [15:0] pr_wdata, pr_rdata = '0;
  logic [18:0] pr_adr;

  proc_bus_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) tick();
    rst_n = 1; tick();
    check(!pr_valid && !p_dtack, "idle after reset");
    for (int k = 0; k < 500; k++) begin
      logic [18:0] a; logic [15:0] wd, rd; logic rw, tas, own; logic [1:0] be;
      proc_op_e exp_op; int lat, hold;
      a = 19'($urandom); wd = 16'($urandom); rd = 16'($urandom);
      rw = 1'($urandom_range(0, 1)); tas = ($urandom_range(0, 5) == 0); own = 1'($urandom_range(0, 1));
      be = 2'($urandom_range(1, 3));
      exp_op = tas ? PR_TAS : (rw ? PR_READ : PR_WRITE);
      p_adr = a; p_wdata = wd; p_rw = rw; p_tas = tas; p_own = own;
      p_uds = be[1]; p_lds = be[0]; p_as = 1;
      check(!pr_valid, "no request before the strobe is sampled");
      tick();
      // the processor may change its lines now; the interface holds them
      p_adr = ~a; p_wdata = ~wd;
      check(pr_valid, "request one cycle after AS");
      check(pr_op == exp_op && pr_adr == a && pr_be == be && pr_wdata == wd && pr_own == own,
            "request fields latched");
      lat = $urandom_range(0, 6);
      repeat (lat) begin
        tick();
        check(pr_valid && !p_dtack, "request held while the controller works");
      end
      pr_done = 1; pr_rdata = rd;
      #1 check(!pr_valid, "pr_valid drops with pr_done");
      tick();
      pr_done = 0; pr_rdata = '0;
      check(p_dtack && p_rdata == rd, "DTACK with the read word one cycle after pr_done");
      check(!pr_valid, "no request while DTACK");
      hold = $urandom_range(0, 3);
      repeat (hold) begin
        tick();
        check(p_dtack && !pr_valid, "DTACK held until AS drops");
      end
      p_as = 0;
      tick();
      check(!p_dtack && !pr_valid, "DTACK released after AS");
      repeat ($urandom_range(0, 2)) tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
