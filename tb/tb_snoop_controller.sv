// tb_snoop_controller: checks the snoop's response table and sequence.
//
// The testbench models the A side of the cache memory (a state and tag per
// entry, the Astate register), the interlock (snoop_safe a random number of
// cycles after the request) and the responder (s_done after a random number
// of cycles of s_resp). For every bus operation against every entry state,
// hit and miss, it checks against the protocol table: whether INHIBIT is
// raised and by the third cycle of the operation, whether the interlock is
// requested, whether the block is supplied (only under the interlock for an
// Owned Exclusively entry, and after the data was re-read), the final entry
// state, that INHIBIT drops at the end and that snoop_busy returns low.
module tb_snoop_controller;
  import bop_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic snoop_start = 0, s_done = 0, s_resp, s_inhibit;
  bus_op_e snoop_op = OP_READ;
  logic match_a;
  state_e a_state, state_value;
  logic bus_adr_a, load_a_state, load_a_tags, load_a_data, set_a_state, wr_a_state;
  logic snoop_req, snoop_rel, snoop_safe = 0, snoop_busy;

  snoop_controller dut (.*);

  // A-side model: one entry is enough, the index is not the snoop's concern
  state_e ent_state;
  logic   ent_tag_hit;
  logic   atag_hit;
  always @(posedge clk) begin
    if (wr_a_state) ent_state <= a_state;
    if (set_a_state) a_state <= state_value;
    else if (load_a_state) a_state <= ent_state;
    if (load_a_tags) atag_hit <= ent_tag_hit;
  end
  assign match_a = atag_hit && (a_state != ST_INV);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bus_op_e op, input state_e s, input bit hit);
    bit exp_inh, exp_lock, exp_resp;
    state_e exp_state;
    int inh_cycle, cyc, lock_wait, resp_len, resp_cnt;
    bit saw_lock, saw_resp, reread_after_safe, resp_before_safe, safe_given;
    string ctx;
    ctx = $sformatf("%s on %s %s", op.name(), s.name(), hit ? "hit" : "miss");
    // expected behaviour (protocol table)
    exp_inh = 0; exp_lock = 0; exp_resp = 0; exp_state = s;
    if (hit && s != ST_INV) begin
      case (op)
        OP_READ: begin
          exp_inh  = (s == ST_EXC || s == ST_NON);
          exp_lock = (s == ST_EXC);
          exp_resp = exp_inh;
          if (s == ST_EXC) exp_state = ST_NON;
        end
        OP_RFO: begin
          exp_inh  = (s == ST_EXC || s == ST_NON);
          exp_lock = (s == ST_EXC);
          exp_resp = exp_inh;
          exp_state = ST_INV;
        end
        OP_WRITE, OP_WFI: exp_state = ST_INV;
        default: ;
      endcase
    end

    ent_state = s; ent_tag_hit = hit;
    lock_wait = $urandom_range(1, 4);
    resp_len  = $urandom_range(2, 8);
    snoop_op = op; snoop_start = 1;
    tick();
    snoop_start = 0;
    inh_cycle = -1; saw_lock = 0; saw_resp = 0; reread_after_safe = 0;
    resp_before_safe = 0; safe_given = 0; resp_cnt = 0;
    cyc = 1;
    while (cyc < 60) begin
      if (s_inhibit && inh_cycle < 0) inh_cycle = cyc;
      if (snoop_req) begin
        saw_lock = 1;
        if (lock_wait > 0) lock_wait--;
        else begin snoop_safe = 1; safe_given = 1; end
      end
      if (load_a_data && safe_given) reread_after_safe = 1;
      if (s_resp) begin
        saw_resp = 1;
        if (exp_lock && !safe_given) resp_before_safe = 1;
        resp_cnt++;
        s_done = (resp_cnt == resp_len);
      end else s_done = 0;
      if (snoop_rel) snoop_safe = 0;
      tick();
      s_done = 0;
      cyc++;
      if (!snoop_busy) break;
    end
    snoop_safe = 0;
    check(!snoop_busy, {ctx, ": snoop finished"});
    check((inh_cycle >= 0) == exp_inh, {ctx, ": INHIBIT"});
    if (exp_inh) check(inh_cycle <= 2, $sformatf("%s: INHIBIT in cycle %0d", ctx, inh_cycle));
    check(saw_lock == exp_lock, {ctx, ": interlock request"});
    check(saw_resp == exp_resp, {ctx, ": block supplied"});
    if (exp_lock) check(reread_after_safe && !resp_before_safe, {ctx, ": data re-read under the lock"});
    check(!s_inhibit, {ctx, ": INHIBIT dropped"});
    check(ent_state == exp_state, $sformatf("%s: final state %s, expected %s", ctx,
                                            ent_state.name(), exp_state.name()));
    tick();
  endtask

  initial begin
    ent_state = ST_INV; ent_tag_hit = 0; a_state = ST_INV; atag_hit = 0;
    repeat (2) tick();
    rst_n = 1; tick();
    check(!snoop_busy && !s_inhibit, "idle after reset");
    repeat (4) begin
      for (int o = 0; o < 5; o++)
        for (int s = 0; s < 4; s++)
          for (int h = 0; h < 2; h++)
            run(bus_op_e'(o), state_e'(s), h[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
