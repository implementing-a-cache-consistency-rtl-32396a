// tb_cache_controller: checks the processor-side controller with a real cache
// memory, bus interface and interlock around it, one cache alone on a
// modelled bus with main memory (no other caches, so the snoop side of the
// interlock is driven by the testbench).
//
// Directed cases check data, the entry state and the bus operations issued:
// read miss (one Read, UnOwned), read hit (no bus operation, two cycles from
// request to pr_done), write to UnOwned (Write-For-Invalidation, then Owned
// Exclusively), write to Owned Exclusively (no bus operation, the block
// written only while ProcHas is held), a write that must wait because the
// snoop holds the interlock, read and write misses that replace an owned
// entry (Write-Without-Invalidation with the old block reaching memory, then
// Read or Read-For-Ownership), test-and-set, the non-shared read hint and
// byte lanes. A random phase then compares every read with a reference copy
// of memory.
module tb_cache_controller;
  import bop_pkg::*;

  localparam int IDX_W = 4, TAG_W = 13, ADR_W = 19;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // processor side
  logic pr_valid = 0, pr_own = 0, pr_done;
  proc_op_e pr_op = PR_READ;
  logic [1:0] pr_be = 2'b11;
  logic [15:0] pr_wdata = '0, pr_rdata;
  logic [18:0] proc_adr = '0;

  // internal wiring
  logic match_a, match_b;
  state_e a_state, b_state, state_value;
  logic [12:0] a_tag;
  logic [3:0] a_adr;
  logic [15:0] a_word_out, a_word_in, b_word_out, b_word_in;
  logic [3:0] mux_a;
  logic load_a_word;
  logic proc_adr_b, load_b_state, load_b_tags, load_b_data, set_b_tags, wr_b_tags;
  logic wr_b_data, load_b_word;
  logic [1:0] b_be;
  logic proc_adr_a, load_a_state, load_a_tags, load_a_data, set_a_adr, set_a_state;
  logic wr_a_state, wr_a_data;
  logic bus_hold, granted, m_start, m_done;
  bus_op_e m_op;
  logic [16:0] m_blkadr;
  logic proc_req, proc_rel, proc_has;
  logic snoop_req = 0, snoop_rel = 0, snoop_wants, snoop_safe;
  logic snoop_start, s_done;
  bus_op_e snoop_op;
  logic [18:0] snoop_adr;

  // bus
  logic [0:0] req, gnt, cmd, ack, inh;
  bus_op_e op [1];
  logic [18:0] adr [1];
  logic [15:0] data [1];
  logic b_cmd, b_ack, b_inh;
  bus_op_e b_op;
  logic [18:0] b_adr;
  logic [15:0] b_data;

  cache_controller dut (
    .clk, .rst_n, .pr_valid, .pr_op, .pr_own, .pr_be, .pr_wdata, .proc_adr,
    .pr_done, .pr_rdata,
    .proc_adr_b, .load_b_state, .load_b_tags, .load_b_data, .set_b_tags, .wr_b_tags,
    .wr_b_data, .load_b_word, .b_be, .b_word_in, .match_b, .b_state, .b_word_out,
    .proc_adr_a, .load_a_state, .load_a_tags, .load_a_data, .set_a_adr, .set_a_state,
    .state_value, .wr_a_state, .wr_a_data, .a_state, .a_tag, .a_adr,
    .bus_hold, .granted, .m_start, .m_op, .m_blkadr, .m_done, .snoop_busy (1'b0),
    .proc_req, .proc_rel, .proc_has
  );

  cache_datapath u_mem (
    .clk, .rst_n, .bus_adr (snoop_adr), .proc_adr,
    .bus_adr_a (1'b0), .proc_adr_a, .load_a_state, .load_a_tags, .load_a_data,
    .set_a_state, .state_value, .wr_a_state, .wr_a_data, .set_a_adr,
    .mux_a, .load_a_word, .a_word_in, .match_a, .a_state, .a_tag, .a_adr, .a_word_out,
    .proc_adr_b, .load_b_state, .load_b_tags, .load_b_data, .set_b_tags, .wr_b_tags,
    .wr_b_data, .load_b_word, .b_be, .b_word_in, .match_b, .b_state, .b_word_out
  );

  interlock u_lock (.clk, .rst_n, .proc_req, .proc_rel, .proc_has,
                    .snoop_req, .snoop_rel, .snoop_wants, .snoop_safe);

  sys_bus_if u_sbi (
    .clk, .rst_n,
    .sb_req (req[0]), .sb_cmd_o (cmd[0]), .sb_op_o (op[0]), .sb_adr_o (adr[0]),
    .sb_data_o (data[0]), .sb_ack_o (ack[0]), .sb_inh_o (inh[0]),
    .sb_gnt (gnt[0]), .sb_cmd_i (b_cmd), .sb_op_i (b_op), .sb_adr_i (b_adr),
    .sb_data_i (b_data), .sb_ack_i (b_ack),
    .bus_hold, .granted, .m_start, .m_op, .m_blkadr, .m_done,
    .snoop_start, .snoop_op, .snoop_adr, .s_resp (1'b0), .s_inhibit (1'b0), .s_done,
    .mux_a, .load_a_word, .a_word_in, .a_word_out
  );

  tb_sysbus_model #(.N(1), .ADR_W(19)) bus (
    .clk, .rst_n, .req, .gnt, .cmd, .op, .adr, .data, .ack, .inh,
    .b_cmd, .b_op, .b_adr, .b_data, .b_ack, .b_inh
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  // bus operation counter and local-write monitor
  int n_op [8];
  int bad_local;
  logic cmd_d;
  always @(posedge clk) begin
    cmd_d <= b_cmd;
    if (b_cmd && !cmd_d) n_op[b_op]++;
    if (wr_b_data && !bus_hold && !proc_has) bad_local++;
  end
  function automatic int total_ops();
    return n_op[0] + n_op[1] + n_op[2] + n_op[3] + n_op[4];
  endfunction

  logic [15:0] gold [logic [18:0]];
  function automatic logic [15:0] gold_rd(logic [18:0] a);
    return gold.exists(a) ? gold[a] : 16'(a * 7 + 16'h1234);
  endfunction

  function automatic state_e ent(logic [18:0] a);
    if (u_mem.state_mem[a[5:2]] != ST_INV && u_mem.tag_mem[a[5:2]] == a[18:6])
      return u_mem.state_mem[a[5:2]];
    return ST_INV;
  endfunction

  task automatic req_op(input proc_op_e o, input logic [18:0] a, input logic [15:0] wd,
                        input logic [1:0] be, input logic own,
                        output logic [15:0] rd, output int cyc);
    pr_op = o; proc_adr = a; pr_wdata = wd; pr_be = be; pr_own = own; pr_valid = 1;
    cyc = 0;
    do begin tick(); cyc++; end while (!pr_done);
    rd = pr_rdata;
    pr_valid = 0;
    tick();
  endtask

  task automatic rd_chk(input logic [18:0] a, input string what);
    logic [15:0] d; int c;
    req_op(PR_READ, a, '0, 2'b11, 1'b0, d, c);
    check(d == gold_rd(a), $sformatf("%s: read %05h = %04h, expected %04h", what, a, d, gold_rd(a)));
  endtask

  task automatic wr(input logic [18:0] a, input logic [15:0] v);
    logic [15:0] d; int c;
    gold[a] = v;
    req_op(PR_WRITE, a, v, 2'b11, 1'b0, d, c);
  endtask

  function automatic logic [18:0] mk(int tag, int idx, int w);
    return {13'(tag), 4'(idx), 2'(w)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d; int c, n0;
    logic [18:0] A, B, C;
    foreach (n_op[k]) n_op[k] = 0;
    bad_local = 0;
    repeat (3) tick();
    rst_n = 1; tick();

    A = mk(10, 1, 0); B = mk(20, 2, 0); C = mk(30, 2, 0);

    n0 = n_op[OP_READ];
    rd_chk(A + 2, "read miss");
    check(n_op[OP_READ] == n0 + 1 && ent(A) == ST_UNO, "read miss: one Read, UnOwned");
    n0 = total_ops();
    req_op(PR_READ, A + 1, '0, 2'b11, 1'b0, d, c);
    check(d == gold_rd(A + 1) && c == 2 && total_ops() == n0,
          $sformatf("read hit: %0d cycles, expected 2, no bus operation", c));

    n0 = n_op[OP_WFI];
    wr(A + 3, 16'h3333);
    check(n_op[OP_WFI] == n0 + 1 && ent(A) == ST_EXC, "write on UnOwned: WFI, Owned Exclusively");
    rd_chk(A + 3, "after WFI write");

    n0 = total_ops();
    wr(A, 16'h4444);
    check(total_ops() == n0 && ent(A) == ST_EXC, "write on Owned Exclusively: no bus operation");
    rd_chk(A, "local write");

    // snoop holds the interlock: the write waits
    snoop_req = 1; tick(); tick();
    check(snoop_safe, "testbench snoop holds the lock");
    pr_op = PR_WRITE; proc_adr = A + 1; pr_wdata = 16'h5555; pr_be = 2'b11; pr_own = 0;
    pr_valid = 1; gold[A + 1] = 16'h5555;
    repeat (8) begin tick(); check(!pr_done && !wr_b_data, "write waits for the interlock"); end
    snoop_req = 0; snoop_rel = 1; tick(); snoop_rel = 0;
    c = 0;
    while (!pr_done && c < 20) begin tick(); c++; end
    check(pr_done, "write completes after the snoop releases");
    pr_valid = 0; tick();
    rd_chk(A + 1, "write after interlock wait");

    // write miss on an index whose entry is owned: flush then RFO
    wr(B + 1, 16'hB1B1);                       // B owned exclusively
    n0 = n_op[OP_WWI];
    wr(C + 2, 16'hC2C2);
    check(n_op[OP_WWI] == n0 + 1 && ent(C) == ST_EXC && ent(B) == ST_INV,
          "write miss with owned victim: flush, Owned Exclusively");
    check(bus.peek(B + 1) == 16'hB1B1, "flushed word reached memory");
    // read miss with owned victim: flush then Read
    n0 = n_op[OP_WWI];
    rd_chk(B + 1, "read miss with owned victim");
    check(n_op[OP_WWI] == n0 + 1 && ent(B) == ST_UNO, "read miss with owned victim: flush, UnOwned");
    check(bus.peek(C + 2) == 16'hC2C2, "flushed word reached memory");

    // test-and-set
    wr(A + 2, 16'h0000);
    req_op(PR_TAS, A + 2, 16'hFFFF, 2'b00, 1'b0, d, c);
    check(d == 16'h0000, "test-and-set returns the old word");
    req_op(PR_TAS, A + 2, 16'hFFFF, 2'b00, 1'b0, d, c);
    check(d == 16'h0001, "second test-and-set returns 1");
    gold[A + 2] = 16'h0001;
    rd_chk(A + 2, "test-and-set");

    // hinted read
    n0 = n_op[OP_RFO];
    req_op(PR_READ, mk(40, 5, 1), '0, 2'b11, 1'b1, d, c);
    check(d == gold_rd(mk(40, 5, 1)) && n_op[OP_RFO] == n0 + 1 && ent(mk(40, 5, 0)) == ST_EXC,
          "hinted read: Read-For-Ownership, Owned Exclusively");

    // byte lanes
    req_op(PR_WRITE, A + 3, 16'hAB00, 2'b10, 1'b0, d, c);
    req_op(PR_WRITE, A + 3, 16'h00CD, 2'b01, 1'b0, d, c);
    gold[A + 3] = 16'hABCD;
    rd_chk(A + 3, "byte lanes");

    // random
    for (int k = 0; k < 600; k++) begin
      automatic logic [18:0] a = mk(50 + int'($urandom_range(0, 3)), int'($urandom_range(0, 3)),
                          int'($urandom_range(0, 3)));
      case ($urandom_range(0, 3))
        0: wr(a, 16'($urandom));
        1: begin
          req_op(PR_READ, a, '0, 2'b11, 1'b1, d, c);
          check(d == gold_rd(a), "random hinted read");
        end
        default: rd_chk(a, "random read");
      endcase
    end
    check(bad_local == 0, "local writes only under the interlock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
