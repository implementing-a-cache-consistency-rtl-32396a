// tb_sys_bus_if: checks the system bus interface.
//
// The testbench models the A-side assembly register (four words, selected by
// MuxA) and the rest of the bus: a memory-like responder for the
// interface's own operations and a foreign master for snoop traffic. It
// checks, for random block addresses:
//  - master Read / Read-For-Ownership: the word address steps 0..3, each
//    acknowledged word lands in the addressed Aassembly word, m_done pulses
//    with the fourth acknowledge and the command drops after it;
//  - master Write-Without-Invalidation: the bus carries the Aassembly words;
//  - master Write-For-Invalidation: a single beat, nothing loaded;
//  - no operation starts without a grant;
//  - foreign operations: snoop_start pulses once, snoop_adr keeps the block
//    address after the master leaves, and with s_resp the interface answers
//    each beat with the addressed Aassembly word, never acknowledging in two
//    consecutive cycles, and pulses s_done with the fourth acknowledge.
module tb_sys_bus_if;
  import bop_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sb_req, sb_cmd_o, sb_ack_o, sb_inh_o, sb_gnt = 0;
  bus_op_e sb_op_o, sb_op_i;
  logic [18:0] sb_adr_o, sb_adr_i, snoop_adr;
  logic [15:0] sb_data_o, sb_data_i;
  logic sb_cmd_i, sb_ack_i;
  logic bus_hold = 0, granted, m_start = 0, m_done;
  bus_op_e m_op = OP_READ, snoop_op;
  logic [16:0] m_blkadr = '0;
  logic snoop_start, s_resp = 0, s_inhibit = 0, s_done;
  logic [3:0] mux_a;
  logic load_a_word;
  logic [15:0] a_word_in, a_word_out;

  sys_bus_if dut (.*);

  // Aassembly model
  logic [15:0] ablk [4];
  always_comb begin
    a_word_out = '0;
    for (int w = 0; w < 4; w++) if (mux_a[w]) a_word_out = ablk[w];
  end
  always @(posedge clk)
    if (load_a_word) for (int w = 0; w < 4; w++) if (mux_a[w]) ablk[w] <= a_word_in;

  // rest of the bus
  logic t_cmd = 0, t_ack = 0;
  bus_op_e t_op = OP_READ;
  logic [18:0] t_adr = '0;
  logic [15:0] t_data = '0;
  assign sb_cmd_i  = sb_cmd_o | t_cmd;
  assign sb_op_i   = bus_op_e'(sb_op_o | t_op);
  assign sb_adr_i  = sb_adr_o | t_adr;
  assign sb_data_i = sb_data_o | t_data;
  assign sb_ack_i  = sb_ack_o | t_ack;

  function automatic logic [15:0] memv(logic [18:0] a);
    return 16'(a * 13 + 5);
  endfunction

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

  // own operation, memory-like responder in the testbench
  task automatic own_op(input bus_op_e op, input logic [16:0] ba);
    int beats, seen, dones;
    logic [15:0] wd [4];
    beats = (op == OP_WFI) ? 1 : 4;
    for (int w = 0; w < 4; w++) ablk[w] = 16'($urandom);
    for (int w = 0; w < 4; w++) wd[w] = ablk[w];
    bus_hold = 1;
    m_op = op; m_blkadr = ba; m_start = 1;
    tick();
    check(!sb_cmd_o, "no operation before the grant");
    sb_gnt = 1;
    #1 check(granted, "granted follows the grant");
    tick();
    m_start = 0;
    check(sb_cmd_o && sb_op_o == op, "command on the bus");
    seen = 0; dones = 0;
    while (seen < beats) begin
      repeat ($urandom_range(1, 3)) begin
        check(sb_cmd_o, "command held");
        check(sb_adr_o == {ba, 2'(seen)}, $sformatf("word address %0d", seen));
        tick();
      end
      t_ack = 1;
      if (op_is_read(op)) t_data = memv(sb_adr_o);
      else if (op != OP_WFI) check(sb_data_o == wd[seen], $sformatf("write word %0d", seen));
      #1 if (m_done) dones++;
      check(m_done == (seen == beats - 1), "m_done only with the last acknowledge");
      tick();
      t_ack = 0; t_data = '0;
      seen++;
    end
    check(dones == 1, "one m_done");
    check(!sb_cmd_o, "command dropped after the last beat");
    if (op_is_read(op))
      for (int w = 0; w < 4; w++)
        check(ablk[w] == memv({ba, 2'(w)}), $sformatf("read word %0d in Aassembly", w));
    else
      for (int w = 0; w < 4; w++) check(ablk[w] == wd[w], "Aassembly unchanged by a write");
    bus_hold = 0; sb_gnt = 0;
    tick();
  endtask

  // foreign operation; the interface answers if resp is set
  task automatic foreign_op(input bus_op_e op, input logic [18:0] base, input bit resp);
    int starts, acks, done_n;
    logic prev_ack;
    for (int w = 0; w < 4; w++) ablk[w] = 16'($urandom);
    t_cmd = 1; t_op = op; t_adr = base;
    #1 check(snoop_start && snoop_op == op && snoop_adr == base, "snoop_start on a foreign operation");
    starts = 0; acks = 0; done_n = 0; prev_ack = 0;
    s_resp = resp;
    for (int c = 0; c < 20 && acks < 4; c++) begin
      tick();
      if (snoop_start) starts++;
      if (sb_ack_o) begin
        check(!prev_ack, "no acknowledge in consecutive cycles");
        check(sb_data_o == ablk[t_adr[1:0]], "responder supplies the addressed word");
        acks++;
        if (s_done) done_n++;
        check(s_done == (acks == 4), "s_done with the fourth acknowledge");
        t_adr = {base[18:2], 2'(acks)};
      end
      prev_ack = sb_ack_o;
    end
    check(starts == 0, "snoop_start only once");
    check(resp ? (acks == 4 && done_n == 1) : (acks == 0), "responder beats");
    s_resp = 0;
    t_cmd = 0; t_op = OP_READ; t_adr = '0;
    tick();
    check(snoop_adr[18:2] == base[18:2], "snoop_adr keeps the block address");
    tick();
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1; tick();
    for (int k = 0; k < 40; k++) begin
      automatic logic [16:0] ba = 17'($urandom);
      case (k % 4)
        0: own_op(OP_READ, ba);
        1: own_op(OP_WWI, ba);
        2: own_op(OP_WFI, ba);
        default: own_op(OP_RFO, ba);
      endcase
      foreign_op((k % 2 != 0) ? OP_READ : OP_RFO, {17'($urandom), 2'b00}, 1'b1);
      foreign_op(OP_WFI, {17'($urandom), 2'b00}, 1'b0);
    end
    // INHIBIT passes through
    s_inhibit = 1; #1 check(sb_inh_o, "INHIBIT driven");
    s_inhibit = 0; #1 check(!sb_inh_o, "INHIBIT released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
