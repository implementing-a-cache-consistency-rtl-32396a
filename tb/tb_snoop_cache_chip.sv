// tb_snoop_cache_chip: end-to-end test of the snooping data cache, three
// chips at their default size on one modelled system bus with main memory
// and a cacheless I/O master.
//
// Phases:
//  1. Directed protocol cases, checking data and every cache's entry state:
//     read served by memory, read served by an owning cache (memory
//     inhibited), write to an UnOwned copy (Write-For-Invalidation), write
//     miss on a block another cache owns (Read-For-Ownership), local write to
//     an Owned Exclusively entry (no bus operation), replacement of an owned
//     entry (Write-Without-Invalidation), test-and-set, the non-shared read
//     hint, a conventional Write by the I/O master, and the bus operation
//     counts of one non-shared block read, written twice and replaced, with
//     and without the hint (3 against 2 operations), and a lock word handed
//     between the caches by test-and-set at one bus operation per hand-over.
//  2. Races: a processor write to an Owned Exclusively entry against a
//     foreign Read of the same block, at several relative timings (both
//     outcomes of the interlock must occur), and two caches stealing the
//     same UnOwned block at once.
//  3. Random sharing: each processor writes only its own words but all of
//     them share blocks; a processor's read of its own word must return its
//     last write.
//  4. A test-and-set spin lock guarding a shared counter.
//  5. A final sweep: every processor reads every touched word.
// A reference copy of memory (gold) is kept independently of the design.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_snoop_cache_chip;
  import bop_pkg::*;

  localparam int N     = 3;
  localparam int ADR_W = 19;
  localparam int unsigned WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // processor buses
  logic              p_as [N], p_rw [N], p_uds [N], p_lds [N], p_tas [N], p_own [N];
  logic [ADR_W-1:0]  p_adr [N];
  logic [WORD_W-1:0] p_wdata [N], p_rdata [N];
  logic              p_dtack [N];

  // system bus
  logic [N-1:0]      req, gnt, cmd, ack, inh;
  bus_op_e           op [N];
  logic [ADR_W-1:0]  adr [N];
  logic [WORD_W-1:0] data [N];
  logic              b_cmd, b_ack, b_inh;
  bus_op_e           b_op;
  logic [ADR_W-1:0]  b_adr;
  logic [WORD_W-1:0] b_data;

  tb_sysbus_model #(.N(N), .ADR_W(ADR_W)) bus (
    .clk, .rst_n, .req, .gnt, .cmd, .op, .adr, .data, .ack, .inh,
    .b_cmd, .b_op, .b_adr, .b_data, .b_ack, .b_inh
  );

  int n_local_wr [N];
  int n_lock_abort [N];
  int n_snoop_wait [N];
  int n_snoop_inv [N];
  int n_supply [N];

  for (genvar i = 0; i < N; i++) begin : g_cpu
    snoop_cache_chip dut (
      .clk, .rst_n,
      .p_as (p_as[i]), .p_rw (p_rw[i]), .p_uds (p_uds[i]), .p_lds (p_lds[i]),
      .p_tas (p_tas[i]), .p_own (p_own[i]), .p_adr (p_adr[i]),
      .p_wdata (p_wdata[i]), .p_rdata (p_rdata[i]), .p_dtack (p_dtack[i]),
      .sb_req (req[i]), .sb_gnt (gnt[i]),
      .sb_cmd_o (cmd[i]), .sb_op_o (op[i]), .sb_adr_o (adr[i]),
      .sb_data_o (data[i]), .sb_ack_o (ack[i]), .sb_inh_o (inh[i]),
      .sb_cmd_i (b_cmd), .sb_op_i (b_op), .sb_adr_i (b_adr),
      .sb_data_i (b_data), .sb_ack_i (b_ack)
    );

    always @(posedge clk) if (rst_n) begin
      if (dut.u_cc.wr_b_data && !dut.u_cc.bus_hold) n_local_wr[i]++;
      if (dut.u_cc.proc_rel && !dut.u_cc.wr_b_data) n_lock_abort[i]++;
      if (dut.u_lock.snoop_wants && !dut.u_lock.snoop_safe && dut.u_lock.proc_has)
        n_snoop_wait[i]++;
      if (dut.u_sc.set_a_state && dut.u_sc.state_value == ST_INV) n_snoop_inv[i]++;
      if (dut.u_sbi.s_done) n_supply[i]++;
    end
  end

  function automatic state_e st(int c, logic [ADR_W-1:0] a);
    case (c)
      0: return g_cpu[0].dut.u_mem.state_mem[a[5:2]];
      1: return g_cpu[1].dut.u_mem.state_mem[a[5:2]];
      default: return g_cpu[2].dut.u_mem.state_mem[a[5:2]];
    endcase
  endfunction

  function automatic logic [12:0] tg(int c, logic [ADR_W-1:0] a);
    case (c)
      0: return g_cpu[0].dut.u_mem.tag_mem[a[5:2]];
      1: return g_cpu[1].dut.u_mem.tag_mem[a[5:2]];
      default: return g_cpu[2].dut.u_mem.tag_mem[a[5:2]];
    endcase
  endfunction

  // Entry state of cache c for address a, Invalid if the tag differs.
  function automatic state_e bst(int c, logic [ADR_W-1:0] a);
    state_e s = st(c, a);
    if (s != ST_INV && tg(c, a) != a[18:6]) return ST_INV;
    return s;
  endfunction

  // bus operation counters
  int n_op [8];
  int n_inhibited;
  logic cmd_d, inh_seen;
  bus_op_e cur_op;
  always @(posedge clk) begin
    cmd_d <= b_cmd;
    if (b_cmd && !cmd_d) begin
      n_op[b_op]++; if ($test$plusargs("trace")) $display("%0t op %s adr %05h", $time, b_op.name(), b_adr);
      cur_op   <= b_op;
      inh_seen <= 1'b0;
    end
    if (b_cmd && b_inh) inh_seen <= 1'b1;
    if (!b_cmd && cmd_d && inh_seen) n_inhibited++;
  end

  // reference memory
  logic [WORD_W-1:0] gold [logic [ADR_W-1:0]];
  function automatic logic [WORD_W-1:0] gold_rd(logic [ADR_W-1:0] a);
    return gold.exists(a) ? gold[a] : WORD_W'(a * 7 + 16'h1234);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one processor bus cycle; returns read data and cycles from AS to DTACK
  task automatic access(input int c, input logic rw, input logic tas, input logic own,
                        input logic [ADR_W-1:0] a, input logic [WORD_W-1:0] wd,
                        input logic [1:0] be, output logic [WORD_W-1:0] rd,
                        output int cyc);
    p_adr[c] = a; p_rw[c] = rw; p_tas[c] = tas; p_own[c] = own;
    p_wdata[c] = wd; p_uds[c] = be[1]; p_lds[c] = be[0];
    p_as[c] = 1'b1;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!p_dtack[c]);
    rd = p_rdata[c];
    p_as[c] = 1'b0;
    @(posedge clk); #1;
  endtask

  task automatic rd_chk(input int c, input logic [ADR_W-1:0] a, input string what);
    logic [WORD_W-1:0] d; int cy;
    access(c, 1'b1, 1'b0, 1'b0, a, '0, 2'b11, d, cy);
    check(d == gold_rd(a), $sformatf("%s: cpu%0d read %05h = %04h, expected %04h",
                                      what, c, a, d, gold_rd(a)));
  endtask

  task automatic wr(input int c, input logic [ADR_W-1:0] a, input logic [WORD_W-1:0] v);
    logic [WORD_W-1:0] d; int cy;
    gold[a] = v;
    access(c, 1'b0, 1'b0, 1'b0, a, v, 2'b11, d, cy);
  endtask

  task automatic expect_states(input logic [ADR_W-1:0] a, input state_e s0,
                               input state_e s1, input state_e s2, input string what);
    check(bst(0, a) == s0 && bst(1, a) == s1 && bst(2, a) == s2,
          $sformatf("%s: states %s %s %s, expected %s %s %s", what,
                    bst(0, a).name(), bst(1, a).name(), bst(2, a).name(),
                    s0.name(), s1.name(), s2.name()));
  endtask

  function automatic logic [ADR_W-1:0] mk(int tag, int idx, int w);
    return {13'(tag), 4'(idx), 2'(w)};
  endfunction

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [WORD_W-1:0] d, blk [WORDS];
    int cy, ops_before;
    logic [ADR_W-1:0] A, B, C, D, E, F, G, H;

    for (int c = 0; c < N; c++) begin
      p_as[c] = 0; p_rw[c] = 1; p_uds[c] = 0; p_lds[c] = 0; p_tas[c] = 0; p_own[c] = 0;
      p_adr[c] = '0; p_wdata[c] = '0;
      n_local_wr[c] = 0; n_lock_abort[c] = 0; n_snoop_wait[c] = 0;
      n_snoop_inv[c] = 0; n_supply[c] = 0;
    end
    foreach (n_op[k]) n_op[k] = 0;
    n_inhibited = 0; cmd_d = 0; inh_seen = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk); #1;

    A = mk(100, 1, 0); B = mk(200, 2, 0); C = mk(300, 2, 3); D = mk(400, 3, 2);
    E = mk(500, 4, 0); F = mk(600, 5, 0); G = mk(700, 6, 1); H = mk(800, 7, 0);

    // ---- Figure 2.1: read served by memory
    rd_chk(2, A, "read miss (memory)");
    rd_chk(0, A, "read miss (memory), second copy");
    expect_states(A, ST_UNO, ST_INV, ST_UNO, "two UnOwned copies");
    access(0, 1'b1, 1'b0, 1'b0, A, '0, 2'b11, d, cy);
    check(cy == 4, $sformatf("read hit takes %0d cycles, expected 4", cy));

    // ---- Figure 2.2: read served by the owning cache
    wr(1, B, 16'hBEEF);
    expect_states(B, ST_INV, ST_EXC, ST_INV, "write miss gives Owned Exclusively");
    ops_before = n_inhibited;
    rd_chk(0, B, "read supplied by owner");
    check(n_inhibited == ops_before + 1, "owner did not inhibit memory");
    expect_states(B, ST_UNO, ST_NON, ST_INV, "owner becomes Owned NonExclusively");
    check(bus.peek(B) != 16'hBEEF, "memory must not be updated by a cache-to-cache read");
    rd_chk(2, B, "second read supplied by owner");
    expect_states(B, ST_UNO, ST_NON, ST_UNO, "owner stays Owned NonExclusively");

    // ---- Figure 2.3: write to a valid UnOwned copy steals ownership
    ops_before = n_op[OP_WFI];
    wr(0, A + 1, 16'hA001);
    check(n_op[OP_WFI] == ops_before + 1, "write on UnOwned must issue Write-For-Invalidation");
    expect_states(A, ST_EXC, ST_INV, ST_INV, "Write-For-Invalidation");
    rd_chk(0, A + 1, "read after local update");
    rd_chk(0, A, "untouched word of the updated block");

    // ---- same from Owned NonExclusively (cache 1 owns B, 0 and 2 hold copies)
    wr(1, B + 2, 16'hB002);
    expect_states(B, ST_INV, ST_EXC, ST_INV, "steal from Owned NonExclusively");

    // ---- Figure 2.4: write miss on a block another cache owns
    rd_chk(0, B, "refetch B");                 // 0: UNO, 1: NON
    ops_before = n_op[OP_RFO];
    wr(2, B + 3, 16'hB003);
    check(n_op[OP_RFO] == ops_before + 1, "write miss must issue Read-For-Ownership");
    expect_states(B, ST_INV, ST_INV, ST_EXC, "Read-For-Ownership");

    // ---- local write to an Owned Exclusively entry: no bus operation
    ops_before = n_op[OP_READ] + n_op[OP_RFO] + n_op[OP_WFI] + n_op[OP_WWI];
    wr(2, B + 1, 16'h1111);
    check(n_op[OP_READ] + n_op[OP_RFO] + n_op[OP_WFI] + n_op[OP_WWI] == ops_before,
          "write to Owned Exclusively used the bus");
    rd_chk(2, B + 1, "local write");
    rd_chk(1, B + 1, "local write seen by another cache");   // 2 -> NON, 1 UNO

    // ---- replacement of an owned entry (B and C share index 2)
    ops_before = n_op[OP_WWI];
    rd_chk(2, C, "read with owned victim");
    check(n_op[OP_WWI] == ops_before + 1, "owned victim must be flushed");
    for (int w = 0; w < WORDS; w++)
      check(bus.peek(B - ADR_W'(B[1:0]) + ADR_W'(w)) == gold_rd(B - ADR_W'(B[1:0]) + ADR_W'(w)),
            "flushed block in memory");
    rd_chk(0, B + 3, "read after flush");

    // ---- test and set
    gold[D] = 16'h0000;
    wr(1, D, 16'h0000);
    access(0, 1'b0, 1'b1, 1'b0, D, '0, 2'b11, d, cy);
    check(d == 16'h0000, "first test-and-set returns 0");
    access(1, 1'b0, 1'b1, 1'b0, D, '0, 2'b11, d, cy);
    check(d == 16'h0001, "second test-and-set returns 1");
    gold[D] = 16'h0001;
    rd_chk(2, D, "test-and-set leaves 1");

    // ---- non-shared read hint: Read-For-Ownership on a read miss
    ops_before = n_op[OP_RFO];
    access(1, 1'b1, 1'b0, 1'b1, E, '0, 2'b11, d, cy);
    check(d == gold_rd(E), "hinted read data");
    check(n_op[OP_RFO] == ops_before + 1, "hinted read must use Read-For-Ownership");
    expect_states(E, ST_INV, ST_EXC, ST_INV, "hinted read gives Owned Exclusively");

    // ---- byte lanes
    begin
      logic [WORD_W-1:0] v;
      access(1, 1'b0, 1'b0, 1'b0, E + 2, 16'hAB00, 2'b10, d, cy);
      v = gold_rd(E + 2); gold[E + 2] = {8'hAB, v[7:0]};
      access(1, 1'b0, 1'b0, 1'b0, E + 2, 16'h00CD, 2'b01, d, cy);
      gold[E + 2] = 16'hABCD;
      rd_chk(0, E + 2, "byte-lane writes");
    end

    // ---- conventional Write from the I/O master invalidates copies
    rd_chk(0, F, "copy for I/O test");
    rd_chk(1, F, "copy for I/O test");
    for (int w = 0; w < WORDS; w++) begin
      blk[w] = 16'hF000 + 16'(w);
      gold[F + ADR_W'(w)] = blk[w];
    end
    bus.io_write_block(F, blk);
    repeat (4) @(posedge clk); #1;
    expect_states(F, ST_INV, ST_INV, ST_INV, "I/O Write invalidates");
    rd_chk(2, F + 3, "read after I/O Write");

    // ---- Table 2.3 counts for one non-shared block, written twice and then
    //      replaced: plain read then writes (Read, Write-For-Invalidation,
    //      Write-Without-Invalidation) against a hinted read then writes
    //      (Read-For-Ownership, Write-Without-Invalidation)
    begin
      int r0, f0, i0, w0, x0;
      logic [ADR_W-1:0] X, Y;
      X = mk(1100, 14, 1); Y = mk(1200, 15, 2);
      r0 = n_op[OP_READ]; f0 = n_op[OP_RFO]; i0 = n_op[OP_WFI]; w0 = n_op[OP_WWI];
      x0 = n_op[OP_WRITE];
      rd_chk(0, X, "non-shared read");
      wr(0, X, 16'h7101);
      wr(0, X, 16'h7102);
      rd_chk(0, mk(1101, 14, 1), "replacing the written block");
      check(n_op[OP_READ] - r0 == 2 && n_op[OP_WFI] - i0 == 1 && n_op[OP_WWI] - w0 == 1 &&
            n_op[OP_RFO] == f0 && n_op[OP_WRITE] == x0,
            $sformatf("plain non-shared writes: Read %0d WFI %0d WWI %0d, expected 1+1 1 1",
                      n_op[OP_READ] - r0, n_op[OP_WFI] - i0, n_op[OP_WWI] - w0));
      check(bus.peek(X) == 16'h7102, "written block reached memory on replacement");
      r0 = n_op[OP_READ]; f0 = n_op[OP_RFO]; i0 = n_op[OP_WFI]; w0 = n_op[OP_WWI];
      access(0, 1'b1, 1'b0, 1'b1, Y, '0, 2'b11, d, cy);
      check(d == gold_rd(Y), "hinted non-shared read");
      wr(0, Y, 16'h7201);
      wr(0, Y, 16'h7202);
      rd_chk(0, mk(1201, 15, 2), "replacing the hinted block");
      check(n_op[OP_RFO] - f0 == 1 && n_op[OP_WWI] - w0 == 1 && n_op[OP_WFI] == i0 &&
            n_op[OP_READ] - r0 == 1,
            $sformatf("hinted non-shared writes: RFO %0d WWI %0d WFI %0d, expected 1 1 0",
                      n_op[OP_RFO] - f0, n_op[OP_WWI] - w0, n_op[OP_WFI] - i0));
      check(bus.peek(Y) == 16'h7202, "hinted block reached memory on replacement");
      $display("Table 2.3 single non-shared block: plain 3 bus operations, hinted 2");
    end

    // ---- a lock word handed from cache to cache by test-and-set: each
    //      hand-over is one Read-For-Ownership answered by the previous owner,
    //      and the word never goes back to memory
    begin
      int t0, w0, i0, f0;
      logic [ADR_W-1:0] LK;
      LK = mk(1300, 0, 3);
      wr(0, LK, 16'h0000);
      for (int k = 1; k <= 6; k++) begin
        t0 = n_op[OP_READ] + n_op[OP_RFO] + n_op[OP_WFI] + n_op[OP_WWI] + n_op[OP_WRITE];
        f0 = n_op[OP_RFO]; w0 = n_op[OP_WWI]; i0 = n_inhibited;
        access(k % N, 1'b1, 1'b1, 1'b0, LK, '0, 2'b11, d, cy);
        check(d == 16'h0000, "lock hand-over finds the lock free");
        check(n_op[OP_READ] + n_op[OP_RFO] + n_op[OP_WFI] + n_op[OP_WWI] + n_op[OP_WRITE] - t0 == 1 &&
              n_op[OP_RFO] - f0 == 1 && n_inhibited - i0 == 1,
              $sformatf("lock hand-over %0d: one Read-For-Ownership answered by a cache", k));
        // the lock holder releases it with a local write
        access(k % N, 1'b0, 1'b0, 1'b0, LK, 16'h0000, 2'b11, d, cy);
      end
      gold[LK] = 16'h0000;
      check(n_op[OP_WWI] == w0, "lock word never written back while handed over");
    end

    // ---- Figure 3.4 race: local write to EXC against a foreign Read
    for (int dly = 0; dly < 14; dly++) begin
      logic [ADR_W-1:0] g;
      logic [WORD_W-1:0] oldv, newv, got;
      g = mk(700 + dly, 6, 1);
      wr(0, g, 16'h7000 + 16'(dly));          // cache 0 owns it exclusively
      oldv = gold_rd(g);
      newv = 16'h7100 + 16'(dly);
      gold[g] = newv;
      fork
        begin int cy2; logic [WORD_W-1:0] d2;
          repeat (dly) @(posedge clk);
          #1 access(0, 1'b0, 1'b0, 1'b0, g, newv, 2'b11, d2, cy2);
        end
        begin int cy3;
          access(1, 1'b1, 1'b0, 1'b0, g, '0, 2'b11, got, cy3);
        end
      join
      check(got == oldv || got == newv, "racing read returns old or new word");
      rd_chk(1, g, "after race, other cache");
      rd_chk(0, g, "after race, writer");
    end

    // ---- Figure 3.3 race: two caches steal the same UnOwned block
    rd_chk(0, H, "H copy");
    rd_chk(1, H, "H copy");
    gold[H + 1] = 16'h8001;
    gold[H + 2] = 16'h8002;
    fork
      begin logic [WORD_W-1:0] d2; int cy2;
        access(0, 1'b0, 1'b0, 1'b0, H + 1, 16'h8001, 2'b11, d2, cy2); end
      begin logic [WORD_W-1:0] d3; int cy3;
        access(1, 1'b0, 1'b0, 1'b0, H + 2, 16'h8002, 2'b11, d3, cy3); end
    join
    check((bst(0, H) == ST_EXC) != (bst(1, H) == ST_EXC), "exactly one owner after steal race");
    for (int w = 0; w < WORDS; w++)
      for (int c = 0; c < N; c++) rd_chk(c, H + ADR_W'(w), "after steal race");

    // ---- random sharing
    begin
      automatic int nops = 150;
      fork
        for (int c = 0; c < N; c++) begin
          automatic int cc = c;
          begin
            logic [WORD_W-1:0] d4; int cy4;
            for (int k = 0; k < nops; k++) begin
              logic [ADR_W-1:0] a;
              int r;
              a = mk(900 + int'($urandom_range(0, 2)), int'($urandom_range(8, 11)),
                     int'($urandom_range(0, 3)));
              r = int'($urandom_range(0, 9));
              if ((a[1:0] == 2'(cc)) || (cc == 0 && a[1:0] == 2'd3)) begin
                if (r < 4) begin
                  automatic logic [WORD_W-1:0] v = WORD_W'($urandom);
                  gold[a] = v;
                  access(cc, 1'b0, 1'b0, 1'b0, a, v, 2'b11, d4, cy4);
                end else begin
                  access(cc, 1'b1, 1'b0, r == 9, a, '0, 2'b11, d4, cy4);
                  check(d4 == gold_rd(a), $sformatf("random: cpu%0d own word %05h", cc, a));
                end
              end else begin
                access(cc, 1'b1, 1'b0, r == 9, a, '0, 2'b11, d4, cy4);
              end
            end
          end
        end
      join
    end

    // ---- test-and-set spin lock around a shared counter
    begin
      logic [ADR_W-1:0] L, CNT;
      automatic int per = 6;
      L = mk(1000, 12, 0); CNT = mk(1001, 13, 1);
      wr(0, L, 16'h0); wr(0, CNT, 16'h0);
      fork
        for (int c = 0; c < N; c++) begin
          automatic int cc = c;
          begin
            logic [WORD_W-1:0] d5; int cy5;
            for (int k = 0; k < per; k++) begin
              do access(cc, 1'b0, 1'b1, 1'b0, L, '0, 2'b11, d5, cy5); while (d5 != 0);
              access(cc, 1'b1, 1'b0, 1'b0, CNT, '0, 2'b11, d5, cy5);
              access(cc, 1'b0, 1'b0, 1'b0, CNT, d5 + 16'd1, 2'b11, d5, cy5);
              access(cc, 1'b0, 1'b0, 1'b0, L, 16'h0, 2'b11, d5, cy5);
            end
          end
        end
      join
      gold[L] = 16'h0;
      gold[CNT] = 16'(N * per);
      for (int c = 0; c < N; c++) rd_chk(c, CNT, "spin-lock counter");
    end

    // ---- final sweep
    foreach (gold[a]) for (int c = 0; c < N; c++) rd_chk(c, a, "final sweep");

    // ---- mechanisms
    begin
      automatic int loc = 0, abt = 0, wt = 0, inv = 0, sup = 0;
      for (int c = 0; c < N; c++) begin
        loc += n_local_wr[c]; abt += n_lock_abort[c]; wt += n_snoop_wait[c];
        inv += n_snoop_inv[c]; sup += n_supply[c];
      end
      $display("mechanisms: Read=%0d RFO=%0d WFI=%0d WWI=%0d Write=%0d inhibited=%0d",
               n_op[OP_READ], n_op[OP_RFO], n_op[OP_WFI], n_op[OP_WWI], n_op[OP_WRITE],
               n_inhibited);
      $display("mechanisms: local_exc_write=%0d lock_abort=%0d snoop_wait=%0d snoop_inv=%0d supply=%0d",
               loc, abt, wt, inv, sup);
      check(n_op[OP_READ] > 0, "mechanism: Read");
      check(n_op[OP_RFO] > 0, "mechanism: Read-For-Ownership");
      check(n_op[OP_WFI] > 0, "mechanism: Write-For-Invalidation");
      check(n_op[OP_WWI] > 0, "mechanism: Write-Without-Invalidation");
      check(n_op[OP_WRITE] > 0, "mechanism: Write");
      check(n_inhibited > 0, "mechanism: memory inhibited");
      check(loc > 0, "mechanism: local write under interlock");
      check(abt > 0, "mechanism: interlock lost to the snoop, write restarted");
      check(wt > 0, "mechanism: snoop waits for ProcHas");
      check(inv > 0, "mechanism: snoop invalidation");
      check(sup > 0, "mechanism: cache supplies a block");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
