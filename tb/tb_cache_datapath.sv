// tb_cache_datapath: checks the cache memory subsystem against a reference
// model kept in the testbench.
//
// Each cycle the testbench drives a random but legal set of control strobes
// (one-hot MuxA, at most one data-array writer, a decoder driven for every
// access) and random addresses from a small address pool, updates its own
// model of the three arrays and six registers with the same strobes, and
// compares every output of the block with the model: states, tags, Aadr,
// the A and B words and both match lines. Directed cases first check reset
// (every entry Invalid, no match) and a fill-then-hit sequence.
module tb_cache_datapath;
  import bop_pkg::*;

  localparam int IDX_W = 4, TAG_W = 13, ADR_W = 19, NE = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ADR_W-1:0]  bus_adr, proc_adr;
  logic bus_adr_a, proc_adr_a, load_a_state, load_a_tags, load_a_data, set_a_state;
  state_e state_value;
  logic wr_a_state, wr_a_data, set_a_adr, load_a_word;
  logic [WORDS-1:0] mux_a;
  logic [WORD_W-1:0] a_word_in, a_word_out, b_word_in, b_word_out;
  logic match_a, match_b;
  state_e a_state, b_state;
  logic [TAG_W-1:0] a_tag;
  logic [IDX_W-1:0] a_adr;
  logic proc_adr_b, load_b_state, load_b_tags, load_b_data, set_b_tags, wr_b_tags;
  logic wr_b_data, load_b_word;
  logic [1:0] b_be;

  cache_datapath dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  state_e             m_state [NE];
  logic [TAG_W-1:0]   m_tag   [NE];
  logic [BLOCK_W-1:0] m_data  [NE];
  state_e             r_astate, r_bstate;
  logic [TAG_W-1:0]   r_atag, r_btag;
  logic [IDX_W-1:0]   r_aadr;
  logic [BLOCK_W-1:0] r_ablk, r_bblk;
  logic               tag_known [NE], data_known [NE];
  logic               atag_known, btag_known, ablk_known, bblk_known;

  task automatic idle();
    bus_adr_a = 0; proc_adr_a = 0; load_a_state = 0; load_a_tags = 0; load_a_data = 0;
    set_a_state = 0; state_value = ST_INV; wr_a_state = 0; wr_a_data = 0; set_a_adr = 0;
    mux_a = '0; load_a_word = 0; a_word_in = '0;
    proc_adr_b = 0; load_b_state = 0; load_b_tags = 0; load_b_data = 0; set_b_tags = 0;
    wr_b_tags = 0; wr_b_data = 0; load_b_word = 0; b_be = 2'b00; b_word_in = '0;
  endtask

  // apply the current strobes to the model (call just before the clock edge)
  task automatic model_step();
    logic [IDX_W-1:0] ai, bi;
    state_e s_old [NE];
    logic [TAG_W-1:0] t_old [NE];
    logic [BLOCK_W-1:0] d_old [NE];
    logic [BLOCK_W-1:0] ablk_n, bblk_n;
    logic tk_old [NE], dk_old [NE];
    ai = proc_adr_a ? proc_adr[5:2] : bus_adr[5:2];
    bi = proc_adr[5:2];
    s_old = m_state; t_old = m_tag; d_old = m_data; tk_old = tag_known; dk_old = data_known;
    if (wr_a_state) m_state[ai] = r_astate;
    if (wr_b_tags) begin m_tag[bi] = r_btag; tag_known[bi] = btag_known; end
    if (wr_a_data) begin m_data[ai] = r_ablk; data_known[ai] = ablk_known; end
    else if (wr_b_data) begin m_data[bi] = r_bblk; data_known[bi] = bblk_known; end
    if (set_a_state) r_astate = state_value;
    else if (load_a_state) r_astate = s_old[ai];
    if (load_a_tags) begin r_atag = t_old[ai]; atag_known = tk_old[ai]; end
    if (set_a_adr) r_aadr = ai;
    ablk_n = r_ablk;
    if (load_a_data) begin ablk_n = d_old[ai]; ablk_known = dk_old[ai]; end
    else if (load_a_word)
      for (int w = 0; w < WORDS; w++) if (mux_a[w]) ablk_n[w*16 +: 16] = a_word_in;
    r_ablk = ablk_n;
    if (load_b_state) r_bstate = s_old[bi];
    if (set_b_tags) begin r_btag = proc_adr[18:6]; btag_known = 1; end
    else if (load_b_tags) begin r_btag = t_old[bi]; btag_known = tk_old[bi]; end
    bblk_n = r_bblk;
    if (load_b_data) begin bblk_n = d_old[bi]; bblk_known = dk_old[bi]; end
    else if (load_b_word) begin
      if (b_be[0]) bblk_n[proc_adr[1:0]*16 +: 8] = b_word_in[7:0];
      if (b_be[1]) bblk_n[proc_adr[1:0]*16 + 8 +: 8] = b_word_in[15:8];
    end
    r_bblk = bblk_n;
  endtask

  task automatic compare(input string ctx);
    logic [WORD_W-1:0] aw;
    logic ma, mb;
    aw = '0;
    for (int w = 0; w < WORDS; w++) if (mux_a[w]) aw = r_ablk[w*16 +: 16];
    ma = (r_atag == bus_adr[18:6]) && (r_astate != ST_INV);
    mb = (r_btag == proc_adr[18:6]) && (r_bstate != ST_INV);
    check(a_state == r_astate, {ctx, ": Astate"});
    check(b_state == r_bstate, {ctx, ": Bstate"});
    check(a_adr == r_aadr, {ctx, ": Aadr"});
    if (atag_known) check(a_tag == r_atag && match_a == ma, $sformatf("%s: Atags/MatchA tag %h/%h match %b/%b st %s/%s", ctx, a_tag, r_atag, match_a, ma, a_state.name(), r_astate.name()));
    if (btag_known) check(match_b == mb, {ctx, ": MatchB"});
    if (ablk_known) check(a_word_out == aw, {ctx, ": A word"});
    if (bblk_known) check(b_word_out == r_bblk[proc_adr[1:0]*16 +: 16], {ctx, ": B word"});
  endtask

  task automatic step(input string ctx);
    model_step();
    @(posedge clk); #1;
    compare(ctx);
  endtask

  function automatic logic [ADR_W-1:0] rnd_adr();
    return {13'(100 + $urandom_range(0, 2)), 4'($urandom_range(0, 5)), 2'($urandom_range(0, 3))};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    bus_adr = '0; proc_adr = '0;
    for (int i = 0; i < NE; i++) begin
      m_state[i] = ST_INV; tag_known[i] = 0; data_known[i] = 0;
    end
    r_astate = ST_INV; r_bstate = ST_INV; r_aadr = '0; r_atag = '0; r_btag = '0;
    r_ablk = '0; r_bblk = '0;
    atag_known = 1; btag_known = 1; ablk_known = 1; bblk_known = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // reset: every entry Invalid
    for (int i = 0; i < NE; i++) begin
      idle();
      bus_adr = {13'd5, 4'(i), 2'd0}; bus_adr_a = 1; load_a_state = 1;
      proc_adr = {13'd5, 4'(i), 2'd0}; proc_adr_b = 1; load_b_state = 1;
      step("reset");
      check(a_state == ST_INV && b_state == ST_INV && !match_b, "entry Invalid after reset");
    end

    // fill one entry from the bus side, tag and state, then hit on both sides
    idle(); proc_adr = {13'd77, 4'd3, 2'd0};
    for (int w = 0; w < WORDS; w++) begin
      mux_a = 4'b1 << w; load_a_word = 1; a_word_in = 16'hC000 + 16'(w);
      step("fill word");
    end
    idle(); proc_adr = {13'd77, 4'd3, 2'd0};
    proc_adr_a = 1; wr_a_data = 1; set_b_tags = 1; set_a_state = 1; state_value = ST_UNO;
    step("install");
    idle(); proc_adr = {13'd77, 4'd3, 2'd0};
    proc_adr_a = 1; wr_a_state = 1; proc_adr_b = 1; wr_b_tags = 1;
    step("install state and tag");
    idle(); proc_adr = {13'd77, 4'd3, 2'd2};
    proc_adr_b = 1; load_b_state = 1; load_b_tags = 1; load_b_data = 1;
    bus_adr = {13'd77, 4'd3, 2'd1}; bus_adr_a = 1; load_a_state = 1; load_a_tags = 1;
    load_a_data = 1;
    step("dual read");
    mux_a = 4'b0010;
    idle(); mux_a = 4'b0010; proc_adr = {13'd77, 4'd3, 2'd2}; bus_adr = {13'd77, 4'd3, 2'd1};
    #1;
    check(match_b && b_state == ST_UNO && b_word_out == 16'hC002, "B side hit");
    check(match_a && a_state == ST_UNO && a_word_out == 16'hC001, "A side hit");
    proc_adr = {13'd78, 4'd3, 2'd2}; #1;
    check(!match_b, "B side miss on another tag");

    // random legal traffic
    for (int k = 0; k < 6000; k++) begin
      int r;
      idle();
      bus_adr  = rnd_adr();
      proc_adr = rnd_adr();
      r = int'($urandom_range(0, 3));
      if (r != 0) begin
        if ($urandom_range(0, 3) == 0) proc_adr_a = 1; else bus_adr_a = 1;
        load_a_state = ($urandom_range(0, 2) == 0);
        load_a_tags  = ($urandom_range(0, 2) == 0);
        load_a_data  = ($urandom_range(0, 3) == 0);
        set_a_adr    = ($urandom_range(0, 3) == 0);
        wr_a_state   = ($urandom_range(0, 3) == 0);
        wr_a_data    = ($urandom_range(0, 5) == 0);
      end
      set_a_state = ($urandom_range(0, 3) == 0);
      state_value = state_e'($urandom_range(0, 3));
      mux_a = 4'b1 << $urandom_range(0, 3);
      load_a_word = ($urandom_range(0, 2) == 0);
      a_word_in = 16'($urandom);
      if ($urandom_range(0, 2) != 0) begin
        proc_adr_b   = 1;
        load_b_state = ($urandom_range(0, 2) == 0);
        load_b_tags  = ($urandom_range(0, 2) == 0);
        load_b_data  = ($urandom_range(0, 3) == 0);
        wr_b_tags    = ($urandom_range(0, 4) == 0);
        wr_b_data    = !wr_a_data && ($urandom_range(0, 4) == 0);
      end
      set_b_tags  = ($urandom_range(0, 3) == 0);
      load_b_word = ($urandom_range(0, 2) == 0);
      b_be        = 2'($urandom_range(0, 3));
      b_word_in   = 16'($urandom);
      step($sformatf("random %0d", k));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
