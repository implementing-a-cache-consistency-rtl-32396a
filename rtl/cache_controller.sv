// cache_controller: the processor-side controller of the snooping data cache.
//
// It serves the processor's reads, writes and test-and-sets under the
// ownership protocol (Figures 2.5 and 2.6 of the source design):
//  - Read hit: the word comes from the B side of the cache memory.
//  - Read miss: take the system bus; if the entry to be replaced is owned
//    (Owned Exclusively or NonExclusively) flush it with
//    Write-Without-Invalidation; fetch the block with Read and mark it
//    UnOwned. With the non-shared hint (pr_own, a "load non-shared") the
//    block is fetched with Read-For-Ownership and marked Owned Exclusively.
//  - Write hit on Owned Exclusively: no bus operation. Take the intra-cache
//    interlock, re-read the state; if it is still Owned Exclusively merge the
//    word into Bassembly and write the block back, then release. If the snoop
//    took the entry meanwhile, release and restart as below.
//  - Write hit on UnOwned / Owned NonExclusively: take the bus, re-read the
//    state (the snoop may have invalidated the entry while the controller
//    waited), issue Write-For-Invalidation, update the block, mark it Owned
//    Exclusively. An entry found Invalid is handled as a miss.
//  - Write miss: take the bus, flush an owned victim, fetch the block with
//    Read-For-Ownership, update it, mark it Owned Exclusively.
//  - Test-and-set: a write of 0x0001 to the whole word that returns the old
//    word, made atomic by the same interlocks.
// The bus is held from the re-read until the cache is updated, so the block
// cannot be stolen in between and its own snoop stays idle; while the bus is
// held the controller also uses the A side of the cache memory (state writes
// go through Astate, block fills through Aassembly).
//
// Interface: pr_valid holds a request (pr_op, pr_own, pr_be, pr_wdata, and
// the processor address that the cache memory decodes directly) until
// pr_done, a one-cycle pulse that comes with pr_rdata; pr_valid must be low
// in the cycle after pr_done. On a read hit pr_done is high two clock edges
// after pr_valid rises. The flows follow the source design; the cycle-level sequencing,
// the order of the A-side state writes and the test-and-set data (0x0001 in
// the whole word) are this design's own reading of it.
module cache_controller
  import bop_pkg::*;
#(
  parameter int unsigned IDX_W = 4,
  parameter int unsigned TAG_W = 13,
  localparam int unsigned ADR_W = TAG_W + IDX_W + WSEL_W,
  localparam int unsigned BA_W  = TAG_W + IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor request
  input  logic              pr_valid,
  input  proc_op_e          pr_op,
  input  logic              pr_own,
  input  logic [1:0]        pr_be,
  input  logic [WORD_W-1:0] pr_wdata,
  input  logic [ADR_W-1:0]  proc_adr,
  output logic              pr_done,
  output logic [WORD_W-1:0] pr_rdata,
  // cache memory B side
  output logic              proc_adr_b,
  output logic              load_b_state,
  output logic              load_b_tags,
  output logic              load_b_data,
  output logic              set_b_tags,
  output logic              wr_b_tags,
  output logic              wr_b_data,
  output logic              load_b_word,
  output logic [1:0]        b_be,
  output logic [WORD_W-1:0] b_word_in,
  input  logic              match_b,
  input  state_e            b_state,
  input  logic [WORD_W-1:0] b_word_out,
  // cache memory A side (used only while the bus is held)
  output logic              proc_adr_a,
  output logic              load_a_state,
  output logic              load_a_tags,
  output logic              load_a_data,
  output logic              set_a_adr,
  output logic              set_a_state,
  output state_e            state_value,
  output logic              wr_a_state,
  output logic              wr_a_data,
  input  state_e            a_state,
  input  logic [TAG_W-1:0]  a_tag,
  input  logic [IDX_W-1:0]  a_adr,
  // system bus interface
  output logic              bus_hold,
  input  logic              granted,
  output logic              m_start,
  output bus_op_e           m_op,
  output logic [BA_W-1:0]   m_blkadr,
  input  logic              m_done,
  input  logic              snoop_busy,
  // interlock
  output logic              proc_req,
  output logic              proc_rel,
  input  logic              proc_has
);

  typedef enum logic [4:0] {
    CC_IDLE, CC_CHECK, CC_LOCK, CC_L_CHECK, CC_L_WRITE,
    CC_ARB, CC_DECIDE, CC_FLUSH, CC_FILL_START, CC_FILL,
    CC_INSTALL, CC_INSTALL2, CC_WFI, CC_WSTATE,
    CC_BREAD, CC_BDONE, CC_BWRITE, CC_RESP
  } cc_state_e;

  cc_state_e          st_q, st_d;
  logic               done_q, done_d;
  logic [WORD_W-1:0]  rdata_q, rdata_d;

  logic [TAG_W-1:0] p_tag;
  logic [BA_W-1:0]  p_blk;
  assign p_tag = proc_adr[ADR_W-1 -: TAG_W];
  assign p_blk = proc_adr[ADR_W-1 -: BA_W];

  logic is_rd, a_hit;
  assign is_rd = (pr_op == PR_READ);
  assign a_hit = (a_tag == p_tag) && (a_state != ST_INV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= CC_IDLE;
      done_q  <= 1'b0;
      rdata_q <= '0;
    end else begin
      st_q    <= st_d;
      done_q  <= done_d;
      rdata_q <= rdata_d;
    end
  end

  assign pr_done  = done_q;
  assign pr_rdata = rdata_q;

  assign b_be      = (pr_op == PR_TAS) ? 2'b11 : pr_be;
  assign b_word_in = (pr_op == PR_TAS) ? WORD_W'(1) : pr_wdata;

  always_comb begin
    st_d         = st_q;
    done_d       = 1'b0;
    rdata_d      = rdata_q;
    proc_adr_b   = 1'b0;
    load_b_state = 1'b0;
    load_b_tags  = 1'b0;
    load_b_data  = 1'b0;
    set_b_tags   = 1'b0;
    wr_b_tags    = 1'b0;
    wr_b_data    = 1'b0;
    load_b_word  = 1'b0;
    proc_adr_a   = 1'b0;
    load_a_state = 1'b0;
    load_a_tags  = 1'b0;
    load_a_data  = 1'b0;
    set_a_adr    = 1'b0;
    set_a_state  = 1'b0;
    state_value  = ST_EXC;
    wr_a_state   = 1'b0;
    wr_a_data    = 1'b0;
    bus_hold     = 1'b0;
    m_start      = 1'b0;
    m_op         = OP_READ;
    m_blkadr     = p_blk;
    proc_req     = 1'b0;
    proc_rel     = 1'b0;

    unique case (st_q)
      CC_IDLE: begin
        if (pr_valid) begin
          proc_adr_b   = 1'b1;
          load_b_state = 1'b1;
          load_b_tags  = 1'b1;
          load_b_data  = 1'b1;
          st_d         = CC_CHECK;
        end
      end

      CC_CHECK: begin
        if (is_rd) begin
          if (match_b) begin
            rdata_d = b_word_out;
            done_d  = 1'b1;
            st_d    = CC_RESP;
          end else begin
            st_d = CC_ARB;
          end
        end else if (match_b && b_state == ST_EXC) begin
          st_d = CC_LOCK;
        end else begin
          st_d = CC_ARB;
        end
      end

      // ---- local write to an Owned Exclusively entry, under the interlock
      CC_LOCK: begin
        proc_req = 1'b1;
        if (proc_has) begin
          // Critical section: re-read the state (and the block).
          proc_adr_b   = 1'b1;
          load_b_state = 1'b1;
          load_b_tags  = 1'b1;
          load_b_data  = 1'b1;
          st_d         = CC_L_CHECK;
        end
      end

      CC_L_CHECK: begin
        if (match_b && b_state == ST_EXC) begin
          rdata_d     = b_word_out;
          load_b_word = 1'b1;
          st_d        = CC_L_WRITE;
        end else begin
          // The snoop took the block: restart as a bus write.
          proc_rel = 1'b1;
          st_d     = CC_ARB;
        end
      end

      CC_L_WRITE: begin
        proc_adr_b = 1'b1;
        wr_b_data  = 1'b1;
        proc_rel   = 1'b1;
        done_d     = 1'b1;
        st_d       = CC_RESP;
      end

      // ---- operations that hold the system bus
      CC_ARB: begin
        bus_hold = 1'b1;
        if (granted && !snoop_busy) begin
          proc_adr_a   = 1'b1;
          load_a_state = 1'b1;
          load_a_tags  = 1'b1;
          load_a_data  = 1'b1;
          set_a_adr    = 1'b1;
          st_d         = CC_DECIDE;
        end
      end

      CC_DECIDE: begin
        bus_hold = 1'b1;
        if (a_hit && (is_rd || a_state == ST_EXC)) begin
          st_d = CC_BREAD;
        end else if (a_hit) begin
          m_start = 1'b1;
          m_op    = OP_WFI;
          st_d    = CC_WFI;
        end else if (is_owned(a_state)) begin
          m_start  = 1'b1;
          m_op     = OP_WWI;
          m_blkadr = {a_tag, a_adr};
          st_d     = CC_FLUSH;
        end else begin
          st_d = CC_FILL_START;
        end
      end

      CC_FLUSH: begin
        bus_hold = 1'b1;
        if (m_done) st_d = CC_FILL_START;
      end

      CC_FILL_START: begin
        bus_hold = 1'b1;
        m_start  = 1'b1;
        m_op     = (is_rd && !pr_own) ? OP_READ : OP_RFO;
        st_d     = CC_FILL;
      end

      CC_FILL: begin
        bus_hold = 1'b1;
        if (m_done) st_d = CC_INSTALL;
      end

      CC_INSTALL: begin
        bus_hold    = 1'b1;
        proc_adr_a  = 1'b1;
        wr_a_data   = 1'b1;
        set_b_tags  = 1'b1;
        set_a_state = 1'b1;
        state_value = (is_rd && !pr_own) ? ST_UNO : ST_EXC;
        st_d        = CC_INSTALL2;
      end

      CC_INSTALL2: begin
        bus_hold   = 1'b1;
        proc_adr_a = 1'b1;
        wr_a_state = 1'b1;
        proc_adr_b = 1'b1;
        wr_b_tags  = 1'b1;
        st_d       = CC_BREAD;
      end

      CC_WFI: begin
        bus_hold = 1'b1;
        if (m_done) begin
          set_a_state = 1'b1;
          state_value = ST_EXC;
          st_d        = CC_WSTATE;
        end
      end

      CC_WSTATE: begin
        bus_hold   = 1'b1;
        proc_adr_a = 1'b1;
        wr_a_state = 1'b1;
        st_d       = CC_BREAD;
      end

      CC_BREAD: begin
        bus_hold     = 1'b1;
        proc_adr_b   = 1'b1;
        load_b_state = 1'b1;
        load_b_tags  = 1'b1;
        load_b_data  = 1'b1;
        st_d         = CC_BDONE;
      end

      CC_BDONE: begin
        bus_hold = 1'b1;
        rdata_d  = b_word_out;
        if (is_rd) begin
          done_d = 1'b1;
          st_d   = CC_RESP;
        end else begin
          load_b_word = 1'b1;
          st_d        = CC_BWRITE;
        end
      end

      CC_BWRITE: begin
        bus_hold   = 1'b1;
        proc_adr_b = 1'b1;
        wr_b_data  = 1'b1;
        done_d     = 1'b1;
        st_d       = CC_RESP;
      end

      CC_RESP: st_d = CC_IDLE;

      default: st_d = CC_IDLE;
    endcase
  end

  // The A side belongs to the controller only while it holds the bus.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (proc_adr_a || set_a_state) |-> bus_hold)
    else $error("cache_controller: A side used without the system bus");
  // A local update without the bus happens only under the interlock.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_b_data && !bus_hold) |-> proc_has)
    else $error("cache_controller: local write outside the interlock");

endmodule
