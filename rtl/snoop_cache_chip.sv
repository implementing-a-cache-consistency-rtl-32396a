// snoop_cache_chip: a single-chip snooping data cache for a shared-bus
// multiprocessor, keeping caches consistent with an ownership protocol.
//
// Every cached block is in one of four states: Invalid, UnOwned (a read-only
// copy), Owned Exclusively (the only copy, writable locally) or Owned
// NonExclusively (owned, but other caches hold copies). At most one cache
// owns a block; the owner supplies it to other caches, inhibiting main
// memory, and writes it back when it is replaced. The chip joins five parts
// (Figure 3.1 of the source design):
//   cache_datapath   - 16-entry direct-mapped cache memory with dual-ported
//                      read (A side: bus, B side: processor)
//   cache_controller - serves processor reads, writes and test-and-sets
//   snoop_controller - answers other masters' bus operations
//   proc_bus_if      - processor handshake, 16-bit word with byte lanes
//   sys_bus_if       - bus arbitration, block transfers, snoop responses
// plus the asymmetric interlock that lets a processor write to an Owned
// Exclusively entry without the bus while the snoop may want to read it.
//
// The A side of the cache memory is shared: the snoop uses it for foreign
// operations, the cache controller only while it holds the system bus (its
// own snoop is then idle) and only after the snoop has finished its previous
// operation. Their control strobes are therefore ORed.
//
// Ports: the processor bus (p_*) and this chip's system bus outputs (sb_*_o,
// all zero when not driven) and inputs (sb_gnt, and the resolved bus lines
// sb_*_i, which are the OR of all agents' outputs). Parameters IDX_W and
// TAG_W give the 16-entry, 13-bit-tag, 19-bit word address organisation of
// the source design. The whole chip runs on one clock, one edge per cycle
// of the source design's two-phase clock.
module snoop_cache_chip
  import bop_pkg::*;
#(
  parameter int unsigned IDX_W = 4,
  parameter int unsigned TAG_W = 13,
  localparam int unsigned ADR_W = TAG_W + IDX_W + WSEL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor bus
  input  logic              p_as,
  input  logic              p_rw,
  input  logic              p_uds,
  input  logic              p_lds,
  input  logic              p_tas,
  input  logic              p_own,
  input  logic [ADR_W-1:0]  p_adr,
  input  logic [WORD_W-1:0] p_wdata,
  output logic [WORD_W-1:0] p_rdata,
  output logic              p_dtack,
  // system bus
  output logic              sb_req,
  input  logic              sb_gnt,
  output logic              sb_cmd_o,
  output bus_op_e           sb_op_o,
  output logic [ADR_W-1:0]  sb_adr_o,
  output logic [WORD_W-1:0] sb_data_o,
  output logic              sb_ack_o,
  output logic              sb_inh_o,
  input  logic              sb_cmd_i,
  input  bus_op_e           sb_op_i,
  input  logic [ADR_W-1:0]  sb_adr_i,
  input  logic [WORD_W-1:0] sb_data_i,
  input  logic              sb_ack_i
);

  localparam int unsigned BA_W = TAG_W + IDX_W;

  // processor interface <-> cache controller
  logic              pr_valid, pr_own, pr_done;
  proc_op_e          pr_op;
  logic [1:0]        pr_be;
  logic [WORD_W-1:0] pr_wdata, pr_rdata;
  logic [ADR_W-1:0]  pr_adr;

  // cache memory
  logic              match_a, match_b;
  state_e            a_state, b_state;
  logic [TAG_W-1:0]  a_tag;
  logic [IDX_W-1:0]  a_adr;
  logic [WORD_W-1:0] a_word_out, a_word_in, b_word_out, b_word_in;
  logic [WORDS-1:0]  mux_a;
  logic              load_a_word;

  // B side (cache controller only)
  logic       proc_adr_b, load_b_state, load_b_tags, load_b_data;
  logic       set_b_tags, wr_b_tags, wr_b_data, load_b_word;
  logic [1:0] b_be;

  // A side, from each controller
  logic   cc_proc_adr_a, cc_load_a_state, cc_load_a_tags, cc_load_a_data;
  logic   cc_set_a_adr, cc_set_a_state, cc_wr_a_state, cc_wr_a_data;
  state_e cc_state_value;
  logic   sn_bus_adr_a, sn_load_a_state, sn_load_a_tags, sn_load_a_data;
  logic   sn_set_a_state, sn_wr_a_state;
  state_e sn_state_value;

  // bus interface <-> controllers
  logic              bus_hold, granted, m_start, m_done;
  bus_op_e           m_op;
  logic [BA_W-1:0]   m_blkadr;
  logic              snoop_start, s_resp, s_inhibit, s_done, snoop_busy;
  bus_op_e           snoop_op;
  logic [ADR_W-1:0]  snoop_adr;

  // interlock
  logic proc_req, proc_rel, proc_has, snoop_req, snoop_rel, snoop_wants, snoop_safe;

  proc_bus_if #(.IDX_W(IDX_W), .TAG_W(TAG_W)) u_pbi (
    .clk, .rst_n,
    .p_as, .p_rw, .p_uds, .p_lds, .p_tas, .p_own, .p_adr, .p_wdata, .p_rdata, .p_dtack,
    .pr_valid, .pr_op, .pr_own, .pr_be, .pr_wdata, .pr_adr, .pr_done, .pr_rdata
  );

  cache_datapath #(.IDX_W(IDX_W), .TAG_W(TAG_W)) u_mem (
    .clk, .rst_n,
    .bus_adr      (snoop_adr),
    .proc_adr     (pr_adr),
    .bus_adr_a    (sn_bus_adr_a),
    .proc_adr_a   (cc_proc_adr_a),
    .load_a_state (sn_load_a_state | cc_load_a_state),
    .load_a_tags  (sn_load_a_tags  | cc_load_a_tags),
    .load_a_data  (sn_load_a_data  | cc_load_a_data),
    .set_a_state  (sn_set_a_state  | cc_set_a_state),
    .state_value  (cc_set_a_state ? cc_state_value : sn_state_value),
    .wr_a_state   (sn_wr_a_state   | cc_wr_a_state),
    .wr_a_data    (cc_wr_a_data),
    .set_a_adr    (cc_set_a_adr),
    .mux_a, .load_a_word, .a_word_in,
    .match_a, .a_state, .a_tag, .a_adr, .a_word_out,
    .proc_adr_b, .load_b_state, .load_b_tags, .load_b_data,
    .set_b_tags, .wr_b_tags, .wr_b_data, .load_b_word, .b_be, .b_word_in,
    .match_b, .b_state, .b_word_out
  );

  cache_controller #(.IDX_W(IDX_W), .TAG_W(TAG_W)) u_cc (
    .clk, .rst_n,
    .pr_valid, .pr_op, .pr_own, .pr_be, .pr_wdata,
    .proc_adr     (pr_adr),
    .pr_done, .pr_rdata,
    .proc_adr_b, .load_b_state, .load_b_tags, .load_b_data,
    .set_b_tags, .wr_b_tags, .wr_b_data, .load_b_word, .b_be, .b_word_in,
    .match_b, .b_state, .b_word_out,
    .proc_adr_a   (cc_proc_adr_a),
    .load_a_state (cc_load_a_state),
    .load_a_tags  (cc_load_a_tags),
    .load_a_data  (cc_load_a_data),
    .set_a_adr    (cc_set_a_adr),
    .set_a_state  (cc_set_a_state),
    .state_value  (cc_state_value),
    .wr_a_state   (cc_wr_a_state),
    .wr_a_data    (cc_wr_a_data),
    .a_state, .a_tag, .a_adr,
    .bus_hold, .granted, .m_start, .m_op, .m_blkadr, .m_done, .snoop_busy,
    .proc_req, .proc_rel, .proc_has
  );

  snoop_controller u_sc (
    .clk, .rst_n,
    .snoop_start, .snoop_op, .s_done, .s_resp, .s_inhibit,
    .match_a, .a_state,
    .bus_adr_a    (sn_bus_adr_a),
    .load_a_state (sn_load_a_state),
    .load_a_tags  (sn_load_a_tags),
    .load_a_data  (sn_load_a_data),
    .set_a_state  (sn_set_a_state),
    .state_value  (sn_state_value),
    .wr_a_state   (sn_wr_a_state),
    .snoop_req, .snoop_rel, .snoop_safe,
    .snoop_busy
  );

  interlock u_lock (
    .clk, .rst_n,
    .proc_req, .proc_rel, .proc_has,
    .snoop_req, .snoop_rel, .snoop_wants, .snoop_safe
  );

  sys_bus_if #(.IDX_W(IDX_W), .TAG_W(TAG_W)) u_sbi (
    .clk, .rst_n,
    .sb_req, .sb_cmd_o, .sb_op_o, .sb_adr_o, .sb_data_o, .sb_ack_o, .sb_inh_o,
    .sb_gnt, .sb_cmd_i, .sb_op_i, .sb_adr_i, .sb_data_i, .sb_ack_i,
    .bus_hold, .granted, .m_start, .m_op, .m_blkadr, .m_done,
    .snoop_start, .snoop_op, .snoop_adr,
    .s_resp, .s_inhibit, .s_done,
    .mux_a, .load_a_word, .a_word_in, .a_word_out
  );

  // The two controllers never drive the A side in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !((sn_bus_adr_a || sn_set_a_state) && (cc_proc_adr_a || cc_set_a_state)))
    else $error("snoop_cache_chip: both controllers on the A side");

  // The snoop is only told it is safe while it is asking, and the processor
  // side never owns the cache memory at the same time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   snoop_safe |-> (snoop_wants && !proc_has))
    else $error("snoop_cache_chip: snoop safe without its request");

endmodule
