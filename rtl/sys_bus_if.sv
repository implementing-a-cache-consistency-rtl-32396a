// sys_bus_if: the system bus interface of the snooping data cache.
//
// It hides the bus from the two controllers and moves block data between the
// bus and the A-side assembly register (Aassembly) of the cache memory.
// It has three parts:
//  - Arbitration: while the cache controller holds bus_hold the interface
//    requests the bus; `granted` tells the controller it is master. The
//    controller keeps the bus over a whole miss (flush, fill and cache
//    update), which is what keeps its own snoop idle.
//  - Master sequencer: m_start launches one bus operation on block address
//    m_blkadr. The interface drives cmd, op and the word address for the
//    whole operation and steps the word index on every acknowledged beat:
//    four beats for a block operation, one for Write-For-Invalidation. Read
//    data is loaded word by word into Aassembly; write data is taken from it.
//    m_done pulses with the last acknowledge.
//  - Responder: while the snoop holds s_resp, the interface answers each beat
//    of the current (foreign) operation with the addressed word of Aassembly
//    and an acknowledge; s_done pulses with the last one. s_inhibit is
//    passed to the bus INHIBIT line.
// snoop_start pulses in the first cycle of every operation that another
// master starts; snoop_adr holds that operation's block address until the
// next operation begins.
//
// Bus protocol (this design's own, modelled on a synchronous single-master
// bus with a memory inhibit line, an acknowledge line and extra operation
// lines): every output is zero while not driven, so the bus is the OR of
// all agents' outputs. A master keeps cmd high for a whole operation and
// drops it for at least one cycle between operations. A responder
// acknowledges a beat with a one-cycle ack pulse carrying the data, and never
// in two consecutive cycles, so one beat takes two cycles. A snoop that owns
// the block raises INHIBIT no later than the third cycle of the operation;
// memory may not acknowledge before the fourth. The source design fixes only
// that memory can be inhibited, that the bus has an extra line for the
// protocol operations and that one request is pending at a time.
// snoop_op, the two word-select bits of snoop_adr and a_word_in are wired
// straight from the bus inputs; only the block part of the address is held.
module sys_bus_if
  import bop_pkg::*;
#(
  parameter int unsigned IDX_W = 4,
  parameter int unsigned TAG_W = 13,
  localparam int unsigned ADR_W = TAG_W + IDX_W + WSEL_W,
  localparam int unsigned BA_W  = TAG_W + IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // system bus: this agent's outputs
  output logic              sb_req,
  output logic              sb_cmd_o,
  output bus_op_e           sb_op_o,
  output logic [ADR_W-1:0]  sb_adr_o,
  output logic [WORD_W-1:0] sb_data_o,
  output logic              sb_ack_o,
  output logic              sb_inh_o,
  // system bus: grant and resolved lines
  input  logic              sb_gnt,
  input  logic              sb_cmd_i,
  input  bus_op_e           sb_op_i,
  input  logic [ADR_W-1:0]  sb_adr_i,
  input  logic [WORD_W-1:0] sb_data_i,
  input  logic              sb_ack_i,
  // cache controller side
  input  logic              bus_hold,
  output logic              granted,
  input  logic              m_start,
  input  bus_op_e           m_op,
  input  logic [BA_W-1:0]   m_blkadr,
  output logic              m_done,
  // snoop controller side
  output logic              snoop_start,
  output bus_op_e           snoop_op,
  output logic [ADR_W-1:0]  snoop_adr,
  input  logic              s_resp,
  input  logic              s_inhibit,
  output logic              s_done,
  // cache memory A side
  output logic [WORDS-1:0]  mux_a,
  output logic              load_a_word,
  output logic [WORD_W-1:0] a_word_in,
  input  logic [WORD_W-1:0] a_word_out
);

  // ---------------------------------------------------------------- master
  logic              act_q;
  bus_op_e           op_q;
  logic [BA_W-1:0]   ba_q;
  logic [1:0]        word_q;
  logic [2:0]        beats_left_q;

  logic m_beat;
  assign m_beat = act_q && sb_ack_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q        <= 1'b0;
      op_q         <= OP_READ;
      ba_q         <= '0;
      word_q       <= '0;
      beats_left_q <= '0;
    end else if (!act_q) begin
      if (m_start && granted) begin
        act_q        <= 1'b1;
        op_q         <= m_op;
        ba_q         <= m_blkadr;
        word_q       <= '0;
        beats_left_q <= op_beats(m_op);
      end
    end else if (m_beat) begin
      word_q       <= word_q + 2'd1;
      beats_left_q <= beats_left_q - 3'd1;
      if (beats_left_q == 3'd1) act_q <= 1'b0;
    end
  end

  assign m_done   = m_beat && (beats_left_q == 3'd1);
  assign granted  = bus_hold && sb_gnt;
  assign sb_req   = bus_hold;
  assign sb_cmd_o = act_q;
  assign sb_op_o  = act_q ? op_q : OP_READ;
  assign sb_adr_o = act_q ? {ba_q, word_q} : '0;

  logic m_writes;
  assign m_writes = act_q && (op_q == OP_WRITE || op_q == OP_WWI);

  // ------------------------------------------------------------- responder
  logic              ack_q;
  logic [WORD_W-1:0] rdata_q;
  logic [1:0]        rbeats_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      rdata_q  <= '0;
      rbeats_q <= '0;
    end else begin
      ack_q <= 1'b0;
      if (!s_resp) begin
        rbeats_q <= '0;
      end else if (sb_cmd_i && !ack_q) begin
        ack_q    <= 1'b1;
        rdata_q  <= a_word_out;
        rbeats_q <= rbeats_q + 2'd1;
      end
    end
  end

  assign sb_ack_o = ack_q;
  assign s_done   = ack_q && (rbeats_q == 2'd0);  // fourth beat wrapped the count
  assign sb_inh_o = s_inhibit;

  // Data lines: master write data, or responder read data.
  assign sb_data_o = m_writes ? a_word_out : (ack_q ? rdata_q : '0);

  // Aassembly word select and load
  always_comb begin
    mux_a = '0;
    if (act_q)       mux_a[word_q] = 1'b1;
    else if (s_resp) mux_a[sb_adr_i[1:0]] = 1'b1;
  end
  assign load_a_word = m_beat && op_is_read(op_q);
  assign a_word_in   = sb_data_i;

  // ------------------------------------------------------------ snoop feed
  // The block address of an operation is latched in its first cycle, so the
  // snoop can still address its entry after the master has left the bus.
  logic            cmd_d;
  logic [BA_W-1:0] sblk_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_d  <= 1'b0;
      sblk_q <= '0;
    end else begin
      cmd_d <= sb_cmd_i;
      if (sb_cmd_i && !cmd_d) sblk_q <= sb_adr_i[ADR_W-1 -: BA_W];
    end
  end
  assign snoop_start = sb_cmd_i && !cmd_d && !act_q;
  assign snoop_op    = sb_op_i;
  assign snoop_adr   = (sb_cmd_i && !cmd_d) ? sb_adr_i : {sblk_q, sb_adr_i[WSEL_W-1:0]};

  // Only a granted agent starts an operation.
  assert property (@(posedge clk) disable iff (!rst_n) act_q |-> bus_hold)
    else $error("sys_bus_if: bus released in the middle of an operation");
  assert property (@(posedge clk) disable iff (!rst_n) !(act_q && s_resp))
    else $error("sys_bus_if: responding to its own operation");

endmodule
