// cache_datapath: the cache memory subsystem of the snooping data cache.
//
// A direct-mapped array of 2**IDX_W entries (16 by default), each holding a
// two-bit ownership state, a TAG_W-bit tag (13 by default) and a 64-bit data
// block of four 16-bit words. Two independent row decoders, A and B, give a
// dual-ported read: the A side serves the system bus (snoop reads, block
// fills and flushes), the B side serves the processor. Each side reads a row
// into its own registers: Astate/Atags/Aassembly and Bstate/Btags/Bassembly.
// The assembly registers turn the 64-bit block into 16-bit words: the A side
// word is chosen by the one-hot MuxA lines (to and from the system bus), the
// B side word by the low two processor address bits, with UDS/LDS byte
// lanes on a processor write.
//
// Writes go back from the registers: WrAData writes Aassembly and WrBData
// writes Bassembly into the data array, WrBTags writes Btags (loaded from the
// processor address by SetBTags) into the tag array, and WrAState writes
// Astate (loaded with StateValue by SetAState) into the state array. The
// state array therefore has a single writer path, and its bits change
// independently of tag and data, as in the source design.
//
// Address split of the 19-bit word address: tag = adr[18:6],
// index = adr[5:2], word = adr[1:0] (Figure 3.2 numbering).
// MatchA compares Atags with the system bus address tag, MatchB compares
// Btags with the processor address tag; both also require a state other
// than Invalid.
//
// Timing: one rising clock edge stands for one read or write cycle of the
// source design's two-phase clock. Load*/Set*/Wr* strobes sampled at an edge
// take effect at that edge; outputs are register outputs, valid in the next
// cycle. A read and a write of the same row in one cycle return the old
// value, so a reader sees a row either before or after a write, never in
// between. Signal names follow Figure 3.2; the single-clock abstraction, the
// one-hot reading of MuxA and the reset of all states to Invalid are this
// design's own choices. The figure's BusAdrB (bus address on the B decoder)
// has no described use and is left out.
module cache_datapath
  import bop_pkg::*;
#(
  parameter int unsigned IDX_W = 4,
  parameter int unsigned TAG_W = 13,
  localparam int unsigned ADR_W = TAG_W + IDX_W + WSEL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ADR_W-1:0]   bus_adr,      // address from the system bus interface
  input  logic [ADR_W-1:0]   proc_adr,     // address from the processor bus interface
  // A side (system bus side)
  input  logic               bus_adr_a,    // BusAdrA: A decoder takes the bus index
  input  logic               proc_adr_a,   // ProcAdrA: A decoder takes the processor index
  input  logic               load_a_state,
  input  logic               load_a_tags,
  input  logic               load_a_data,
  input  logic               set_a_state,
  input  state_e             state_value,
  input  logic               wr_a_state,
  input  logic               wr_a_data,
  input  logic               set_a_adr,    // SetAAdr: latch the decoded A index
  input  logic [WORDS-1:0]   mux_a,        // one-hot word select of Aassembly
  input  logic               load_a_word,  // load selected Aassembly word from the bus
  input  logic [WORD_W-1:0]  a_word_in,
  output logic               match_a,
  output state_e             a_state,
  output logic [TAG_W-1:0]   a_tag,
  output logic [IDX_W-1:0]   a_adr,
  output logic [WORD_W-1:0]  a_word_out,
  // B side (processor side)
  input  logic               proc_adr_b,   // ProcAdrB: B decoder takes the processor index
  input  logic               load_b_state,
  input  logic               load_b_tags,
  input  logic               load_b_data,
  input  logic               set_b_tags,
  input  logic               wr_b_tags,
  input  logic               wr_b_data,
  input  logic               load_b_word,  // merge a processor word into Bassembly
  input  logic [1:0]         b_be,         // {UDS, LDS} byte lanes of that word
  input  logic [WORD_W-1:0]  b_word_in,
  output logic               match_b,
  output state_e             b_state,
  output logic [WORD_W-1:0]  b_word_out
);

  localparam int unsigned N = 1 << IDX_W;

  state_e             state_mem [N];
  logic [TAG_W-1:0]   tag_mem   [N];
  logic [BLOCK_W-1:0] data_mem  [N];

  logic [TAG_W-1:0]   b_tag;
  logic [BLOCK_W-1:0] a_blk, b_blk;

  // Row decoders
  logic [IDX_W-1:0] a_idx, b_idx;
  assign a_idx = proc_adr_a ? proc_adr[WSEL_W +: IDX_W] : bus_adr[WSEL_W +: IDX_W];
  assign b_idx = proc_adr[WSEL_W +: IDX_W];

  logic [1:0] b_wsel;
  assign b_wsel = proc_adr[WSEL_W-1:0];

  // State array: single write path from Astate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) state_mem[i] <= ST_INV;
    end else if (wr_a_state) begin
      state_mem[a_idx] <= a_state;
    end
  end

  // Tag and data arrays
  always_ff @(posedge clk) begin
    if (wr_b_tags) tag_mem[b_idx] <= b_tag;
    if (wr_a_data) data_mem[a_idx] <= a_blk;
    else if (wr_b_data) data_mem[b_idx] <= b_blk;
  end

  // A side registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_state <= ST_INV;
      a_tag   <= '0;
      a_adr   <= '0;
      a_blk   <= '0;
    end else begin
      if (set_a_state)       a_state <= state_value;
      else if (load_a_state) a_state <= state_mem[a_idx];
      if (load_a_tags)       a_tag   <= tag_mem[a_idx];
      if (set_a_adr)         a_adr   <= a_idx;
      if (load_a_data) begin
        a_blk <= data_mem[a_idx];
      end else if (load_a_word) begin
        for (int w = 0; w < WORDS; w++)
          if (mux_a[w]) a_blk[w*WORD_W +: WORD_W] <= a_word_in;
      end
    end
  end

  // B side registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_state <= ST_INV;
      b_tag   <= '0;
      b_blk   <= '0;
    end else begin
      if (load_b_state) b_state <= state_mem[b_idx];
      if (set_b_tags)       b_tag <= proc_adr[ADR_W-1 -: TAG_W];
      else if (load_b_tags) b_tag <= tag_mem[b_idx];
      if (load_b_data) begin
        b_blk <= data_mem[b_idx];
      end else if (load_b_word) begin
        if (b_be[0]) b_blk[b_wsel*WORD_W +: 8]     <= b_word_in[7:0];
        if (b_be[1]) b_blk[b_wsel*WORD_W + 8 +: 8] <= b_word_in[15:8];
      end
    end
  end

  // Word multiplexors
  always_comb begin
    a_word_out = '0;
    for (int w = 0; w < WORDS; w++)
      if (mux_a[w]) a_word_out = a_blk[w*WORD_W +: WORD_W];
  end
  assign b_word_out = b_blk[b_wsel*WORD_W +: WORD_W];

  // Tag match
  assign match_a = (a_tag == bus_adr[ADR_W-1 -: TAG_W])  && (a_state != ST_INV);
  assign match_b = (b_tag == proc_adr[ADR_W-1 -: TAG_W]) && (b_state != ST_INV);

  // The data array has one write port: only one side writes it per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_a_data && wr_b_data))
    else $error("cache_datapath: WrAData and WrBData in the same cycle");
  // A loaded register must have a decoded row.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (load_a_state || load_a_tags || load_a_data || wr_a_state || wr_a_data)
                   |-> (bus_adr_a || proc_adr_a))
    else $error("cache_datapath: A side access without an A decode");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (load_b_state || load_b_tags || load_b_data || wr_b_tags || wr_b_data)
                   |-> proc_adr_b)
    else $error("cache_datapath: B side access without a B decode");
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mux_a))
    else $error("cache_datapath: MuxA not one-hot");

endmodule
