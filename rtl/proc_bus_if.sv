// proc_bus_if: the processor bus interface of the snooping data cache.
//
// It carries out the handshake with the processor and holds the request for
// the cache controller. The processor raises p_as (address strobe) with a
// word address, read/write (p_rw = 1 for read), the two byte strobes
// p_uds/p_lds (upper and lower byte of the 16-bit word), write data, and two
// extra qualifiers: p_tas for an atomic test-and-set and p_own for a
// "load non-shared" read that should acquire ownership. The interface latches
// them, raises pr_valid to the cache controller and, when the controller
// answers with pr_done, latches the read word and raises p_dtack. p_dtack
// stays high until the processor drops p_as; the next request is accepted
// after that. The latched address feeds the B-side decoders and tag
// comparator of the cache memory directly.
//
// The source design names this interface and states that it implements the
// processor handshake for a 68010-class 16-bit bus with UDS/LDS byte lanes;
// the synchronous, active-high form of the handshake, the p_tas and p_own
// qualifiers and all timing are this design's own. Latency: pr_valid rises
// one cycle after p_as; p_dtack rises one cycle after pr_done.
module proc_bus_if
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
  // to the cache controller
  output logic              pr_valid,
  output proc_op_e          pr_op,
  output logic              pr_own,
  output logic [1:0]        pr_be,
  output logic [WORD_W-1:0] pr_wdata,
  output logic [ADR_W-1:0]  pr_adr,
  input  logic              pr_done,
  input  logic [WORD_W-1:0] pr_rdata
);

  typedef enum logic [1:0] {PB_IDLE, PB_BUSY, PB_ACK} pb_state_e;
  pb_state_e st_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= PB_IDLE;
      pr_op    <= PR_READ;
      pr_own   <= 1'b0;
      pr_be    <= 2'b00;
      pr_wdata <= '0;
      pr_adr   <= '0;
      p_rdata  <= '0;
    end else begin
      unique case (st_q)
        PB_IDLE: if (p_as) begin
          pr_op    <= p_tas ? PR_TAS : (p_rw ? PR_READ : PR_WRITE);
          pr_own   <= p_own;
          pr_be    <= {p_uds, p_lds};
          pr_wdata <= p_wdata;
          pr_adr   <= p_adr;
          st_q     <= PB_BUSY;
        end
        PB_BUSY: if (pr_done) begin
          p_rdata <= pr_rdata;
          st_q    <= PB_ACK;
        end
        PB_ACK: if (!p_as) st_q <= PB_IDLE;
        default: st_q <= PB_IDLE;
      endcase
    end
  end

  assign pr_valid = (st_q == PB_BUSY) && !pr_done;
  assign p_dtack  = (st_q == PB_ACK);

endmodule
