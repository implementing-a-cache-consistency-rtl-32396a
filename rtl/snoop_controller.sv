// snoop_controller: the bus-side controller of the snooping data cache.
//
// It watches every operation that another master starts on the system bus,
// looks the block up on the A side of the cache memory, and acts on a hit
// (a tag match on a non-Invalid entry; a hit on Invalid counts as a miss):
//   Read                : EXC -> inhibit memory, lock, supply block, mark NON
//                         NON -> inhibit memory, supply block
//                         UNO -> nothing
//   Read-For-Ownership  : EXC -> inhibit, lock, supply block, mark INV
//                         NON -> inhibit, supply block, mark INV
//                         UNO -> mark INV
//   Write, Write-For-Invalidation : mark INV
//   Write-Without-Invalidation    : nothing
// For an Owned Exclusively entry the snoop takes the intra-cache interlock
// before it re-reads the data, because the cache controller may be updating
// that entry locally; the order is: read the block, raise INHIBIT, obtain the
// interlock, re-read the data, answer the beats, store the new state,
// release the interlock and lower INHIBIT. This table and sequence follow
// the source design (Figures 2.7, 2.8 and Section 4).
//
// Timing: cycle 0 is the first cycle of the foreign operation (snoop_start).
// The A-side row is read at the end of cycle 0, the decision is taken in
// cycle 1, so INHIBIT is on the bus from cycle 2 and a plain invalidation is
// written into the state array at the end of cycle 2. The state is updated
// through SetAState then WrAState, one cycle each. snoop_busy is high from
// snoop_start until the last state write; the cache controller does not use
// the A side while it is high. The cycle numbering is this design's own.
module snoop_controller
  import bop_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // from the system bus interface
  input  logic   snoop_start,
  input  bus_op_e snoop_op,
  input  logic   s_done,
  output logic   s_resp,
  output logic   s_inhibit,
  // cache memory A side
  input  logic   match_a,
  input  state_e a_state,
  output logic   bus_adr_a,
  output logic   load_a_state,
  output logic   load_a_tags,
  output logic   load_a_data,
  output logic   set_a_state,
  output state_e state_value,
  output logic   wr_a_state,
  // interlock
  output logic   snoop_req,
  output logic   snoop_rel,
  input  logic   snoop_safe,
  // status
  output logic   snoop_busy
);

  typedef enum logic [2:0] {
    SN_IDLE, SN_DECIDE, SN_LOCK, SN_REREAD, SN_RESPOND, SN_SET, SN_WRITE
  } sn_state_e;

  sn_state_e st_q, st_d;
  bus_op_e   op_q;
  state_e    new_q, new_d;
  logic      inh_q, inh_d;
  logic      locked_q, locked_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= SN_IDLE;
      op_q     <= OP_READ;
      new_q    <= ST_INV;
      inh_q    <= 1'b0;
      locked_q <= 1'b0;
    end else begin
      st_q     <= st_d;
      new_q    <= new_d;
      inh_q    <= inh_d;
      locked_q <= locked_d;
      if (snoop_start) op_q <= snoop_op;
    end
  end

  always_comb begin
    st_d         = st_q;
    new_d        = new_q;
    inh_d        = inh_q;
    locked_d     = locked_q;
    bus_adr_a    = 1'b0;
    load_a_state = 1'b0;
    load_a_tags  = 1'b0;
    load_a_data  = 1'b0;
    set_a_state  = 1'b0;
    state_value  = new_q;
    wr_a_state   = 1'b0;
    s_resp       = 1'b0;
    snoop_req    = 1'b0;
    snoop_rel    = 1'b0;

    unique case (st_q)
      SN_IDLE: begin
        if (snoop_start) begin
          // Read the block: state, tag and data.
          bus_adr_a    = 1'b1;
          load_a_state = 1'b1;
          load_a_tags  = 1'b1;
          load_a_data  = 1'b1;
          st_d         = SN_DECIDE;
        end
      end

      SN_DECIDE: begin
        st_d = SN_IDLE;
        if (match_a) begin
          unique case (op_q)
            OP_READ, OP_RFO: begin
              new_d = (op_q == OP_RFO) ? ST_INV : ST_NON;
              if (a_state == ST_EXC) begin
                inh_d = 1'b1;
                st_d  = SN_LOCK;
              end else if (a_state == ST_NON) begin
                inh_d = 1'b1;
                st_d  = SN_RESPOND;
              end else if (op_q == OP_RFO) begin
                // UnOwned copy: the requester becomes exclusive owner.
                set_a_state = 1'b1;
                state_value = ST_INV;
                st_d        = SN_WRITE;
              end
            end
            OP_WRITE, OP_WFI: begin
              set_a_state = 1'b1;
              state_value = ST_INV;
              st_d        = SN_WRITE;
            end
            default: ;  // Write-Without-Invalidation: nothing to do
          endcase
        end
      end

      SN_LOCK: begin
        snoop_req = 1'b1;
        if (snoop_safe) begin
          locked_d  = 1'b1;
          st_d      = SN_REREAD;
        end
      end

      SN_REREAD: begin
        // Critical section: re-read the data under the interlock.
        bus_adr_a   = 1'b1;
        load_a_data = 1'b1;
        st_d        = SN_RESPOND;
      end

      SN_RESPOND: begin
        s_resp = 1'b1;
        if (s_done) st_d = SN_SET;
      end

      SN_SET: begin
        set_a_state = 1'b1;
        state_value = new_q;
        st_d        = SN_WRITE;
      end

      SN_WRITE: begin
        bus_adr_a  = 1'b1;
        wr_a_state = 1'b1;
        if (locked_q) begin
          snoop_rel = 1'b1;
          locked_d  = 1'b0;
        end
        inh_d = 1'b0;
        st_d  = SN_IDLE;
      end

      default: st_d = SN_IDLE;
    endcase
  end

  assign s_inhibit  = inh_q;
  assign snoop_busy = (st_q != SN_IDLE);

  // A new foreign operation cannot begin while the snoop is still busy
  // with the previous one.
  assert property (@(posedge clk) disable iff (!rst_n) snoop_start |-> st_q == SN_IDLE)
    else $error("snoop_controller: operation started while the snoop was busy");

endmodule
