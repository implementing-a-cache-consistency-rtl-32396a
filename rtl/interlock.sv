// interlock: the asymmetric intra-cache interlock between the cache
// controller (processor side, P) and the snoop controller (S).
//
// It is needed only when an Owned Exclusively entry is to be updated: for
// every other processor write the cache controller holds the system bus,
// which already keeps the snoop idle. Two lines carry it, ProcHas and
// SnoopWants (Figure 3.5):
//   P1 --(~SnoopWants / ProcHas)--> P2 --(~ProcHas)--> P1   (stays in P1 while SnoopWants)
//   S1 --(/ SnoopWants)--> S2 --(~ProcHas / SnoopWants)--> S3 --(~SnoopWants)--> S1
//   (stays in S2 while ProcHas)
// The processor may take the lock in the same cycle it asks, as long as
// SnoopWants is not already raised; the snoop must raise SnoopWants and wait
// a full cycle before it checks ProcHas, so the processor wins a tie and a
// snoop that meets an Owned Exclusively entry sees at least one cycle of
// latency.
//
// Interface: proc_req asks for the lock (level), proc_has reports it held
// (the ProcHas line, registered); proc_rel in P2 gives it back. snoop_req
// asks (level), snoop_wants is the SnoopWants line, snoop_safe marks state
// S3; snoop_rel in S3 gives it back. The states and transitions follow
// Figure 3.5; the request/release handshake with the two controllers is this
// design's own.
module interlock (
  input  logic clk,
  input  logic rst_n,
  input  logic proc_req,
  input  logic proc_rel,
  output logic proc_has,
  input  logic snoop_req,
  input  logic snoop_rel,
  output logic snoop_wants,
  output logic snoop_safe
);

  typedef enum logic [1:0] {S1 = 2'd0, S2 = 2'd1, S3 = 2'd2} snoop_st_e;
  snoop_st_e s_q;

  // Processor side: P1 when proc_has is low, P2 when it is high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      proc_has <= 1'b0;
    end else if (!proc_has) begin
      if (proc_req && !snoop_wants) proc_has <= 1'b1;  // P1 -> P2
    end else if (proc_rel) begin
      proc_has <= 1'b0;                                // P2 -> P1
    end
  end

  // Snoop side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= S1;
    end else begin
      unique case (s_q)
        S1: if (snoop_req) s_q <= S2;
        S2: if (!proc_has) s_q <= S3;
        S3: if (snoop_rel) s_q <= S1;
        default: s_q <= S1;
      endcase
    end
  end

  assign snoop_wants = (s_q == S2) || (s_q == S3);
  assign snoop_safe  = (s_q == S3);

  // The two critical sections never overlap.
  assert property (@(posedge clk) disable iff (!rst_n) !(proc_has && snoop_safe))
    else $error("interlock: processor and snoop both in their critical sections");

endmodule
