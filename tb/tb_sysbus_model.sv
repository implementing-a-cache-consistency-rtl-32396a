// tb_sysbus_model: behavioural model of the shared system bus, its arbiter,
// main memory and a cacheless I/O master, for simulation only.
//
// Bus lines are the OR of every agent's outputs (agents drive zeros when
// idle). The arbiter grants one requester at a time, round robin, and only
// while the bus carries no operation; a grant lasts while the agent keeps
// its request. Main memory answers every operation it is not inhibited
// from: it watches INHIBIT from the first cycle of an operation and never
// acknowledges before the fourth cycle, then acknowledges one beat every
// other cycle (read data from its store, write data into it; a
// Write-For-Invalidation gets a single acknowledge and changes nothing).
// An owner that inhibits memory supplies the data instead and memory keeps
// its old copy. Words never written read as init_word(adr).
// The I/O master (task io_write_block) issues conventional Writes of whole
// blocks, as a device without a cache would.
module tb_sysbus_model
  import bop_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned ADR_W = 19
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             req,
  output logic [N-1:0]             gnt,
  input  logic [N-1:0]             cmd,
  input  bus_op_e                  op   [N],
  input  logic [ADR_W-1:0]         adr  [N],
  input  logic [WORD_W-1:0]        data [N],
  input  logic [N-1:0]             ack,
  input  logic [N-1:0]             inh,
  output logic                     b_cmd,
  output bus_op_e                  b_op,
  output logic [ADR_W-1:0]         b_adr,
  output logic [WORD_W-1:0]        b_data,
  output logic                     b_ack,
  output logic                     b_inh
);

  logic [WORD_W-1:0] store [logic [ADR_W-1:0]];

  function automatic logic [WORD_W-1:0] init_word(logic [ADR_W-1:0] a);
    return WORD_W'(a * 7 + 16'h1234);
  endfunction

  function automatic logic [WORD_W-1:0] peek(logic [ADR_W-1:0] a);
    return store.exists(a) ? store[a] : init_word(a);
  endfunction

  // ---- I/O master (agent index N, always last in arbitration)
  logic              io_req, io_gnt, io_cmd;
  logic [ADR_W-1:0]  io_adr;
  logic [WORD_W-1:0] io_data;

  // ---- resolution
  logic              mem_ack_q;
  logic [WORD_W-1:0] mem_data_q;
  always_comb begin
    b_cmd  = io_cmd;
    b_op   = io_cmd ? OP_WRITE : OP_READ;
    b_adr  = io_cmd ? io_adr : '0;
    b_data = (io_cmd ? io_data : '0) | (mem_ack_q ? mem_data_q : '0);
    b_ack  = mem_ack_q;
    b_inh  = 1'b0;
    for (int i = 0; i < N; i++) begin
      b_cmd  |= cmd[i];
      b_op    = bus_op_e'(b_op | op[i]);
      b_adr  |= adr[i];
      b_data |= data[i];
      b_ack  |= ack[i];
      b_inh  |= inh[i];
    end
  end

  // ---- arbiter
  int owner;       // -1: none, N: I/O master
  int rr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner <= -1;
      rr    <= 0;
    end else if (owner >= 0) begin
      if ((owner < N && !req[owner]) || (owner == N && !io_req)) owner <= -1;
    end else if (!b_cmd) begin
      for (int k = 0; k < N; k++) begin
        automatic int i = (rr + k) % N;
        if (owner < 0 && req[i]) begin
          owner <= i;
          rr    <= (i + 1) % N;
          break;
        end
      end
      if (req == '0 && io_req) owner <= N;
    end
  end
  always_comb begin
    gnt = '0;
    for (int i = 0; i < N; i++) gnt[i] = (owner == i) && req[i];
    io_gnt = (owner == N) && io_req;
  end

  // ---- main memory
  logic cmd_d, inhibited;
  int   cyc;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_d     <= 1'b0;
      inhibited <= 1'b0;
      cyc       <= 0;
      mem_ack_q <= 1'b0;
      mem_data_q <= '0;
    end else begin
      cmd_d     <= b_cmd;
      mem_ack_q <= 1'b0;
      if (b_cmd && !cmd_d) begin
        cyc       <= 1;
        inhibited <= b_inh;
      end else if (b_cmd) begin
        cyc <= cyc + 1;
        if (b_inh) inhibited <= 1'b1;
        if (cyc >= 3 && !inhibited && !b_inh && !mem_ack_q) begin
          mem_ack_q <= 1'b1;
          if (op_is_read(b_op)) mem_data_q <= peek(b_adr);
          else begin
            mem_data_q <= '0;
            if (b_op != OP_WFI) store[b_adr] = b_data;
          end
        end
      end
    end
  end

  // ---- I/O master task: conventional Write of one block
  initial begin
    io_req = 1'b0; io_cmd = 1'b0; io_adr = '0; io_data = '0;
  end

  task automatic io_write_block(input logic [ADR_W-1:0] blk_base,
                                input logic [WORD_W-1:0] w [WORDS]);
    io_req = 1'b1;
    do @(posedge clk); while (!io_gnt);
    #1;
    io_cmd = 1'b1;
    for (int k = 0; k < WORDS; k++) begin
      io_adr  = blk_base | ADR_W'(k);
      io_data = w[k];
      do @(posedge clk); while (!b_ack);
      #1;
    end
    io_cmd = 1'b0; io_adr = '0; io_data = '0;
    @(posedge clk); #1;
    io_req = 1'b0;
  endtask

endmodule
