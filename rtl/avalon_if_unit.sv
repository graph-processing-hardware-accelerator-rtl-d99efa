// avalon_if_unit: Avalon memory-mapped slave in front of the hardware
// priority queue.
//
// The processor drives the queue through four 32-bit registers:
//   0 PRIO    write: priority of the next INSERT;  read: priority last extracted
//   1 ID      write: identifier of the next INSERT; read: identifier last extracted
//   2 CMD     write: bit0 INSERT the staged entry, bit1 EXTRACT the smallest
//             entry (bit1 wins if both are set); read: same as STATUS
//   3 STATUS  read: bit0 empty, bit1 full, bit2 last EXTRACT returned an entry,
//             bit3 sticky INSERT-refused, bit4 sticky EXTRACT-on-empty,
//             bits 31:16 entry count; write: a 1 clears the matching sticky bit
// The unit counts the entries in the queue. An INSERT while the count equals
// CAPACITY is refused and flagged, so the queue array itself can never
// overflow; software that sees the full bit keeps further entries in memory
// instead, which is the hybrid hardware/software queue policy. An EXTRACT on
// an empty queue returns nothing and is flagged.
//
// Timing: a command write is issued to the queue in the same cycle (pq_tok_o
// or pq_shift_o) and the extracted entry is captured at that clock edge, so a
// read in the next bus cycle returns it. Reads have a fixed latency of one
// clock (readdata valid the cycle after read). There is no waitrequest: every
// access completes in one cycle. The block's existence and its role between
// the system bus and the queue follow the accelerator's description; the
// register map, the status word and the refusal policy are this design's own.
module avalon_if_unit
  import pq_pkg::*;
#(
  parameter int unsigned CAPACITY = 16   // entries the attached queue can hold
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave, read latency 1
  input  logic [1:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // to the hardware priority queue unit
  output pq_slot_t    pq_tok_o,      // entry to insert, valid for one cycle
  output logic        pq_shift_o,    // extract the head this cycle
  input  pq_slot_t    pq_head_i,     // current head of the queue
  // status for the system
  output logic        empty_o,
  output logic        full_o
);

  localparam int unsigned CW = $clog2(CAPACITY + 1);

  pq_entry_t   stage_q;     // entry staged for the next INSERT
  pq_entry_t   result_q;    // entry returned by the last EXTRACT
  logic        rvalid_q;
  logic        rejected_q;
  logic        underrun_q;
  logic [CW-1:0] count_q;

  logic wr, rd, cmd_ins, cmd_ext, do_ins, do_ext;
  logic [31:0] status;

  assign wr      = avs_chipselect && avs_write;
  assign rd      = avs_chipselect && avs_read;
  assign cmd_ext = wr && avs_address == REG_CMD && avs_writedata[1];
  assign cmd_ins = wr && avs_address == REG_CMD && avs_writedata[0] && !avs_writedata[1];
  assign empty_o = count_q == '0;
  assign full_o  = count_q == CW'(CAPACITY);
  assign do_ins  = cmd_ins && !full_o;
  assign do_ext  = cmd_ext && !empty_o;

  assign pq_tok_o   = do_ins ? pq_slot_t'{valid: 1'b1, entry: stage_q} : PQ_SLOT_EMPTY;
  assign pq_shift_o = do_ext;

  always_comb begin
    status                    = '0;
    status[ST_EMPTY]          = empty_o;
    status[ST_FULL]           = full_o;
    status[ST_RVALID]         = rvalid_q;
    status[ST_REJECTED]       = rejected_q;
    status[ST_UNDERRUN]       = underrun_q;
    status[31:ST_COUNT_LO]    = 16'(count_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q      <= '0;
      result_q     <= '0;
      rvalid_q     <= 1'b0;
      rejected_q   <= 1'b0;
      underrun_q   <= 1'b0;
      count_q      <= '0;
      avs_readdata <= '0;
    end else begin
      if (wr && avs_address == REG_PRIO) stage_q.prio <= avs_writedata;
      if (wr && avs_address == REG_ID)   stage_q.id   <= avs_writedata;
      if (wr && avs_address == REG_STATUS) begin
        if (avs_writedata[ST_REJECTED]) rejected_q <= 1'b0;
        if (avs_writedata[ST_UNDERRUN]) underrun_q <= 1'b0;
      end
      if (cmd_ins && full_o)  rejected_q <= 1'b1;
      if (cmd_ext && empty_o) underrun_q <= 1'b1;
      if (cmd_ext) begin
        rvalid_q <= do_ext && pq_head_i.valid;
        if (do_ext) result_q <= pq_head_i.entry;
      end
      if (do_ins)      count_q <= count_q + 1'b1;
      else if (do_ext) count_q <= count_q - 1'b1;
      if (rd) begin
        unique case (avs_address)
          REG_PRIO: avs_readdata <= result_q.prio;
          REG_ID:   avs_readdata <= result_q.id;
          default:  avs_readdata <= status;
        endcase
      end
    end
  end

  // Bus and queue rules.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n)
    avs_chipselect |-> !(avs_read && avs_write));
  a_head_when_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    do_ext |-> pq_head_i.valid);
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    count_q <= CW'(CAPACITY));

endmodule
