// pq_accelerator: priority queue accelerator peripheral of the graph
// processing unit.
//
// A processor running a shortest-path search keeps its frontier of tentative
// costs in this queue: it INSERTs (priority, identifier) pairs and EXTRACTs
// the pair with the smallest priority, each in one bus write, independent of
// how many entries are queued. The peripheral is an Avalon interface unit
// (avalon_if_unit, register map described there) driving a chain of
// NUM_UNITS cascaded hardware priority queue units (hw_pq_unit) of DEPTH
// entries each, so the capacity is DEPTH * NUM_UNITS. Cascading lengthens
// the queue without changing its timing.
//
// Interface: an Avalon-MM slave with a 2-bit word address, 32-bit data and a
// fixed read latency of one clock, plus empty and full flags for the system.
// Reset is asynchronous and active low. The split into interface unit and
// queue unit, the 64-bit entry and the cascadable queue follow the
// accelerator's description; the queue length (not given) and the register
// map are this design's choice.
module pq_accelerator
  import pq_pkg::pq_slot_t, pq_pkg::PQ_SLOT_EMPTY;
#(
  parameter int unsigned DEPTH     = 16,  // entries per queue unit, at least 2
  parameter int unsigned NUM_UNITS = 1    // cascaded queue units
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        empty_o,
  output logic        full_o
);

  pq_slot_t ins_tok;
  logic     shift;
  pq_slot_t tok  [NUM_UNITS+1];  // tok[k] enters unit k
  pq_slot_t head [NUM_UNITS+1];  // head[k] leaves unit k

  avalon_if_unit #(.CAPACITY(DEPTH * NUM_UNITS)) u_if (
    .clk, .rst_n,
    .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .pq_tok_o   (ins_tok),
    .pq_shift_o (shift),
    .pq_head_i  (head[0]),
    .empty_o, .full_o
  );

  assign tok[0]          = ins_tok;
  assign head[NUM_UNITS] = PQ_SLOT_EMPTY;

  for (genvar k = 0; k < NUM_UNITS; k++) begin : g_unit
    hw_pq_unit #(.DEPTH(DEPTH)) u_pq (
      .clk, .rst_n,
      .shift_i (shift),
      .tok_i   (tok[k]),
      .tok_o   (tok[k+1]),
      .head_o  (head[k]),
      .head_i  (head[k+1])
    );
  end

  // The interface unit refuses INSERTs beyond capacity, so nothing may ever
  // leave the end of the chain.
  a_no_chain_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !tok[NUM_UNITS].valid);

endmodule
