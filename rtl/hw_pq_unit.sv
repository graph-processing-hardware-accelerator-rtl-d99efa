// hw_pq_unit: cascadable systolic hardware priority queue unit.
//
// The unit keeps up to DEPTH entries, smallest priority at the head, and
// performs one INSERT or one EXTRACT every clock cycle however full it is.
// It is built as a linear array of DEPTH cells. Cell i holds a resident entry
// P[i] and has a token register T[i] in front of it for an entry that is still
// on its way down the array. Each cycle every cell with a token compares it
// with its resident: the smaller one stays, the larger one moves on as the
// token of cell i+1. Data only ever travels between neighbouring cells, so
// the insert data bus does not fan out to every cell.
//
// EXTRACT (shift_i) removes the head: every cell takes the post-compare
// resident of the cell behind it and keeps its own outgoing token, so the
// whole array moves one place towards the head in the same cycle. The array
// keeps two invariants: residents are sorted and form a prefix of the cells,
// and a token in front of cell j is never smaller than the resident of cell
// j-1. Together they make min(P[0], T[0]) the smallest entry anywhere, which
// is the value given out on head_o.
//
// Cascading: tok_o/tok_i and head_o/head_i join units into one longer array.
// A unit's tok_o feeds the next unit's tok_i, and the next unit's head_o feeds
// this unit's head_i. All units of a chain share shift_i. The first unit takes
// new entries on tok_i; the last unit's tok_o is an entry pushed out of a full
// chain, and its head_i is tied to PQ_SLOT_EMPTY.
//
// Timing: tok_i is registered into T[0] at the clock edge (when shift_i is
// low); an EXTRACT in the very next cycle already sees it. head_o is
// combinational from the unit's own registers. tok_i is ignored while
// shift_i is high, so the first unit must not be given both in one cycle.
// The queue function, the 64-bit entry, the constant-time operations and the
// ability to cascade follow the accelerator's description; the systolic cell
// array, the minimum-first order and the cascade ports are this design's own.
module hw_pq_unit
  import pq_pkg::pq_slot_t, pq_pkg::PQ_SLOT_EMPTY;
#(
  parameter int unsigned DEPTH = 16   // cells, at least 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     shift_i,  // EXTRACT: move the array one place towards the head
  input  pq_slot_t tok_i,    // entry to insert (from the bus side or the unit before)
  output pq_slot_t tok_o,    // entry passed on to the next unit
  output pq_slot_t head_o,   // smallest entry of this unit, leaves on shift_i
  input  pq_slot_t head_i    // head_o of the next unit, enters the last cell on shift_i
);

  pq_slot_t res_q [DEPTH];   // resident entry P[i]
  pq_slot_t tok_q [DEPTH];   // token waiting in front of cell i, T[i]
  pq_slot_t keep  [DEPTH];   // resident after this cycle's compare
  pq_slot_t pass  [DEPTH];   // token leaving cell i after this cycle's compare

  // Compare-and-exchange in every cell. On equal priorities the resident
  // stays, so an entry never overtakes an older one of the same priority.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      keep[i] = res_q[i];
      pass[i] = PQ_SLOT_EMPTY;
      if (tok_q[i].valid) begin
        if (!res_q[i].valid) begin
          keep[i] = tok_q[i];
        end else if (tok_q[i].entry.prio < res_q[i].entry.prio) begin
          keep[i] = tok_q[i];
          pass[i] = res_q[i];
        end else begin
          pass[i] = tok_q[i];
        end
      end
    end
  end

  assign head_o = keep[0];
  assign tok_o  = shift_i ? PQ_SLOT_EMPTY : pass[DEPTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        res_q[i] <= PQ_SLOT_EMPTY;
        tok_q[i] <= PQ_SLOT_EMPTY;
      end
    end else if (shift_i) begin
      for (int i = 0; i < DEPTH - 1; i++) res_q[i] <= keep[i+1];
      res_q[DEPTH-1] <= head_i;
      for (int i = 0; i < DEPTH; i++) tok_q[i] <= pass[i];
    end else begin
      for (int i = 0; i < DEPTH; i++) res_q[i] <= keep[i];
      tok_q[0] <= tok_i;
      for (int i = 1; i < DEPTH; i++) tok_q[i] <= pass[i-1];
    end
  end

endmodule
