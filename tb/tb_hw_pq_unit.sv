// tb_hw_pq_unit: self-checking test of the systolic queue unit, two units
// cascaded into one queue of 2 x D entries.
//
// Phase 1 issues a random INSERT or EXTRACT every clock cycle (one operation
// per cycle is the unit's rate) and compares each extracted entry with a
// software reference queue. Phase 2 inserts one entry more than the chain
// holds and checks that the entry pushed out of the last unit is the largest,
// then drains the queue and checks the order. An EXTRACT is checked in the
// very cycle it is issued, so the constant one-cycle cost is checked too.
module tb_hw_pq_unit;
  import pq_pkg::*;

  localparam int unsigned D = 4;
  localparam int unsigned CAP = 2 * D;

  logic clk = 0, rst_n = 0;
  logic shift;
  pq_slot_t tok_in, tok_mid, tok_out, head0, head1;

  hw_pq_unit #(.DEPTH(D)) u0 (.clk, .rst_n, .shift_i(shift), .tok_i(tok_in),
                              .tok_o(tok_mid), .head_o(head0), .head_i(head1));
  hw_pq_unit #(.DEPTH(D)) u1 (.clk, .rst_n, .shift_i(shift), .tok_i(tok_mid),
                              .tok_o(tok_out), .head_o(head1), .head_i(PQ_SLOT_EMPTY));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pq_entry_t model[$];
  int n_cascade = 0;

  always @(posedge clk) if (tok_mid.valid && !shift) n_cascade++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int min_idx();
    int m = 0;
    for (int i = 1; i < model.size(); i++)
      if (model[i].prio < model[m].prio) m = i;
    return m;
  endfunction

  // Check head0 against the reference minimum and remove that entry.
  task automatic check_extract();
    int m, hit;
    m = min_idx();
    hit = -1;
    for (int i = 0; i < model.size(); i++)
      if (model[i].prio == head0.entry.prio && model[i].id == head0.entry.id) hit = i;
    checks++;
    if (!head0.valid || hit < 0 || model[hit].prio != model[m].prio) begin
      failures++;
      $display("extract mismatch: got v=%0d prio=%0d id=%0d, expected prio=%0d",
               head0.valid, head0.entry.prio, head0.entry.id, model[m].prio);
      model.delete(m);
    end else model.delete(hit);
  endtask

  int unsigned idc = 0;
  int n_ins = 0, n_ext = 0, n_b2b = 0;
  logic last_was_ins;
  pq_entry_t ovf;
  bit seen = 0;

  initial begin
    shift = 0; tok_in = PQ_SLOT_EMPTY;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Phase 1: random traffic, one operation per cycle.
    last_was_ins = 0;
    for (int c = 0; c < 4000; c++) begin
      shift = 0; tok_in = PQ_SLOT_EMPTY;
      if (model.size() != 0 && (model.size() == CAP || $urandom_range(0, 1) == 1)) begin
        check_extract();
        shift = 1; n_ext++;
        if (last_was_ins) n_b2b++;
        last_was_ins = 0;
      end else if ($urandom_range(0, 3) != 0) begin
        tok_in.valid = 1;
        tok_in.entry.prio = $urandom_range(0, 20);   // small range: many ties
        tok_in.entry.id = idc++;
        model.push_back(tok_in.entry);
        n_ins++;
        last_was_ins = 1;
      end else last_was_ins = 0;
      @(negedge clk);
      checks++;
      if (tok_out.valid) begin
        failures++;
        $display("unexpected overflow out of the chain");
      end
    end
    shift = 0; tok_in = PQ_SLOT_EMPTY;
    while (model.size() != 0) begin
      check_extract();
      shift = 1;
      @(negedge clk);
    end
    shift = 0;
    @(negedge clk);
    checks++;
    if (head0.valid) begin failures++; $display("queue not empty after drain"); end

    // Phase 2: overfill by one; the largest entry must leave the chain.
    begin
      for (int i = 0; i <= CAP; i++) begin
        tok_in.valid = 1;
        tok_in.entry.prio = 1000 - 37 * ((i * 5) % (CAP + 1));
        tok_in.entry.id = 500 + i;
        model.push_back(tok_in.entry);
        @(negedge clk);
        if (tok_out.valid) begin seen = 1; ovf = tok_out.entry; end
      end
      tok_in = PQ_SLOT_EMPTY;
      repeat (3 * CAP) begin
        @(negedge clk);
        if (tok_out.valid) begin seen = 1; ovf = tok_out.entry; end
      end
      checks++;
      if (!seen || ovf.prio != 1000) begin
        failures++;
        $display("overflow entry wrong: seen=%0d prio=%0d", seen, ovf.prio);
      end
      for (int i = 0; i < model.size(); i++)
        if (model[i].prio == 1000) begin model.delete(i); break; end
      while (model.size() != 0) begin
        check_extract();
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
    end

    checks++;
    if (n_ins < 1000 || n_ext < 1000 || n_b2b < 100 || n_cascade < 10) begin
      failures++;
      $display("coverage short: ins=%0d ext=%0d ins->ext=%0d cascade=%0d",
               n_ins, n_ext, n_b2b, n_cascade);
    end
    $display("inserts=%0d extracts=%0d insert-then-extract=%0d cascaded=%0d",
             n_ins, n_ext, n_b2b, n_cascade);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
