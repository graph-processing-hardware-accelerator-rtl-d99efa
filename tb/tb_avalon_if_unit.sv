// tb_avalon_if_unit: self-checking test of the Avalon slave of the queue.
//
// The queue behind the slave is replaced by a small reference queue in the
// testbench that presents its smallest entry on pq_head_i. The test checks
// that an INSERT write issues the staged entry on pq_tok_o in the same cycle,
// that an EXTRACT write pulses pq_shift_o and makes the head readable in the
// next bus read (read latency of one clock), the count, empty and full bits,
// the refusal of an INSERT when full, the EXTRACT-on-empty flag and the
// clearing of the sticky bits.
module tb_avalon_if_unit;
  import pq_pkg::*;

  localparam int unsigned CAP = 3;

  logic clk = 0, rst_n = 0;
  logic [1:0]  address;
  logic        cs, rd, wr;
  logic [31:0] wdata, rdata;
  pq_slot_t    tok, head;
  logic        shift, empty, full;

  avalon_if_unit #(.CAPACITY(CAP)) dut (
    .clk, .rst_n,
    .avs_address(address), .avs_chipselect(cs), .avs_read(rd), .avs_write(wr),
    .avs_writedata(wdata), .avs_readdata(rdata),
    .pq_tok_o(tok), .pq_shift_o(shift), .pq_head_i(head),
    .empty_o(empty), .full_o(full)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pq_entry_t model[$];
  int n_tok = 0, n_shift = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference queue behind the slave.
  always_comb begin
    head = PQ_SLOT_EMPTY;
    foreach (model[i])
      if (!head.valid || model[i].prio < head.entry.prio) begin
        head.valid = 1'b1;
        head.entry = model[i];
      end
  end
  always @(posedge clk) begin
    if (tok.valid) begin model.push_back(tok.entry); n_tok++; end
    if (shift) begin
      n_shift++;
      foreach (model[i])
        if (model[i] == head.entry) begin model.delete(i); break; end
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    cs = 1; wr = 1; address = a; wdata = d;
    @(negedge clk);
    cs = 0; wr = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    cs = 1; rd = 1; address = a;
    @(negedge clk);
    cs = 0; rd = 0;
    d = rdata;
  endtask

  // INSERT one entry and check the token it issues in the write cycle.
  task automatic do_insert(input logic [31:0] p, input logic [31:0] id, input bit expect_ok);
    bus_write(REG_PRIO, p);
    bus_write(REG_ID, id);
    @(negedge clk);
    cs = 1; wr = 1; address = REG_CMD; wdata = 32'h1;
    #1;
    check("insert token valid", 32'(tok.valid), 32'(expect_ok));
    if (expect_ok) begin
      check("insert token prio", tok.entry.prio, p);
      check("insert token id", tok.entry.id, id);
    end
    @(negedge clk);
    cs = 0; wr = 0;
  endtask

  task automatic do_extract(input bit expect_ok, input logic [31:0] p, input logic [31:0] id);
    logic [31:0] d;
    @(negedge clk);
    cs = 1; wr = 1; address = REG_CMD; wdata = 32'h2;
    #1;
    check("extract shift", 32'(shift), 32'(expect_ok));
    @(negedge clk);
    cs = 0; wr = 0;
    bus_read(REG_STATUS, d);
    check("rvalid bit", 32'(d[ST_RVALID]), 32'(expect_ok));
    if (expect_ok) begin
      bus_read(REG_PRIO, d); check("extracted prio", d, p);
      bus_read(REG_ID, d);   check("extracted id", d, id);
    end
  endtask

  task automatic check_status(input int count, input bit rej, input bit und);
    logic [31:0] d;
    bus_read(REG_STATUS, d);
    check("count", 32'(d[31:ST_COUNT_LO]), 32'(count));
    check("empty bit", 32'(d[ST_EMPTY]), 32'(count == 0));
    check("full bit", 32'(d[ST_FULL]), 32'(count == CAP));
    check("rejected bit", 32'(d[ST_REJECTED]), 32'(rej));
    check("underrun bit", 32'(d[ST_UNDERRUN]), 32'(und));
    check("empty_o", 32'(empty), 32'(count == 0));
    check("full_o", 32'(full), 32'(count == CAP));
  endtask

  initial begin
    logic [31:0] d;
    cs = 0; rd = 0; wr = 0; address = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_status(0, 0, 0);
    do_extract(0, 0, 0);                     // EXTRACT on empty
    check_status(0, 0, 1);
    bus_write(REG_STATUS, 32'h1 << ST_UNDERRUN);
    check_status(0, 0, 0);
    do_insert(32'd700, 32'hA, 1);
    do_insert(32'd20, 32'hB, 1);
    check_status(2, 0, 0);
    do_insert(32'd300, 32'hC, 1);
    check_status(3, 0, 0);
    do_insert(32'd5, 32'hD, 0);              // refused: full
    check_status(3, 1, 0);
    // Read latency: readdata must hold the addressed register one clock
    // after the read cycle.
    @(negedge clk);
    cs = 1; rd = 1; address = REG_CMD;
    @(negedge clk);
    cs = 0; rd = 0;
    check("CMD reads status", 32'(rdata[31:ST_COUNT_LO]), 32'd3);
    bus_write(REG_STATUS, 32'h1 << ST_REJECTED);
    check_status(3, 0, 0);
    do_extract(1, 32'd20, 32'hB);
    check_status(2, 0, 0);
    do_insert(32'd10, 32'hE, 1);
    do_extract(1, 32'd10, 32'hE);
    do_extract(1, 32'd300, 32'hC);
    do_extract(1, 32'd700, 32'hA);
    check_status(0, 0, 0);
    do_extract(0, 0, 0);
    check_status(0, 0, 1);
    check("tokens issued", 32'(n_tok), 32'd4);
    check("shifts issued", 32'(n_shift), 32'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
