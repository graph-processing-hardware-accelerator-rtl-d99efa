// Shared body of the end-to-end testbenches of pq_accelerator. The including
// module declares localparams D (entries per unit) and NU (cascaded units),
// instantiates the accelerator as `dut` on the signals declared here, and
// sets N_OPS, the length of the random workload.
//
// The processor side is a behavioural model of the hybrid hardware/software
// queue: an INSERT goes to the accelerator unless its full bit is set, in
// which case the entry is kept in a software list. An EXTRACT takes the
// accelerator's smallest entry; if the software list holds a smaller one,
// the hardware entry is inserted back into the slot just freed and the
// software entry is returned. Every extracted priority is compared with a
// reference model of all queued entries.

  localparam int unsigned CAP = D * NU;

  logic clk = 0, rst_n = 0;
  logic [1:0]  address;
  logic        cs, rd, wr;
  logic [31:0] wdata, rdata;
  logic        empty, full;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  pq_entry_t refq[$];   // every queued entry, hardware or software
  pq_entry_t swq[$];    // entries the hybrid policy keeps in software

  // Mechanism counters.
  int n_ins = 0, n_ext = 0, n_redirect = 0, n_swret = 0, n_reject = 0,
      n_underrun = 0, n_cascade = 0, n_full = 0, n_b2b = 0;

  always @(posedge clk) if (rst_n && dut.tok[1].valid && !dut.shift) n_cascade++;
  always @(posedge clk) if (rst_n && full) n_full++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    cs = 1; wr = 1; rd = 0; address = a; wdata = d;
    @(negedge clk);
    cs = 0; wr = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    cs = 1; rd = 1; wr = 0; address = a;
    @(negedge clk);
    cs = 0; rd = 0;
    d = rdata;
  endtask

  function automatic int ref_min();
    int m = 0;
    for (int i = 1; i < refq.size(); i++) if (refq[i].prio < refq[m].prio) m = i;
    return m;
  endfunction

  task automatic hw_insert(input pq_entry_t e);
    bus_write(REG_PRIO, e.prio);
    bus_write(REG_ID, e.id);
    bus_write(REG_CMD, 32'h1);
  endtask

  task automatic hw_extract(output logic ok, output pq_entry_t e);
    logic [31:0] s;
    bus_write(REG_CMD, 32'h2);
    bus_read(REG_STATUS, s);
    ok = s[ST_RVALID];
    bus_read(REG_PRIO, e.prio);
    bus_read(REG_ID, e.id);
  endtask

  task automatic hybrid_insert(input pq_entry_t e);
    logic [31:0] s;
    bus_read(REG_STATUS, s);
    refq.push_back(e);
    n_ins++;
    if (s[ST_FULL]) begin
      swq.push_back(e);
      n_redirect++;
    end else hw_insert(e);
  endtask

  task automatic hybrid_extract();
    logic ok;
    pq_entry_t h, got;
    int sm, m, hit;
    hw_extract(ok, h);
    sm = -1;
    for (int i = 0; i < swq.size(); i++)
      if (sm < 0 || swq[i].prio < swq[sm].prio) sm = i;
    if (!ok && sm < 0) begin
      checks++;
      if (refq.size() != 0) begin failures++; $display("hybrid queue lost entries"); end
      return;
    end
    if (sm >= 0 && (!ok || swq[sm].prio < h.prio)) begin
      got = swq[sm];
      swq.delete(sm);
      if (ok) hw_insert(h);
      n_swret++;
    end else got = h;
    n_ext++;
    m = ref_min();
    hit = -1;
    foreach (refq[i]) if (refq[i] == got) hit = i;
    checks++;
    if (hit < 0 || refq[hit].prio != refq[m].prio) begin
      failures++;
      $display("extract: got prio %0d id %0d, expected prio %0d", got.prio, got.id, refq[m].prio);
      refq.delete(m);
    end else refq.delete(hit);
  endtask

  initial begin
    repeat (200 * N_OPS + 200 * CAP + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    pq_entry_t e;
    int unsigned idc;
    longint unsigned c0;
    bit grow;
    int m;
    logic ok;
    cs = 0; rd = 0; wr = 0; address = 0; wdata = 0;
    idc = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // EXTRACT on an empty queue.
    bus_write(REG_CMD, 32'h2);
    bus_read(REG_STATUS, s);
    check("underrun flag", 32'(s[ST_UNDERRUN]), 1);
    check("no result on empty", 32'(s[ST_RVALID]), 0);
    if (s[ST_UNDERRUN]) n_underrun++;
    bus_write(REG_STATUS, 32'hFFFF);

    // Random hybrid workload, biased to grow past the hardware capacity.
    for (int k = 0; k < N_OPS; k++) begin
      grow = (k / (2 * CAP)) % 2 == 0;
      if (refq.size() == 0 || $urandom_range(0, 99) < (grow ? 70 : 30)) begin
        e.prio = $urandom_range(0, 4 * CAP);
        e.id = idc++;
        hybrid_insert(e);
      end else hybrid_extract();
    end
    while (refq.size() != 0) hybrid_extract();
    bus_read(REG_STATUS, s);
    check("empty after workload", 32'(s[ST_EMPTY]), 1);

    // Fill the hardware queue, try one INSERT too many, drain in order.
    for (int i = 0; i < CAP; i++) begin
      e.prio = 32'((i * 7) % CAP) * 3 + 100;
      e.id = 32'h1000 + 32'(i);
      hw_insert(e);
      refq.push_back(e);
    end
    bus_read(REG_STATUS, s);
    check("full at capacity", 32'(s[ST_FULL]), 1);
    check("count at capacity", 32'(s[31:ST_COUNT_LO]), CAP);
    hw_insert('{prio: 1, id: 32'hBAD});
    bus_read(REG_STATUS, s);
    check("insert refused when full", 32'(s[ST_REJECTED]), 1);
    check("count unchanged", 32'(s[31:ST_COUNT_LO]), CAP);
    if (s[ST_REJECTED]) n_reject++;
    bus_write(REG_STATUS, 32'hFFFF);

    // Constant-time operations: at full capacity, EXTRACT, INSERT and EXTRACT
    // in three consecutive bus cycles, then read the result in the next one.
    @(negedge clk);
    c0 = cyc;
    cs = 1; wr = 1; address = REG_CMD; wdata = 32'h2;        // EXTRACT smallest
    @(negedge clk);
    address = REG_PRIO; wdata = 32'd50;                      // stage priority 50
    @(negedge clk);
    address = REG_CMD; wdata = 32'h1;                        // INSERT it
    @(negedge clk);
    address = REG_CMD; wdata = 32'h2;                        // EXTRACT: must be 50
    @(negedge clk);
    wr = 0; rd = 1; address = REG_PRIO;
    @(negedge clk);
    cs = 0; rd = 0;
    check("back-to-back extract result", rdata, 32'd50);
    check("back-to-back cycles", 32'(cyc - c0), 32'd5);
    if (rdata == 32'd50) n_b2b++;
    refq.delete(ref_min());          // the first EXTRACT removed the smallest
    while (refq.size() != 0) begin
      m = ref_min();
      hw_extract(ok, e);
      check("drain valid", 32'(ok), 1);
      check("drain order", e.prio, refq[m].prio);
      refq.delete(m);
    end
    bus_read(REG_STATUS, s);
    check("empty after drain", 32'(s[ST_EMPTY]), 1);

    $display("inserts=%0d extracts=%0d redirected=%0d returned-from-software=%0d",
             n_ins, n_ext, n_redirect, n_swret);
    $display("full-cycles=%0d refused=%0d underrun=%0d cascaded=%0d back-to-back=%0d",
             n_full, n_reject, n_underrun, n_cascade, n_b2b);
    checks++;
    if (n_ins == 0 || n_ext == 0 || n_redirect == 0 || n_swret == 0 || n_full == 0 ||
        n_reject == 0 || n_underrun == 0 || n_b2b == 0 || (NU > 1 && n_cascade == 0)) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
