// tb_maze_route: maze-routing workload on the accelerator at its default
// size.
//
// A W x H routing grid gets a random cost per cell (the price of routing
// through it) and a rectangular blockage, like a pre-placed macro. A
// Dijkstra search from one corner finds the cheapest cost to reach every
// cell. Its frontier is kept in the accelerator, through the hybrid
// hardware/software queue policy: entries go to a software list while the
// hardware queue is full, and EXTRACT merges the two. Stale frontier
// entries are skipped when extracted (lazy deletion). The resulting
// costs are compared with an independent Bellman-Ford relaxation of the
// same grid, and the number of redirected entries and bus cycles is
// reported.
module tb_maze_route;
  import pq_pkg::*;

  localparam int W = 24;
  localparam int H = 24;
  localparam int NV = W * H;
  localparam int INF = 32'h7fff_ffff;

  logic clk = 0, rst_n = 0;
  logic [1:0]  address;
  logic        cs, rd, wr;
  logic [31:0] wdata, rdata;
  logic        empty, full;

  pq_accelerator dut (
    .clk, .rst_n,
    .avs_address(address), .avs_chipselect(cs), .avs_read(rd), .avs_write(wr),
    .avs_writedata(wdata), .avs_readdata(rdata),
    .empty_o(empty), .full_o(full)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  int cost [NV];          // 0 = blocked
  int best [NV];          // Dijkstra result
  int bf   [NV];          // reference result
  pq_entry_t swq[$];
  int n_ins = 0, n_ext = 0, n_redirect = 0, n_swret = 0, n_stale = 0, max_occ = 0, occ = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic hw_insert(input pq_entry_t e);
    bus_write(REG_PRIO, e.prio);
    bus_write(REG_ID, e.id);
    bus_write(REG_CMD, 32'h1);
  endtask

  task automatic pq_insert(input int prio, input int v);
    logic [31:0] s;
    pq_entry_t e;
    e.prio = 32'(prio);
    e.id = 32'(v);
    n_ins++;
    occ++;
    if (occ > max_occ) max_occ = occ;
    bus_read(REG_STATUS, s);
    if (s[ST_FULL]) begin swq.push_back(e); n_redirect++; end
    else hw_insert(e);
  endtask

  task automatic pq_extract(output logic ok, output pq_entry_t e);
    logic [31:0] s;
    pq_entry_t h;
    int sm;
    bus_write(REG_CMD, 32'h2);
    bus_read(REG_STATUS, s);
    ok = s[ST_RVALID];
    if (ok) begin
      bus_read(REG_PRIO, h.prio);
      bus_read(REG_ID, h.id);
    end
    sm = -1;
    foreach (swq[i]) if (sm < 0 || swq[i].prio < swq[sm].prio) sm = i;
    if (sm >= 0 && (!ok || swq[sm].prio < h.prio)) begin
      e = swq[sm];
      swq.delete(sm);
      if (ok) hw_insert(h);
      n_swret++;
      ok = 1;
    end else e = h;
    if (ok) begin occ--; n_ext++; end
  endtask

  function automatic bit blocked(int x, int y);
    return x >= 6 && x < 16 && y >= 5 && y < 17 && !(x == 10 && y == 16);
  endfunction

  initial begin
    logic ok;
    pq_entry_t e;
    int v, x, y, nd, u, nx, ny;
    bit changed;
    longint unsigned c0;
    cs = 0; rd = 0; wr = 0; address = 0; wdata = 0;
    for (int i = 0; i < NV; i++) begin
      x = i % W; y = i / W;
      cost[i] = blocked(x, y) ? 0 : int'($urandom_range(1, 9));
      best[i] = INF;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    c0 = cyc;

    // Dijkstra from cell (0,0), frontier in the hybrid queue.
    best[0] = 0;
    pq_insert(0, 0);
    forever begin
      pq_extract(ok, e);
      if (!ok) break;
      v = int'(e.id);
      if (int'(e.prio) > best[v]) begin n_stale++; continue; end
      x = v % W; y = v / W;
      for (int d = 0; d < 4; d++) begin

        nx = x + (d == 0 ? 1 : d == 1 ? -1 : 0);
        ny = y + (d == 2 ? 1 : d == 3 ? -1 : 0);
        if (nx < 0 || nx >= W || ny < 0 || ny >= H) continue;
        u = ny * W + nx;
        if (cost[u] == 0) continue;
        nd = best[v] + cost[u];
        if (nd < best[u]) begin
          best[u] = nd;
          pq_insert(nd, u);
        end
      end
    end

    // Reference: Bellman-Ford relaxation to a fixed point.
    foreach (bf[i]) bf[i] = INF;
    bf[0] = 0;
    do begin
      changed = 0;
      for (int i = 0; i < NV; i++) begin
        if (bf[i] == INF) continue;
        x = i % W; y = i / W;
        for (int d = 0; d < 4; d++) begin

          nx = x + (d == 0 ? 1 : d == 1 ? -1 : 0);
          ny = y + (d == 2 ? 1 : d == 3 ? -1 : 0);
          if (nx < 0 || nx >= W || ny < 0 || ny >= H) continue;
          u = ny * W + nx;
          if (cost[u] == 0) continue;
          if (bf[i] + cost[u] < bf[u]) begin bf[u] = bf[i] + cost[u]; changed = 1; end
        end
      end
    end while (changed);

    for (int i = 0; i < NV; i++) begin
      checks++;
      if (best[i] != bf[i]) begin
        failures++;
        $display("cell (%0d,%0d): search %0d, reference %0d", i % W, i / W, best[i], bf[i]);
      end
    end
    checks++;
    if (!empty || swq.size() != 0) begin failures++; $display("queue not empty at the end"); end
    checks++;
    if (n_redirect == 0) begin failures++; $display("hybrid redirect never used"); end
    $display("grid %0dx%0d: cost to far corner %0d; inserts=%0d extracts=%0d stale=%0d",
             W, H, best[NV-1], n_ins, n_ext, n_stale);
    $display("peak frontier=%0d redirected to software=%0d returned from software=%0d bus cycles=%0d",
             max_occ, n_redirect, n_swret, cyc - c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
