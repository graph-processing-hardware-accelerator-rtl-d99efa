// tb_pq_accelerator_full: end-to-end test of the accelerator with every
// parameter at its default, driven through its Avalon slave by a model of
// the hybrid hardware/software queue. See pq_accel_tb_body.svh.
module tb_pq_accelerator_full;
  import pq_pkg::*;
  localparam int unsigned D = 16;   // pq_accelerator default DEPTH
  localparam int unsigned NU = 1;   // pq_accelerator default NUM_UNITS
  localparam int N_OPS = 4000;

  pq_accelerator dut (
    .clk, .rst_n,
    .avs_address(address), .avs_chipselect(cs), .avs_read(rd), .avs_write(wr),
    .avs_writedata(wdata), .avs_readdata(rdata),
    .empty_o(empty), .full_o(full)
  );

  `include "pq_accel_tb_body.svh"
endmodule
