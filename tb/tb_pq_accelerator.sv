// tb_pq_accelerator: end-to-end test of the accelerator at a reduced size,
// two cascaded units of four entries, driven through its Avalon slave by a
// model of the hybrid hardware/software queue. See pq_accel_tb_body.svh.
module tb_pq_accelerator;
  import pq_pkg::*;
  localparam int unsigned D = 4;
  localparam int unsigned NU = 2;
  localparam int N_OPS = 3000;

  pq_accelerator #(.DEPTH(D), .NUM_UNITS(NU)) dut (
    .clk, .rst_n,
    .avs_address(address), .avs_chipselect(cs), .avs_read(rd), .avs_write(wr),
    .avs_writedata(wdata), .avs_readdata(rdata),
    .empty_o(empty), .full_o(full)
  );

  `include "pq_accel_tb_body.svh"
endmodule
