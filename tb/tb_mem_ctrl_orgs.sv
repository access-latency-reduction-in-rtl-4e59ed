// tb_mem_ctrl_orgs: runs the memory controller with the geometry and core
// timing of four DRAM organisations of 128 MB on the 128-bit, 100 MHz bus,
// side by side, each in its own org_harness:
//   DDR SDRAM  the default organisation, 2 channels of 4 chips: 4 banks x
//           4096 rows, 4 KB page, 20 / 30 / 20 ns -> tRCD 2, CL 3, tRP 2;
//   SLDRAM  2 channels of 8 chips: 8 banks x 1024 rows, 8 KB page,
//           33 / 37 / 30 ns row access / column access / precharge
//           -> tRCD 4, CL 4, tRP 3 cycles;
//   CRDRAM  2 channels of 8 chips: 4 banks x 1024 rows, 16 KB page,
//           30 / 20 / 27 ns -> tRCD 3, CL 2, tRP 3 cycles;
//   ESDRAM  2 channels of 8 chips: 4 banks x 4096 rows, 4 KB page,
//           20 / 10 / 15 ns -> tRCD 2, CL 1, tRP 2 cycles.
// Times are rounded up to whole 10 ns bus cycles.  Only the geometry and the
// row/column/precharge times are taken over: the packet protocols of SLDRAM
// and CRDRAM and the row cache of ESDRAM are not part of this controller.
// Each harness checks access classes, read data, read latency in cycles and
// the DRAM rules for both policies and all five schemes; see org_harness.
module tb_mem_ctrl_orgs;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        done [4];
  int unsigned chk  [4];
  int unsigned fail [4];

  org_harness #(.NAME("SLDRAM"), .ROW_BITS(10), .BANK_BITS(3), .PAGE_BITS(13),
                .T_RCD(4), .T_CL(4), .T_RP(3))
    u_sldram (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));

  org_harness #(.NAME("CRDRAM"), .ROW_BITS(10), .BANK_BITS(2), .PAGE_BITS(14),
                .T_RCD(3), .T_CL(2), .T_RP(3))
    u_crdram (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));

  org_harness #(.NAME("ESDRAM"), .ROW_BITS(12), .BANK_BITS(2), .PAGE_BITS(12),
                .T_RCD(2), .T_CL(1), .T_RP(2))
    u_esdram (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  org_harness #(.NAME("DDR SDRAM"), .ROW_BITS(12), .BANK_BITS(2), .PAGE_BITS(12),
                .T_RCD(2), .T_CL(3), .T_RP(2))
    u_ddr (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  function automatic int unsigned total(int unsigned v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end

endmodule
