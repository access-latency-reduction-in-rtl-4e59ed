// mem_ctrl_top: DRAM memory controller between an L2 cache and DDR SDRAM.
//
// The controller lowers the average DRAM access latency in two ways.  Its row
// management keeps rows open after reads and after writes that hit the open
// row, but closes the row (write with auto-precharge) after a write that
// misses, because a write-back that misses the open row rarely predicts the
// next access to that bank (Write-miss Only Close-Page); optionally it then
// re-opens the row the write displaced (Write-miss Only Close-Page-Open
// previous Page).  Its address remapping moves the group and/or bank field of
// the DRAM address into the low bits of the L2 tag, so that lines that
// conflict in the L2 cache spread over banks instead of fighting over the
// rows of one bank.
//
// Structure:
//   write_buffer  4 x 128 B L2 write-backs, FIFO
//   req_arbiter   L2 read misses first, unless the buffer is full or the
//                 read hits a buffered line
//   dram_ctrl     remapping, open-row registers, policy, timing, refresh
//
// L2 side: read requests (valid/ready, one line at a time) return eight
// 128-bit beats on rd_valid/rd_data with rd_last on the eighth, in request
// order; no back-pressure on the returned data.  Write-backs are pushed with
// valid/ready and a full 1024-bit line.  DRAM side: one registered command
// per cycle with group (chip select of one group of chips), bank, row and
// column, 128-bit write data with its enable, 128-bit read data.  cfg_policy
// and cfg_scheme are static settings: change them only while the controller
// is idle and the buffer is empty (a new scheme moves every line).  The ev_*
// outputs pulse once per access (class hit / miss / closed), per re-open and
// per refresh, for statistics.
//
// The write buffer size, the two policies, the remapping schemes and the
// timing numbers follow the published design; the handshakes, the ordering
// rule of the arbiter and the single request in flight are this design's.
module mem_ctrl_top
  import dram_pkg::*;
#(
  parameter int unsigned ADDR_BITS  = dram_pkg::D_ADDR_BITS,
  parameter int unsigned ROW_BITS   = dram_pkg::D_ROW_BITS,
  parameter int unsigned BANK_BITS  = dram_pkg::D_BANK_BITS,
  parameter int unsigned GROUP_BITS = dram_pkg::D_GROUP_BITS,
  parameter int unsigned PAGE_BITS  = dram_pkg::D_PAGE_BITS,
  parameter int unsigned BEAT_BITS  = dram_pkg::D_BEAT_BITS,
  parameter int unsigned TAG_LSB    = dram_pkg::D_TAG_LSB,
  parameter int unsigned DATA_BITS  = dram_pkg::D_DATA_BITS,
  parameter int unsigned LINE_BYTES = dram_pkg::D_LINE_BYTES,
  parameter int unsigned WB_DEPTH   = 4,
  parameter int unsigned T_RCD      = dram_pkg::D_T_RCD,
  parameter int unsigned T_CL       = dram_pkg::D_T_CL,
  parameter int unsigned T_RP       = dram_pkg::D_T_RP,
  parameter int unsigned T_WR       = dram_pkg::D_T_WR,
  parameter int unsigned T_RFC      = dram_pkg::D_T_RFC,
  parameter int unsigned T_REFI     = dram_pkg::D_T_REFI,
  localparam int unsigned BEATS     = LINE_BYTES * 8 / DATA_BITS,
  localparam int unsigned COL_BITS  = PAGE_BITS - BEAT_BITS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  policy_e                        cfg_policy,
  input  map_scheme_e                    cfg_scheme,
  // L2 read misses
  input  logic                           l2_rd_valid,
  output logic                           l2_rd_ready,
  input  logic [ADDR_BITS-1:0]           l2_rd_addr,
  output logic                           rd_valid,
  output logic [DATA_BITS-1:0]           rd_data,
  output logic                           rd_last,
  // L2 write-backs
  input  logic                           l2_wb_valid,
  output logic                           l2_wb_ready,
  input  logic [ADDR_BITS-1:0]           l2_wb_addr,
  input  logic [BEATS-1:0][DATA_BITS-1:0] l2_wb_line,
  output logic [$clog2(WB_DEPTH+1)-1:0]  wb_count,
  // DRAM bus
  output dram_cmd_e                      dram_cmd,
  output logic [GROUP_BITS-1:0]          dram_group,
  output logic [BANK_BITS-1:0]           dram_bank,
  output logic [ROW_BITS-1:0]            dram_row,
  output logic [COL_BITS-1:0]            dram_col,
  output logic                           dram_wen,
  output logic [DATA_BITS-1:0]           dram_wdata,
  input  logic [DATA_BITS-1:0]           dram_rdata,
  // statistics events
  output logic                           ev_access,
  output logic                           ev_write,
  output acc_kind_e                      ev_kind,
  output logic                           ev_reopen,
  output logic                           ev_refresh
);

  localparam int unsigned BIDX_BITS = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic                  wb_head_valid, wb_full, wb_conflict, wb_pop;
  logic [ADDR_BITS-1:0]  wb_head_addr;
  logic [BIDX_BITS-1:0]  wb_beat_idx;
  logic [DATA_BITS-1:0]  wb_head_beat;
  logic                  req_valid, req_ready, req_write;
  logic [ADDR_BITS-1:0]  req_addr;

  write_buffer #(
    .DEPTH(WB_DEPTH), .ADDR_BITS(ADDR_BITS), .LINE_BYTES(LINE_BYTES), .DATA_BITS(DATA_BITS)
  ) u_wbuf (
    .clk, .rst_n,
    .in_valid(l2_wb_valid), .in_ready(l2_wb_ready), .in_addr(l2_wb_addr), .in_line(l2_wb_line),
    .head_valid(wb_head_valid), .head_addr(wb_head_addr),
    .beat_idx(wb_beat_idx), .head_beat(wb_head_beat), .pop(wb_pop),
    .q_addr(l2_rd_addr), .q_hit(wb_conflict),
    .full(wb_full), .count(wb_count)
  );

  req_arbiter #(.ADDR_BITS(ADDR_BITS)) u_arb (
    .rd_valid(l2_rd_valid), .rd_ready(l2_rd_ready), .rd_addr(l2_rd_addr),
    .wb_valid(wb_head_valid), .wb_addr(wb_head_addr), .wb_full(wb_full),
    .wb_conflict(wb_conflict),
    .req_valid, .req_write, .req_addr, .req_ready
  );

  dram_ctrl #(
    .ADDR_BITS(ADDR_BITS), .ROW_BITS(ROW_BITS), .BANK_BITS(BANK_BITS),
    .GROUP_BITS(GROUP_BITS), .PAGE_BITS(PAGE_BITS), .BEAT_BITS(BEAT_BITS),
    .TAG_LSB(TAG_LSB), .DATA_BITS(DATA_BITS), .BURST_LEN(BEATS),
    .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP), .T_WR(T_WR), .T_RFC(T_RFC), .T_REFI(T_REFI)
  ) u_ctrl (
    .clk, .rst_n, .cfg_policy, .cfg_scheme,
    .req_valid, .req_ready, .req_write, .req_addr,
    .wr_beat_idx(wb_beat_idx), .wr_beat_data(wb_head_beat), .wr_done(wb_pop),
    .rd_valid, .rd_data, .rd_last,
    .dram_cmd, .dram_group, .dram_bank, .dram_row, .dram_col,
    .dram_wen, .dram_wdata, .dram_rdata,
    .ev_access, .ev_write, .ev_kind, .ev_reopen, .ev_refresh
  );

endmodule
