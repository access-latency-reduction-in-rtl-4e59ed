// dram_pkg: types and default sizes shared by the DRAM controller modules.
//
// The default organisation is the DDR SDRAM memory of the evaluated system:
// two groups (channels) of four 16 MB x16 DDR SDRAM chips, 128 MB in total,
// 4 banks per chip, 4096 rows per bank, 1 KB rows per chip (4 KB per group),
// on a 128-bit, 100 MHz memory bus.  The L2 cache in front of it is 1 MB,
// 4-way set associative with 128 B lines.  The timing values are the DDR SDRAM
// row access (20 ns), column access (30 ns) and precharge (20 ns) times
// expressed in 100 MHz bus cycles.  Write recovery, refresh interval and
// refresh cycle time are not part of that data and are this design's own
// choices (typical SDRAM values).
package dram_pkg;

  // ---- memory organisation (DDR SDRAM configuration) ----
  localparam int unsigned D_ADDR_BITS   = 27;   // 128 MB byte address
  localparam int unsigned D_ROW_BITS    = 12;   // 4096 rows per bank
  localparam int unsigned D_BANK_BITS   = 2;    // 4 banks per chip
  localparam int unsigned D_GROUP_BITS  = 1;    // 2 groups (channels)
  localparam int unsigned D_PAGE_BITS   = 12;   // 4 KB page per group (4 chips x 1 KB)
  localparam int unsigned D_DATA_BITS   = 128;  // memory bus data lines
  localparam int unsigned D_BEAT_BITS   = 4;    // log2(16 B per bus beat)
  localparam int unsigned D_COL_BITS    = D_PAGE_BITS - D_BEAT_BITS; // column = beat index in page

  // ---- L2 cache geometry (defines the Tag / Index / Word split) ----
  localparam int unsigned D_L2_BYTES    = 1 << 20; // 1 MB
  localparam int unsigned D_L2_WAYS     = 4;
  localparam int unsigned D_LINE_BYTES  = 128;
  localparam int unsigned D_WORD_BITS_W = $clog2(D_LINE_BYTES);                           // w = 7
  localparam int unsigned D_INDEX_BITS  = $clog2(D_L2_BYTES / (D_L2_WAYS * D_LINE_BYTES));    // i = 11
  localparam int unsigned D_TAG_LSB     = D_WORD_BITS_W + D_INDEX_BITS;                     // 18
  localparam int unsigned D_BURST_LEN   = D_LINE_BYTES * 8 / D_DATA_BITS;                   // 8 beats

  // ---- timing in memory bus cycles (100 MHz) ----
  localparam int unsigned D_T_RCD  = 2;    // row access 20 ns
  localparam int unsigned D_T_CL   = 3;    // column access 30 ns
  localparam int unsigned D_T_RP   = 2;    // precharge 20 ns
  localparam int unsigned D_T_WR   = 2;    // write recovery (own choice)
  localparam int unsigned D_T_RFC  = 7;    // refresh cycle (own choice)
  localparam int unsigned D_T_REFI = 1560; // refresh interval, 64 ms / 4096 rows (own choice)

  // ---- DRAM commands ----
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,  // activate (open) a row
    CMD_RD   = 3'd2,  // read burst, row stays open
    CMD_WR   = 3'd3,  // write burst, row stays open
    CMD_WRA  = 3'd4,  // write burst with auto-precharge
    CMD_PRE  = 3'd5,  // precharge one bank
    CMD_PREA = 3'd6,  // precharge all banks
    CMD_REF  = 3'd7   // auto refresh
  } dram_cmd_e;

  // ---- row-buffer management policy ----
  typedef enum logic {
    POL_WM1 = 1'b0,   // Write-miss Only Close-Page
    POL_WM2 = 1'b1    // Write-miss Only Close-Page-Open previous Page
  } policy_e;

  // ---- address remapping scheme ----
  typedef enum logic [2:0] {
    MAP_RGRBC  = 3'd0,  // row-high | group | row-low | bank  | column
    MAP_RBRGC  = 3'd1,  // row-high | bank  | row-low | group | column
    MAP_RGBRC  = 3'd2,  // row-high | group | bank | row-low  | column
    MAP_RGRBCX = 3'd3,  // rgrbc, bank  xor low bits of row-high
    MAP_RBGBCX = 3'd4   // rbrgc, group xor low bits of row-high
  } map_scheme_e;

  // ---- classification of one access against the open-row registers ----
  typedef enum logic [1:0] {
    ACC_HIT    = 2'd0,  // row buffer hit
    ACC_MISS   = 2'd1,  // another row is open in the bank
    ACC_CLOSED = 2'd2   // no row open in the bank
  } acc_kind_e;

endpackage
