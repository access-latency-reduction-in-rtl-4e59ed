// addr_remap: address remapping unit of the DRAM controller.
//
// Splits a physical byte address into the group (channel / chip select),
// bank, row and column of the DRAM, under one of five remapping schemes.  All
// five start from page interleaving (row | group | bank | column, "rgbc") and
// move the group field, the bank field or both out of the L2 set-index bits
// into the lowest bits of the L2 tag, so that two addresses that conflict in
// the L2 cache (same set index, different tag) tend to land in different banks
// or groups instead of different rows of the same bank:
//
//   MAP_RGRBC   R | group | ow | bank  | column
//   MAP_RBRGC   R | bank  | ow | group | column
//   MAP_RGBRC   R | group | bank | ow  | column
//   MAP_RGRBCX  as RGRBC, bank  := bank  xor (lowest BANK_BITS  bits of R)
//   MAP_RBGBCX  as RBRGC, group := group xor (lowest GROUP_BITS bits of R)
//
// "R" is the part of the row that lies in the tag above the moved field(s),
// "ow" the rest of the row, which fills the index bits below the tag.  The row
// number is {R, ow}.  The field order of each scheme and the xor on the moved field
// follow the scheme descriptions; which bits of R feed the xor (its lowest
// ones) and the order of R and ow inside the row number are this design's
// choices.  The column field (the page offset) is left untouched by every
// scheme, so all addresses of one page stay in one page.
//
// Interface: purely combinational.  `addr` is a byte address; `col` is the
// index of the DATA_BITS-wide beat inside the page (the byte-in-beat bits are
// dropped).  `scheme` is a static configuration input.
module addr_remap
  import dram_pkg::*;
#(
  parameter int unsigned ADDR_BITS  = dram_pkg::D_ADDR_BITS,
  parameter int unsigned ROW_BITS   = dram_pkg::D_ROW_BITS,
  parameter int unsigned BANK_BITS  = dram_pkg::D_BANK_BITS,
  parameter int unsigned GROUP_BITS = dram_pkg::D_GROUP_BITS,
  parameter int unsigned PAGE_BITS  = dram_pkg::D_PAGE_BITS,
  parameter int unsigned BEAT_BITS  = dram_pkg::D_BEAT_BITS,
  parameter int unsigned TAG_LSB    = dram_pkg::D_TAG_LSB
) (
  input  logic [ADDR_BITS-1:0]           addr,
  input  map_scheme_e                    scheme,
  output logic [GROUP_BITS-1:0]          group,
  output logic [BANK_BITS-1:0]           bank,
  output logic [ROW_BITS-1:0]            row,
  output logic [PAGE_BITS-BEAT_BITS-1:0] col
);

  // widths of the low row part ("ow") and the high row part ("R") per scheme
  localparam int unsigned LO_GB = TAG_LSB - PAGE_BITS - BANK_BITS;   // rgrbc
  localparam int unsigned LO_BG = TAG_LSB - PAGE_BITS - GROUP_BITS;  // rbrgc
  localparam int unsigned LO_2  = TAG_LSB - PAGE_BITS;               // rgbrc
  localparam int unsigned HI_GB = ROW_BITS - LO_GB;
  localparam int unsigned HI_BG = ROW_BITS - LO_BG;
  localparam int unsigned HI_2  = ROW_BITS - LO_2;

  // The schemes need the group and bank fields inside the L2 index, and room
  // in the tag for both of them plus the bits that feed the xor.
  initial begin
    if (ADDR_BITS != ROW_BITS + BANK_BITS + GROUP_BITS + PAGE_BITS)
      $error("addr_remap: address width does not match the DRAM fields");
    if (TAG_LSB < PAGE_BITS + BANK_BITS + GROUP_BITS)
      $error("addr_remap: L2 index must cover the group and bank fields");
    if (HI_2 < 1 || HI_GB < BANK_BITS || HI_BG < GROUP_BITS)
      $error("addr_remap: tag too short for the remapping schemes");
  end

  // fields of the three plain schemes
  logic [BANK_BITS-1:0]  bank_gb, bank_bg, bank_2;
  logic [GROUP_BITS-1:0] grp_gb, grp_bg, grp_2;
  logic [HI_GB-1:0]      hi_gb;
  logic [HI_BG-1:0]      hi_bg;
  logic [ROW_BITS-1:0]   row_gb, row_bg, row_2;

  always_comb begin
    // rgrbc: R | group | ow | bank | column
    bank_gb = addr[PAGE_BITS +: BANK_BITS];
    grp_gb  = addr[TAG_LSB +: GROUP_BITS];
    hi_gb   = addr[ADDR_BITS-1 -: HI_GB];
    row_gb  = {hi_gb, addr[PAGE_BITS+BANK_BITS +: LO_GB]};
    // rbrgc: R | bank | ow | group | column
    grp_bg  = addr[PAGE_BITS +: GROUP_BITS];
    bank_bg = addr[TAG_LSB +: BANK_BITS];
    hi_bg   = addr[ADDR_BITS-1 -: HI_BG];
    row_bg  = {hi_bg, addr[PAGE_BITS+GROUP_BITS +: LO_BG]};
    // rgbrc: R | group | bank | ow | column
    bank_2  = addr[TAG_LSB +: BANK_BITS];
    grp_2   = addr[TAG_LSB+BANK_BITS +: GROUP_BITS];
    row_2   = {addr[ADDR_BITS-1 -: HI_2], addr[PAGE_BITS +: LO_2]};
  end

  always_comb begin
    col = addr[PAGE_BITS-1:BEAT_BITS];
    unique case (scheme)
      MAP_RGRBC:  begin group = grp_gb; bank = bank_gb;                        row = row_gb; end
      MAP_RBRGC:  begin group = grp_bg; bank = bank_bg;                        row = row_bg; end
      MAP_RGBRC:  begin group = grp_2;  bank = bank_2;                         row = row_2;  end
      MAP_RGRBCX: begin group = grp_gb; bank = bank_gb ^ hi_gb[BANK_BITS-1:0]; row = row_gb; end
      MAP_RBGBCX: begin group = grp_bg ^ hi_bg[GROUP_BITS-1:0]; bank = bank_bg; row = row_bg; end
      default:    begin group = grp_gb; bank = bank_gb;                        row = row_gb; end
    endcase
  end

endmodule
