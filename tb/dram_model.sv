// dram_model: behavioural model of the DDR SDRAM memory (testbench only).
//
// Stands for all groups of DRAM chips behind the controller, seen at the
// 128-bit bus-beat level (one beat per bus clock; the two DDR edges are
// folded into one beat).  It stores written beats sparsely, returns a fixed
// pattern (dflt_beat) for locations never written, and checks the command
// stream against the bank rules and the timing parameters:
//   ACT only to a closed bank, tRP after PRE/PREA, BURST+tWR+tRP after WRA,
//   tRFC after REF; RD/WR only to an open bank, tRCD after ACT;
//   PRE only after write recovery; REF only with all banks closed;
//   a write burst needs its write-enable on all beats; no overlapping bursts.
// Each broken rule increments `violations`.  Read data of beat 0 appears CL
// cycles after the RD command was on the bus, one beat per cycle after that.
// Nothing is checked while rst_n is low.  Write data is taken together with the write command and on the next
// BURST-1 cycles.
module dram_model
  import dram_pkg::*;
#(
  parameter int unsigned ROW_BITS   = dram_pkg::D_ROW_BITS,
  parameter int unsigned BANK_BITS  = dram_pkg::D_BANK_BITS,
  parameter int unsigned GROUP_BITS = dram_pkg::D_GROUP_BITS,
  parameter int unsigned COL_BITS   = dram_pkg::D_COL_BITS,
  parameter int unsigned DATA_BITS  = dram_pkg::D_DATA_BITS,
  parameter int unsigned BURST      = dram_pkg::D_BURST_LEN,
  parameter int unsigned T_RCD      = dram_pkg::D_T_RCD,
  parameter int unsigned T_CL       = dram_pkg::D_T_CL,
  parameter int unsigned T_RP       = dram_pkg::D_T_RP,
  parameter int unsigned T_WR       = dram_pkg::D_T_WR,
  parameter int unsigned T_RFC      = dram_pkg::D_T_RFC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  dram_cmd_e             cmd,
  input  logic [GROUP_BITS-1:0] group,
  input  logic [BANK_BITS-1:0]  bank,
  input  logic [ROW_BITS-1:0]   row,
  input  logic [COL_BITS-1:0]   col,
  input  logic                  wen,
  input  logic [DATA_BITS-1:0]  wdata,
  output logic [DATA_BITS-1:0]  rdata
);

  localparam int unsigned NB = 1 << (GROUP_BITS + BANK_BITS);
  typedef logic [GROUP_BITS+BANK_BITS+ROW_BITS+COL_BITS-1:0] loc_t;

  logic [DATA_BITS-1:0] store [loc_t];

  longint unsigned cyc = 0;
  int unsigned violations = 0;
  int unsigned n_act = 0, n_pre = 0, n_prea = 0, n_rd = 0, n_wr = 0, n_wra = 0, n_ref = 0;

  bit              open_b [NB];
  logic [ROW_BITS-1:0] row_b [NB];
  longint unsigned act_ok [NB];
  longint unsigned col_ok [NB];
  longint unsigned pre_ok [NB];

  // active bursts
  bit              rd_act = 0, wr_act = 0;
  longint unsigned rd_start, wr_start;   // cycle of beat 0
  loc_t            rd_base, wr_base;
  int unsigned     rd_beat, wr_beat;

  initial begin
    rdata = '0;
    for (int i = 0; i < NB; i++) begin
      open_b[i] = 0; row_b[i] = '0; act_ok[i] = 0; col_ok[i] = 0; pre_ok[i] = 0;
    end
  end

  function automatic logic [DATA_BITS-1:0] dflt_beat(loc_t l);
    logic [DATA_BITS-1:0] v;
    for (int i = 0; i < DATA_BITS / 32; i++) v[i*32 +: 32] = 32'(l) * 32'h9E37_79B9 + 32'(i);
    return v;
  endfunction

  function automatic logic [DATA_BITS-1:0] peek(loc_t l);
    return store.exists(l) ? store[l] : dflt_beat(l);
  endfunction

  function automatic void clear();
    store.delete();
  endfunction

  function automatic void violate(string what);
    violations++;
    $display("dram_model: violation at cycle %0d: %s", cyc, what);
  endfunction

  function automatic loc_t mkloc(int b, logic [ROW_BITS-1:0] r, logic [COL_BITS-1:0] c);
    return {(GROUP_BITS+BANK_BITS)'(b), r, c};
  endfunction

  always @(posedge clk) if (rst_n) begin
    automatic int b = int'({group, bank});
    // ---- data of bursts in progress (sampled in this cycle) ----
    if (wr_act) begin
      if (!wen) violate("write beat without write enable");
      store[wr_base + loc_t'(wr_beat)] = wdata;
      wr_beat++;
      if (wr_beat == BURST) wr_act = 0;
    end else if (wen && !(cmd == CMD_WR || cmd == CMD_WRA)) begin
      violate("write enable outside a write burst");
    end
    // ---- command ----
    unique case (cmd)
      CMD_NOP: ;
      CMD_ACT: begin
        n_act++;
        if (open_b[b])          violate("ACT to an open bank");
        if (cyc < act_ok[b])    violate("ACT too early (tRP / tRFC)");
        open_b[b] = 1; row_b[b] = row;
        col_ok[b] = cyc + longint'(T_RCD); pre_ok[b] = cyc + 1;
      end
      CMD_RD: begin
        n_rd++;
        if (!open_b[b])         violate("RD to a closed bank");
        if (row != row_b[b])    violate("RD row differs from the open row");
        if (cyc < col_ok[b])    violate("RD too early (tRCD)");
        if (rd_act || wr_act)   violate("RD while a burst is in progress");
        rd_act = 1; rd_start = cyc + longint'(T_CL); rd_base = mkloc(b, row_b[b], col); rd_beat = 0;
      end
      CMD_WR, CMD_WRA: begin
        if (cmd == CMD_WR) n_wr++; else n_wra++;
        if (!open_b[b])         violate("WR to a closed bank");
        if (row != row_b[b])    violate("WR row differs from the open row");
        if (cyc < col_ok[b])    violate("WR too early (tRCD)");
        if (wr_act)             violate("WR while a write burst is in progress");
        if (rd_act && rd_start + longint'(BURST) > cyc) violate("WR overlaps read data");
        if (!wen)               violate("WR without data");
        wr_base = mkloc(b, row_b[b], col);
        store[wr_base] = wdata;
        wr_beat = 1; wr_act = (BURST > 1);
        pre_ok[b] = cyc + longint'(BURST) + longint'(T_WR);
        if (cmd == CMD_WRA) begin
          open_b[b] = 0;
          act_ok[b] = cyc + longint'(BURST) + longint'(T_WR) + T_RP;
        end
      end
      CMD_PRE: begin
        n_pre++;
        if (cyc < pre_ok[b])    violate("PRE before write recovery");
        open_b[b] = 0; act_ok[b] = cyc + longint'(T_RP);
      end
      CMD_PREA: begin
        n_prea++;
        for (int i = 0; i < NB; i++) begin
          if (cyc < pre_ok[i])  violate("PREA before write recovery");
          open_b[i] = 0; act_ok[i] = cyc + longint'(T_RP);
        end
      end
      CMD_REF: begin
        n_ref++;
        for (int i = 0; i < NB; i++) begin
          if (open_b[i])        violate("REF with an open bank");
          if (cyc < act_ok[i])  violate("REF too early (tRP)");
          act_ok[i] = cyc + longint'(T_RFC);
        end
      end
      default: ;
    endcase
    // ---- read data: beat k is visible during cycle rd_start + k ----
    if (rd_act && cyc + 1 >= rd_start) begin
      rdata <= peek(rd_base + loc_t'(rd_beat));
      rd_beat++;
      if (rd_beat == BURST) rd_act = 0;
    end
    cyc++;
  end

endmodule
