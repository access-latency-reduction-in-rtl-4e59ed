// bank_state_table: the open-row registers of the DRAM controller.
//
// One entry per bank of the memory (every bank of every group): a flag that
// says whether a row is open in the bank's sense amplifiers, the index of the
// open row, and a down-counter that says for how many more cycles the bank
// cannot take a new command (precharge, activate or auto-precharge still in
// progress).  An open-page controller needs exactly this register per bank to
// tell a row-buffer hit from a miss; the busy counter is this design's way of
// keeping the DRAM timing per bank.  After a precharge the row index is kept
// (with the open flag cleared), so the row that was last open in a bank is
// still known.
//
// Interface: one combinational lookup port, an "all banks idle / any bank
// open" summary for refresh, and three update strobes that take effect at
// the clock edge (open a row, close one bank, close all banks); each loads the
// busy counter of the bank(s) it touches.  At most one strobe per cycle is
// expected; open has priority over close, close over close-all.
module bank_state_table #(
  parameter int unsigned N_BANKS   = 8,
  parameter int unsigned ROW_BITS  = dram_pkg::D_ROW_BITS,
  parameter int unsigned BUSY_BITS = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup
  input  logic [$clog2(N_BANKS)-1:0] lk_idx,
  output logic                       lk_open,
  output logic [ROW_BITS-1:0]        lk_row,
  output logic                       lk_ready,
  output logic                       any_open,
  output logic                       all_ready,
  // updates
  input  logic                       up_open,
  input  logic                       up_close,
  input  logic                       up_close_all,
  input  logic [$clog2(N_BANKS)-1:0] up_idx,
  input  logic [ROW_BITS-1:0]        up_row,
  input  logic [BUSY_BITS-1:0]       up_busy
);

  logic [N_BANKS-1:0]                open_q;
  logic [N_BANKS-1:0][ROW_BITS-1:0]  row_q;
  logic [N_BANKS-1:0][BUSY_BITS-1:0] busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q <= '0;
      row_q  <= '0;
      busy_q <= '0;
    end else begin
      for (int i = 0; i < N_BANKS; i++)
        if (busy_q[i] != '0) busy_q[i] <= busy_q[i] - 1'b1;
      if (up_open) begin
        open_q[up_idx] <= 1'b1;
        row_q[up_idx]  <= up_row;
        busy_q[up_idx] <= up_busy;
      end else if (up_close) begin
        open_q[up_idx] <= 1'b0;
        busy_q[up_idx] <= up_busy;
      end else if (up_close_all) begin
        open_q <= '0;
        for (int i = 0; i < N_BANKS; i++) busy_q[i] <= up_busy;
      end
    end
  end

  always_comb begin
    lk_open   = open_q[lk_idx];
    lk_row    = row_q[lk_idx];
    lk_ready  = (busy_q[lk_idx] == '0);
    any_open  = |open_q;
    all_ready = 1'b1;
    for (int i = 0; i < N_BANKS; i++)
      if (busy_q[i] != '0) all_ready = 1'b0;
  end

endmodule
