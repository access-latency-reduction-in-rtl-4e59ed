// dram_ctrl: DRAM command engine with the Write-miss Only Close-Page policies.
//
// Serves one 128 B line request at a time.  The request address goes through
// the address remapping unit (addr_remap) to get group, bank, row and column;
// the open-row register of that bank (bank_state_table) then classifies the
// access as a row-buffer hit (the row is open), a miss (another row is open)
// or an access to a closed bank, and the engine issues the commands:
//
//   hit     ->              RD / WR
//   closed  ->       ACT,   RD / WR(A)
//   miss    -> PRE,  ACT,   RD / WR(A)
//
// Reads always leave the row open (open-page).  Writes that hit leave it
// open too.  A write that misses (or finds its bank closed) is issued with
// auto-precharge, so its row is closed right after the write (POL_WM1,
// Write-miss Only Close-Page).  Under POL_WM2 (Write-miss Only Close-Page-Open
// previous Page) the engine then also re-activates the row that was open in
// that bank before the write miss, as soon as the auto-precharge has ended;
// its index was read from the open-row register when the miss was detected.
// A write that finds its bank closed has no previous row, so nothing is
// re-opened.  Refresh requests from refresh_timer are served between
// requests: precharge-all if any row is open, then REF; all rows are closed
// afterwards.
//
// Timing (bus cycles, all registered outputs): the request handshake is cycle
// 0, the first command is on the DRAM bus in cycle 2.  With a CAS latency CL,
// read data beat 0 is sampled CL cycles after RD is on the bus and appears on
// rd_valid/rd_data one cycle later, so the first read beat reaches the L2
// side 3+CL cycles after the handshake on a hit, 3+tRCD+CL on a closed bank
// and 3+tRP+tRCD+CL on a miss (6 / 8 / 10 cycles with the defaults).
// Write data is driven together with WR/WRA and on the next BURST_LEN-1
// cycles (write latency 0); the beat comes combinationally from the write
// buffer head via wr_beat_idx/wr_beat_data, and wr_done pops the buffer.
// Per-bank busy counters keep tRP, tRCD, write recovery and refresh time.
//
// Taken from the published policies: the three access cases and their
// latencies, the per-bank open-row register, both write-miss policies and the
// re-opening of the previous row, tRCD/CL/tRP.  This design's own choices: one request in flight, no command
// overlap between banks, write latency 0, tWR, tRFC, separate (not
// multiplexed) row/column outputs, the event outputs for statistics.
module dram_ctrl
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
  parameter int unsigned BURST_LEN  = dram_pkg::D_BURST_LEN,
  parameter int unsigned T_RCD      = dram_pkg::D_T_RCD,
  parameter int unsigned T_CL       = dram_pkg::D_T_CL,
  parameter int unsigned T_RP       = dram_pkg::D_T_RP,
  parameter int unsigned T_WR       = dram_pkg::D_T_WR,
  parameter int unsigned T_RFC      = dram_pkg::D_T_RFC,
  parameter int unsigned T_REFI     = dram_pkg::D_T_REFI,
  localparam int unsigned COL_BITS  = PAGE_BITS - BEAT_BITS,
  localparam int unsigned BIDX_BITS = (BURST_LEN > 1) ? $clog2(BURST_LEN) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // static configuration
  input  policy_e                 cfg_policy,
  input  map_scheme_e             cfg_scheme,
  // request (one line)
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_write,
  input  logic [ADDR_BITS-1:0]    req_addr,
  // write data from the write buffer head
  output logic [BIDX_BITS-1:0]    wr_beat_idx,
  input  logic [DATA_BITS-1:0]    wr_beat_data,
  output logic                    wr_done,
  // read data to the L2 cache
  output logic                    rd_valid,
  output logic [DATA_BITS-1:0]    rd_data,
  output logic                    rd_last,
  // DRAM command / data bus
  output dram_cmd_e               dram_cmd,
  output logic [GROUP_BITS-1:0]   dram_group,
  output logic [BANK_BITS-1:0]    dram_bank,
  output logic [ROW_BITS-1:0]     dram_row,
  output logic [COL_BITS-1:0]     dram_col,
  output logic                    dram_wen,
  output logic [DATA_BITS-1:0]    dram_wdata,
  input  logic [DATA_BITS-1:0]    dram_rdata,
  // per-access events (one cycle pulses)
  output logic                    ev_access,
  output logic                    ev_write,
  output acc_kind_e               ev_kind,
  output logic                    ev_reopen,
  output logic                    ev_refresh
);

  localparam int unsigned N_BANKS   = 1 << (GROUP_BITS + BANK_BITS);
  localparam int unsigned BUSY_MAX  = (BURST_LEN + T_WR + T_RP > T_RFC) ? BURST_LEN + T_WR + T_RP : T_RFC;
  localparam int unsigned BUSY_BITS = $clog2(BUSY_MAX + 1);
  localparam int unsigned CNT_BITS  = 4;

  initial begin
    if (T_RCD < 1 || T_CL < 1 || T_RP < 1 || T_RFC < 1)
      $error("dram_ctrl: timing parameters must be at least one cycle");
    if (T_RCD > 16 || T_CL > 16 || T_RP > 16)
      $error("dram_ctrl: timing parameter too large for the wait counter");
  end

  typedef enum logic [3:0] {
    S_IDLE, S_DECIDE, S_ACT, S_COL, S_RWAIT, S_RDATA, S_WDATA,
    S_REOPEN, S_REF_PRE, S_REF
  } state_e;

  // ---------------- remapping and open-row registers ----------------
  logic [GROUP_BITS-1:0] m_group;
  logic [BANK_BITS-1:0]  m_bank;
  logic [ROW_BITS-1:0]   m_row;
  logic [COL_BITS-1:0]   m_col;

  addr_remap #(
    .ADDR_BITS(ADDR_BITS), .ROW_BITS(ROW_BITS), .BANK_BITS(BANK_BITS),
    .GROUP_BITS(GROUP_BITS), .PAGE_BITS(PAGE_BITS), .BEAT_BITS(BEAT_BITS),
    .TAG_LSB(TAG_LSB)
  ) u_remap (
    .addr(req_addr), .scheme(cfg_scheme),
    .group(m_group), .bank(m_bank), .row(m_row), .col(m_col)
  );

  // latched request
  state_e                           state_q, state_d;
  logic [CNT_BITS-1:0]              cnt_q, cnt_d;
  logic [BIDX_BITS-1:0]             beat_q, beat_d;
  logic                             wr_q;
  logic [GROUP_BITS+BANK_BITS-1:0]  idx_q;
  logic [ROW_BITS-1:0]              row_q;
  logic [COL_BITS-1:0]              col_q;
  acc_kind_e                        kind_q, kind_d;
  logic                             prev_open_q, prev_open_d;
  logic [ROW_BITS-1:0]              prev_row_q, prev_row_d;

  logic                  lk_open, lk_ready, any_open, all_ready;
  logic [ROW_BITS-1:0]   lk_row;
  logic                  up_open, up_close, up_close_all;
  logic [ROW_BITS-1:0]   up_row;
  logic [BUSY_BITS-1:0]  up_busy;

  bank_state_table #(
    .N_BANKS(N_BANKS), .ROW_BITS(ROW_BITS), .BUSY_BITS(BUSY_BITS)
  ) u_banks (
    .clk, .rst_n,
    .lk_idx(idx_q), .lk_open, .lk_row, .lk_ready, .any_open, .all_ready,
    .up_open, .up_close, .up_close_all, .up_idx(idx_q), .up_row, .up_busy
  );

  logic ref_req, ref_ack;

  refresh_timer #(.T_REFI(T_REFI)) u_refresh (
    .clk, .rst_n, .ref_ack, .ref_req
  );

  // ---------------- registered DRAM bus ----------------
  dram_cmd_e            cmd_q, cmd_d;
  logic [ROW_BITS-1:0]  brow_q, brow_d;
  logic                 wen_q, wen_d;
  logic [DATA_BITS-1:0] wdata_q, wdata_d;
  logic                 rdv_q, rdv_d, rdl_q, rdl_d;
  logic [DATA_BITS-1:0] rdd_q;

  logic accept, issue_col;

  always_comb begin
    state_d      = state_q;
    cnt_d        = (cnt_q != '0) ? cnt_q - 1'b1 : cnt_q;
    beat_d       = beat_q;
    kind_d       = kind_q;
    prev_open_d  = prev_open_q;
    prev_row_d   = prev_row_q;
    cmd_d        = CMD_NOP;
    brow_d       = row_q;
    wen_d        = 1'b0;
    wdata_d      = wdata_q;
    rdv_d        = 1'b0;
    rdl_d        = 1'b0;
    up_open      = 1'b0;
    up_close     = 1'b0;
    up_close_all = 1'b0;
    up_row       = row_q;
    up_busy      = '0;
    req_ready    = 1'b0;
    accept       = 1'b0;
    issue_col    = 1'b0;
    wr_done      = 1'b0;
    wr_beat_idx  = (state_q == S_WDATA) ? beat_q : '0;
    ref_ack      = 1'b0;
    ev_access    = 1'b0;
    ev_reopen    = 1'b0;
    ev_refresh   = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (ref_req) begin
          state_d = S_REF_PRE;
        end else begin
          req_ready = 1'b1;
          if (req_valid) begin
            accept  = 1'b1;
            state_d = S_DECIDE;
          end
        end
      end

      S_DECIDE: begin
        if (lk_ready) begin
          ev_access = 1'b1;
          if (lk_open && lk_row == row_q) begin
            kind_d      = ACC_HIT;
            prev_open_d = 1'b0;
            issue_col   = 1'b1;
          end else if (lk_open) begin
            kind_d      = ACC_MISS;
            prev_open_d = 1'b1;
            prev_row_d  = lk_row;
            cmd_d       = CMD_PRE;
            up_close    = 1'b1;
            up_busy     = BUSY_BITS'(T_RP);
            cnt_d       = CNT_BITS'(T_RP - 1);
            state_d     = S_ACT;
          end else begin
            kind_d      = ACC_CLOSED;
            prev_open_d = 1'b0;
            cmd_d       = CMD_ACT;
            up_open     = 1'b1;
            up_busy     = BUSY_BITS'(T_RCD);
            cnt_d       = CNT_BITS'(T_RCD - 1);
            state_d     = S_COL;
          end
        end
      end

      S_ACT: begin
        if (cnt_q == '0) begin
          cmd_d   = CMD_ACT;
          up_open = 1'b1;
          up_busy = BUSY_BITS'(T_RCD);
          cnt_d   = CNT_BITS'(T_RCD - 1);
          state_d = S_COL;
        end
      end

      S_COL: begin
        if (cnt_q == '0) issue_col = 1'b1;
      end

      S_RWAIT: begin
        if (cnt_q == '0) begin
          beat_d  = '0;
          state_d = S_RDATA;
        end
      end

      S_RDATA: begin
        rdv_d  = 1'b1;
        beat_d = beat_q + 1'b1;
        if (beat_q == BIDX_BITS'(BURST_LEN - 1)) begin
          rdl_d   = 1'b1;
          state_d = S_IDLE;
        end
      end

      S_WDATA: begin
        wen_d   = 1'b1;
        wdata_d = wr_beat_data;
        beat_d  = beat_q + 1'b1;
        if (beat_q == BIDX_BITS'(BURST_LEN - 1)) begin
          wr_done = 1'b1;
          state_d = (kind_q != ACC_HIT && cfg_policy == POL_WM2 && prev_open_q)
                    ? S_REOPEN : S_IDLE;
        end
      end

      S_REOPEN: begin
        // Wm2: re-open the row that the write miss displaced
        if (lk_ready) begin
          cmd_d     = CMD_ACT;
          brow_d    = prev_row_q;
          up_open   = 1'b1;
          up_row    = prev_row_q;
          up_busy   = BUSY_BITS'(T_RCD);
          ev_reopen = 1'b1;
          state_d   = S_IDLE;
        end
      end

      S_REF_PRE: begin
        if (all_ready) begin
          if (any_open) begin
            cmd_d        = CMD_PREA;
            up_close_all = 1'b1;
            up_busy      = BUSY_BITS'(T_RP);
          end
          state_d = S_REF;
        end
      end

      S_REF: begin
        if (all_ready) begin
          cmd_d        = CMD_REF;
          up_close_all = 1'b1;
          up_busy      = BUSY_BITS'(T_RFC);
          ref_ack      = 1'b1;
          ev_refresh   = 1'b1;
          state_d      = S_IDLE;
        end
      end

      default: state_d = S_IDLE;
    endcase

    // column command, shared by the hit path and the activate path
    if (issue_col) begin
      if (!wr_q) begin
        cmd_d   = CMD_RD;
        cnt_d   = CNT_BITS'(T_CL - 1);
        state_d = S_RWAIT;
      end else begin
        // write hit: keep the row open; write miss: close it (auto-precharge)
        if (kind_d == ACC_HIT) begin
          cmd_d   = CMD_WR;
          up_open = 1'b1;
          up_busy = BUSY_BITS'(BURST_LEN + T_WR);
        end else begin
          cmd_d    = CMD_WRA;
          up_open  = 1'b0;
          up_close = 1'b1;
          up_busy  = BUSY_BITS'(BURST_LEN + T_WR + T_RP);
        end
        wen_d   = 1'b1;
        wdata_d = wr_beat_data;
        beat_d  = BIDX_BITS'(1);
        state_d = S_WDATA;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      cnt_q       <= '0;
      beat_q      <= '0;
      wr_q        <= 1'b0;
      idx_q       <= '0;
      row_q       <= '0;
      col_q       <= '0;
      kind_q      <= ACC_HIT;
      prev_open_q <= 1'b0;
      prev_row_q  <= '0;
      cmd_q       <= CMD_NOP;
      brow_q      <= '0;
      wen_q       <= 1'b0;
      wdata_q     <= '0;
      rdv_q       <= 1'b0;
      rdl_q       <= 1'b0;
      rdd_q       <= '0;
    end else begin
      state_q     <= state_d;
      cnt_q       <= cnt_d;
      beat_q      <= beat_d;
      kind_q      <= kind_d;
      prev_open_q <= prev_open_d;
      prev_row_q  <= prev_row_d;
      cmd_q       <= cmd_d;
      brow_q      <= brow_d;
      wen_q       <= wen_d;
      wdata_q     <= wdata_d;
      rdv_q       <= rdv_d;
      rdl_q       <= rdl_d;
      if (rdv_d) rdd_q <= dram_rdata;
      if (accept) begin
        wr_q  <= req_write;
        idx_q <= {m_group, m_bank};
        row_q <= m_row;
        col_q <= m_col;
      end
    end
  end

  assign dram_cmd   = cmd_q;
  assign dram_group = idx_q[GROUP_BITS+BANK_BITS-1 -: GROUP_BITS];
  assign dram_bank  = idx_q[BANK_BITS-1:0];
  assign dram_row   = brow_q;
  assign dram_col   = col_q;
  assign dram_wen   = wen_q;
  assign dram_wdata = wdata_q;
  assign rd_valid   = rdv_q;
  assign rd_data    = rdd_q;
  assign rd_last    = rdl_q;
  assign ev_write   = wr_q;
  assign ev_kind    = kind_d;

  // an activate must find its bank closed, a column command must find it open
  a_act_closed: assert property (@(posedge clk) disable iff (!rst_n)
                                 (cmd_d == CMD_ACT) |-> !lk_open);
  a_col_open:   assert property (@(posedge clk) disable iff (!rst_n)
                                 issue_col |-> (kind_d == ACC_HIT ? lk_open : 1'b1));

endmodule
