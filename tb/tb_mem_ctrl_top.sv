// tb_mem_ctrl_top: end-to-end testbench of the memory controller, at the
// default (full) configuration.
//
// An L2-side traffic generator issues read misses (one at a time) and,
// from a separate process, pushes dirty-line write-backs into the write
// buffer at random times, over a small set of lines chosen so that rows are
// shared, conflict in the L2 set index and conflict in the banks.  This runs
// once for every pair of write-miss policy and remapping scheme (the mode
// switch happens while the controller is idle).  Checks:
//   - every read returns the last value written to its line before the read
//     was accepted (or the DRAM model's default pattern), so a read never
//     overtakes a buffered write to the same line;
//   - the hit / miss / closed class of every access matches an independent
//     open-row reference that applies the policy rules;
//   - the DRAM model sees no bank or timing violation;
//   - every mechanism happens at least once: row hit, row miss, closed bank,
//     write miss closed by auto-precharge, previous-row re-open, a hit on a
//     re-opened row, refresh, write buffer full (back-pressure on the L2),
//     read served ahead of a buffered write, write drained first for a read
//     that hits it, and both policies and all five schemes.
module tb_mem_ctrl_top;
  import dram_pkg::*;

  localparam int unsigned NREAD = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  policy_e            cfg_policy;
  map_scheme_e        cfg_scheme;
  logic               l2_rd_valid, l2_rd_ready, rd_valid, rd_last;
  logic [26:0]        l2_rd_addr, l2_wb_addr;
  logic [127:0]       rd_data;
  logic               l2_wb_valid, l2_wb_ready;
  logic [7:0][127:0]  l2_wb_line;
  logic [2:0]         wb_count;
  dram_cmd_e          dram_cmd;
  logic [0:0]         dram_group;
  logic [1:0]         dram_bank;
  logic [11:0]        dram_row;
  logic [7:0]         dram_col;
  logic               dram_wen;
  logic [127:0]       dram_wdata, dram_rdata;
  logic               ev_access, ev_write, ev_reopen, ev_refresh;
  acc_kind_e          ev_kind;

  mem_ctrl_top dut (.*);

  dram_model u_mem (
    .clk, .rst_n, .cmd(dram_cmd), .group(dram_group), .bank(dram_bank), .row(dram_row),
    .col(dram_col), .wen(dram_wen), .wdata(dram_wdata), .rdata(dram_rdata)
  );

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- independent reference ----------------
  typedef struct { int grp; int bnk; int row; int col; } loc_s;

  function automatic loc_s ref_map(logic [26:0] a, map_scheme_e s);
    loc_s l;
    l.col = int'(a[11:4]);
    case (s)
      MAP_RGRBC, MAP_RGRBCX: begin
        l.grp = int'(a[18]); l.bnk = int'(a[13:12]); l.row = int'({a[26:19], a[17:14]});
        if (s == MAP_RGRBCX) l.bnk = l.bnk ^ int'(a[20:19]);
      end
      MAP_RBRGC, MAP_RBGBCX: begin
        l.grp = int'(a[12]); l.bnk = int'(a[19:18]); l.row = int'({a[26:20], a[17:13]});
        if (s == MAP_RBGBCX) l.grp = l.grp ^ int'(a[20]);
      end
      default: begin
        l.grp = int'(a[20]); l.bnk = int'(a[19:18]); l.row = int'({a[26:21], a[17:12]});
      end
    endcase
    return l;
  endfunction

  // program-order memory image (what the L2 has written back) and the
  // image of what has reached the DRAM, both by line address
  logic [7:0][127:0] l2_mem [logic [19:0]];
  bit                r_open [8];
  int                r_row  [8];
  int                reopen_bank = -1;

  // FIFO of write-backs accepted by the buffer, in order
  logic [26:0] wq [$];

  // ---------------- access classification ----------------
  int n_hit = 0, n_miss = 0, n_closed = 0, n_wmiss = 0, n_reopen = 0, n_reopen_hit = 0;
  int n_refresh = 0, n_full = 0, n_rd_bypass = 0, n_raw_first = 0;
  int n_rd = 0, n_wr = 0;
  bit pol_seen [2];
  bit sch_seen [5];

  logic [26:0] srv_addr;    // request in service
  bit          srv_write;

  always @(posedge clk) if (rst_n) begin
    // capture the request taken by the command engine
    if (dut.req_valid && dut.req_ready) begin
      automatic loc_s l = ref_map(dut.req_addr, cfg_scheme);
      automatic int   bi = l.grp * 4 + l.bnk;
      automatic acc_kind_e k;
      srv_addr  = dut.req_addr;
      srv_write = dut.req_write;
      if (r_open[bi] && r_row[bi] == l.row) k = ACC_HIT;
      else if (r_open[bi])                  k = ACC_MISS;
      else                                  k = ACC_CLOSED;
      exp_q.push_back(k);
      if (k == ACC_HIT && bi == reopen_bank) n_reopen_hit++;
      reopen_bank = -1;
      if (!dut.req_write || k == ACC_HIT) begin
        r_open[bi] = 1; r_row[bi] = l.row;
      end else if (cfg_policy == POL_WM2 && k == ACC_MISS) begin
        r_row[bi] = r_row[bi]; reopen_bank = bi;   // previous row stays the open one
      end else begin
        r_open[bi] = 0;
      end
      if (dut.req_write) begin
        check(wq.size() > 0 && wq[0] == dut.req_addr, "write-backs leave the buffer in order");
        n_wr++;
        if (l2_rd_valid) n_raw_first += dut.wb_conflict && !dut.wb_full;
      end else begin
        n_rd++;
        if (dut.wb_head_valid) n_rd_bypass++;
      end
    end
    if (dut.wb_pop) void'(wq.pop_front());
    if (l2_wb_valid && l2_wb_ready) wq.push_back(l2_wb_addr);
    if (l2_wb_valid && !l2_wb_ready) n_full++;
    if (ev_refresh) begin
      n_refresh++;
      for (int i = 0; i < 8; i++) r_open[i] = 0;
      reopen_bank = -1;
    end
    if (ev_reopen) n_reopen++;
    if (ev_access) begin
      automatic acc_kind_e k = exp_q.pop_front();
      check(ev_kind == k, $sformatf("class %s, expected %s", ev_kind.name(), k.name()));
      case (ev_kind)
        ACC_HIT:  n_hit++;
        ACC_MISS: n_miss++;
        default:  n_closed++;
      endcase
      if (ev_write && ev_kind != ACC_HIT) n_wmiss++;
      pol_seen[int'(cfg_policy)] = 1;
      sch_seen[int'(cfg_scheme)] = 1;
    end
  end
  acc_kind_e exp_q [$];

  // ---------------- read data check ----------------
  logic [7:0][127:0] rd_exp;
  bit                rd_exp_written;
  logic [26:0]       rd_cur;
  int                rd_beat = 0;

  always @(posedge clk) if (rst_n) begin
    if (rd_valid) begin
      automatic logic [127:0] e;
      if (rd_exp_written) e = rd_exp[rd_beat];
      else begin
        automatic loc_s l = ref_map(rd_cur, cfg_scheme);
        e = u_mem.dflt_beat({l.grp[0], l.bnk[1:0], l.row[11:0], 8'(l.col + rd_beat)});
      end
      check(rd_data == e, $sformatf("read beat %0d of %h", rd_beat, rd_cur));
      check(rd_last == (rd_beat == 7), "rd_last position");
      rd_beat++;
    end
    // a new read can be accepted in the cycle of the previous read's last beat
    if (l2_rd_valid && l2_rd_ready) begin
      rd_cur = l2_rd_addr;
      rd_exp_written = l2_mem.exists(l2_rd_addr[26:7]);
      if (rd_exp_written) rd_exp = l2_mem[l2_rd_addr[26:7]];
      rd_beat = 0;
    end
    if (l2_wb_valid && l2_wb_ready) l2_mem[l2_wb_addr[26:7]] = l2_wb_line;
  end

  // ---------------- traffic ----------------
  logic [8:0]  tags [4];
  logic [10:0] idxs [3];
  bit          epoch_on = 0;
  bit          reads_done = 0;

  function automatic logic [26:0] pick_line();
    return {tags[$urandom % 4], idxs[$urandom % 3], 7'b0};
  endfunction

  // write-back source: bursts of write-backs now and then
  initial begin
    l2_wb_valid = 0; l2_wb_addr = 0; l2_wb_line = '0;
    forever begin
      @(negedge clk);
      if (epoch_on && !reads_done && ($urandom % 12) == 0) begin
        automatic int nb = 1 + $urandom % 6;
        for (int k = 0; k < nb; k++) begin
          l2_wb_valid = 1;
          l2_wb_addr  = pick_line();
          for (int b = 0; b < 8; b++) l2_wb_line[b] = {$urandom, $urandom, $urandom, $urandom};
          do @(posedge clk); while (!l2_wb_ready);
          @(negedge clk);
          l2_wb_valid = 0;
        end
      end
    end
  end

  task automatic run_epoch(policy_e p, map_scheme_e s);
    // drain: buffer empty, engine idle, then switch modes
    while (wb_count != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    cfg_policy = p; cfg_scheme = s;
    u_mem.clear();
    l2_mem.delete();
    for (int i = 0; i < 4; i++) tags[i] = 9'($urandom);
    for (int i = 0; i < 3; i++) idxs[i] = 11'($urandom);
    reads_done = 0;
    epoch_on = 1;
    for (int n = 0; n < NREAD; n++) begin
      if ($urandom % 3 == 0) repeat ($urandom % 30) @(negedge clk);
      // sometimes read a line that was just written back
      l2_rd_addr  = (wq.size() > 0 && $urandom % 4 == 0) ? wq[wq.size() - 1] : pick_line();
      l2_rd_valid = 1;
      do @(posedge clk); while (!l2_rd_ready);
      @(negedge clk);
      l2_rd_valid = 0;
      while (!rd_last) @(negedge clk);
    end
    reads_done = 1;
    repeat (20) @(negedge clk);
    epoch_on = 0;
  endtask

  initial begin
    l2_rd_valid = 0; l2_rd_addr = 0;
    cfg_policy = POL_WM1; cfg_scheme = MAP_RGRBC;
    for (int i = 0; i < 8; i++) begin r_open[i] = 0; r_row[i] = 0; end
    for (int i = 0; i < 2; i++) pol_seen[i] = 0;
    for (int i = 0; i < 5; i++) sch_seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < 5; s++)
        run_epoch(policy_e'(p), map_scheme_e'(s));
    while (wb_count != 0) @(negedge clk);
    repeat (60) @(negedge clk);
    check(u_mem.violations == 0, $sformatf("%0d DRAM rule violations", u_mem.violations));
    check(u_mem.n_wra == n_wmiss,  "auto-precharge writes differ from write misses");
    check(exp_q.size() == 0,       "every accepted request was classified");
    check(n_hit > 0,        "no row hit");
    check(n_miss > 0,       "no row miss");
    check(n_closed > 0,     "no closed-bank access");
    check(n_wmiss > 0,      "no write miss");
    check(n_reopen > 0,     "no previous-row re-open");
    check(n_reopen_hit > 0, "no hit on a re-opened row");
    check(n_refresh > 0,    "no refresh");
    check(n_full > 0,       "write buffer never full");
    check(n_rd_bypass > 0,  "no read ahead of a buffered write");
    check(n_raw_first > 0,  "no write drained first for a conflicting read");
    check(pol_seen[0] && pol_seen[1], "both policies used");
    for (int i = 0; i < 5; i++) check(sch_seen[i], $sformatf("scheme %0d used", i));
    $display("reads=%0d writes=%0d hits=%0d misses=%0d closed=%0d write_misses=%0d reopen=%0d reopen_hits=%0d",
             n_rd, n_wr, n_hit, n_miss, n_closed, n_wmiss, n_reopen, n_reopen_hit);
    $display("refresh=%0d wb_full_cycles=%0d read_bypass=%0d raw_write_first=%0d",
             n_refresh, n_full, n_rd_bypass, n_raw_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
