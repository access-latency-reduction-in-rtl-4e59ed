// tb_dram_ctrl: self-checking testbench of the DRAM command engine.
//
// Drives line requests straight into dram_ctrl (no write buffer) against the
// behavioural DRAM model, for both write-miss policies and all five address
// remapping schemes.  An independent reference in this file re-derives the
// group/bank/row of every address from the bit positions of each scheme,
// keeps its own open-row table under the policy rules, and checks:
//   - the hit / miss / closed class the engine reports for each access;
//   - read data against the values written earlier (or the model's
//     default pattern for lines never written);
//   - read latency in cycles: 3+CL on a hit, 3+tRCD+CL on a closed bank,
//     3+tRP+tRCD+CL on a miss, whenever the bank was idle;
//   - that the DRAM model saw no bank or timing violation;
//   - that every mechanism (hits, misses, closed banks, auto-precharged write
//     misses, Wm2 re-opening, refresh) happened at least once.
module tb_dram_ctrl;
  import dram_pkg::*;

  localparam int unsigned CL = D_T_CL, RCD = D_T_RCD, RP = D_T_RP;
  localparam int unsigned NREQ = 80;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  policy_e     cfg_policy;
  map_scheme_e cfg_scheme;
  logic        req_valid, req_ready, req_write;
  logic [26:0] req_addr;
  logic [2:0]  wr_beat_idx;
  logic [127:0] wr_beat_data;
  logic        wr_done, rd_valid, rd_last;
  logic [127:0] rd_data;
  dram_cmd_e   dram_cmd;
  logic [0:0]  dram_group;
  logic [1:0]  dram_bank;
  logic [11:0] dram_row;
  logic [7:0]  dram_col;
  logic        dram_wen;
  logic [127:0] dram_wdata, dram_rdata;
  logic        ev_access, ev_write, ev_reopen, ev_refresh;
  acc_kind_e   ev_kind;

  dram_ctrl dut (.*);

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
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
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
      default: begin // MAP_RGBRC
        l.grp = int'(a[20]); l.bnk = int'(a[19:18]); l.row = int'({a[26:21], a[17:12]});
      end
    endcase
    return l;
  endfunction

  bit          r_open [8];
  int          r_row  [8];
  logic [7:0][127:0] r_mem [logic [19:0]];   // written lines, by line address

  // ---------------- request side ----------------
  logic [127:0] cur_line [8];
  assign wr_beat_data = cur_line[wr_beat_idx];

  acc_kind_e exp_kind;
  bit        exp_valid = 0;
  bit        cur_is_read = 0;
  bit        lat_check = 0;
  longint unsigned hs_cyc, last_ref_cyc = 0;
  logic [26:0] cur_addr;
  int          beats_seen = 0;
  bit          busy = 0;

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_closed = 0, n_wmiss = 0, n_reopen = 0, n_refresh = 0;
  int n_lat = 0, n_reopen_hit = 0;
  int reopen_bank = -1;

  logic [26:0] rd_req_addr;   // address of the request in service
  always @(posedge clk) if (req_valid && req_ready) rd_req_addr <= req_addr;

  // handshake: predict the class and update the reference table
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    automatic loc_s l = ref_map(req_addr, cfg_scheme);
    automatic int   bi = l.grp * 4 + l.bnk;
    automatic bit   was_open = r_open[bi];
    automatic int   prev = r_row[bi];
    if (r_open[bi] && r_row[bi] == l.row) exp_kind = ACC_HIT;
    else if (r_open[bi])                  exp_kind = ACC_MISS;
    else                                  exp_kind = ACC_CLOSED;
    if (exp_kind == ACC_HIT && bi == reopen_bank) n_reopen_hit++;
    reopen_bank = -1;
    exp_valid = 1;
    hs_cyc = cyc;
    if (!req_write || exp_kind == ACC_HIT) begin
      r_open[bi] = 1; r_row[bi] = l.row;
    end else begin
      r_open[bi] = 0;
      if (cfg_policy == POL_WM2 && was_open && exp_kind == ACC_MISS) begin
        r_open[bi] = 1; r_row[bi] = prev; reopen_bank = bi;
      end
    end
    if (req_write) begin
      automatic logic [7:0][127:0] ln;
      for (int i = 0; i < 8; i++) ln[i] = cur_line[i];
      r_mem[req_addr[26:7]] = ln;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_refresh) begin
      n_refresh++;
      last_ref_cyc = cyc;
      for (int i = 0; i < 8; i++) r_open[i] = 0;
      reopen_bank = -1;
    end
    if (ev_reopen) n_reopen++;
    if (ev_access) begin
      check(exp_valid, "access event without a request");
      check(ev_kind == exp_kind, $sformatf("access class %s, expected %s (addr %h)",
            ev_kind.name(), exp_kind.name(), cur_addr));
      exp_valid = 0;
      cur_addr = rd_req_addr;
      cur_is_read = !ev_write;
      beats_seen = 0;
      case (ev_kind)
        ACC_HIT:    n_hit++;
        ACC_MISS:   n_miss++;
        default:    n_closed++;
      endcase
      if (ev_write && ev_kind != ACC_HIT) n_wmiss++;
    end
    if (rd_valid) begin
      automatic loc_s l = ref_map(cur_addr, cfg_scheme);
      automatic logic [127:0] exp;
      if (r_mem.exists(cur_addr[26:7])) begin automatic logic [7:0][127:0] ln = r_mem[cur_addr[26:7]]; exp = ln[beats_seen]; end
      else exp = u_mem.dflt_beat({l.grp[0], l.bnk[1:0], l.row[11:0], 8'(l.col + beats_seen)});
      check(cur_is_read, "read data during a write");
      check(rd_data == exp, $sformatf("read data beat %0d of %h", beats_seen, cur_addr));
      if (beats_seen == 0 && lat_check && cyc - last_ref_cyc > 40) begin
        automatic longint unsigned lat = cyc - hs_cyc;
        automatic longint unsigned want = (exp_kind == ACC_HIT) ? 3 + CL :
                                           (exp_kind == ACC_CLOSED) ? 3 + RCD + CL : 3 + RP + RCD + CL;
        check(lat == want, $sformatf("read latency %0d, expected %0d (%s)", lat, want, exp_kind.name()));
        n_lat++;
      end
      check(rd_last == (beats_seen == 7), "rd_last position");
      beats_seen++;
    end
  end

  // ---------------- stimulus ----------------
  logic [8:0]  tags [4];
  logic [10:0] idxs [4];

  task automatic run_epoch(policy_e p, map_scheme_e s);
    // wait for the engine to be idle, then reconfigure and clear memories
    repeat (40) @(negedge clk);
    cfg_policy = p; cfg_scheme = s;
    u_mem.clear();
    r_mem.delete();
    for (int i = 0; i < 4; i++) begin
      tags[i] = 9'($urandom);
      idxs[i] = 11'($urandom);
    end
    for (int n = 0; n < NREQ; n++) begin
      automatic bit gap = ($urandom % 3) == 0;
      if (gap) repeat (25) @(negedge clk);
      lat_check = gap;
      req_addr  = {tags[$urandom % 4], idxs[$urandom % 4], 7'b0};
      req_write = ($urandom % 2) == 0;
      if (req_write) for (int i = 0; i < 8; i++) cur_line[i] = {$urandom, $urandom, $urandom, $urandom};
      req_valid = 1;
      do @(posedge clk); while (!req_ready);
      @(negedge clk);
      req_valid = 0;
      // wait for the end of the operation
      while (!(rd_last || wr_done)) @(negedge clk);
      @(negedge clk);  // the last write beat is taken at the next edge
    end
  endtask

  initial begin
    req_valid = 0; req_write = 0; req_addr = '0;
    cfg_policy = POL_WM1; cfg_scheme = MAP_RGRBC;
    for (int i = 0; i < 8; i++) begin cur_line[i] = '0; r_open[i] = 0; r_row[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < 5; s++)
        run_epoch(policy_e'(p), map_scheme_e'(s));
    repeat (60) @(negedge clk);
    check(u_mem.violations == 0, $sformatf("%0d DRAM rule violations", u_mem.violations));
    check(u_mem.n_wra == n_wmiss, "auto-precharge writes differ from write misses");
    check(n_hit > 0,     "no row-buffer hit");
    check(n_miss > 0,    "no row-buffer miss");
    check(n_closed > 0,  "no access to a closed bank");
    check(n_wmiss > 0,   "no write miss");
    check(n_reopen > 0,  "no previous-row re-open");
    check(n_reopen_hit > 0, "no hit on a re-opened row");
    check(n_refresh > 0, "no refresh");
    check(n_lat > 20,    "too few latency checks");
    $display("hits=%0d misses=%0d closed=%0d write_misses=%0d reopen=%0d reopen_hits=%0d refresh=%0d latency_checks=%0d",
             n_hit, n_miss, n_closed, n_wmiss, n_reopen, n_reopen_hit, n_refresh, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
