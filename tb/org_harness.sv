// org_harness: parameterised test harness that runs the memory controller
// with one DRAM organisation (geometry and core timing) against the
// behavioural DRAM model, and checks it.
//
// The organisation is given by the bank, row and page sizes and by tRCD, CL
// and tRP in bus cycles; the address stays 27 bits (128 MB), the line 128 B
// and the bus 128 bits, as in every organisation the controller targets.  The
// harness drives the L2 side one operation at a time, with enough idle
// cycles in between that every bank is ready when the next request comes.
// For every pair of write-miss policy and remapping scheme it writes a pool
// of lines (three tags times two L2 sets, with the neighbouring line of each
// set, so that rows are shared and lines conflict in the L2 set) and then
// mixes reads and write-backs over the pool.  An independent reference in
// this file works out the group, bank and row of each address from the field
// widths of each scheme, keeps its own open-row table under the policy
// rules, and checks:
//   - the hit / miss / closed class reported for each access;
//   - all eight beats of every read against the last line written;
//   - the read latency from the L2 handshake to the first beat:
//     3+CL on a hit, 3+tRCD+CL on a closed bank, 3+tRP+tRCD+CL on a miss;
//   - the number of previous-row re-opens, and that the DRAM model saw no
//     bank or timing violation;
//   - that hits, misses, closed banks, write misses, re-opens, refreshes and
//     a latency check of each class all happened.
// Outputs: done rises when the run is over; checks and failures are the
// counts so far.  Used by tb_mem_ctrl_orgs.
module org_harness
  import dram_pkg::*;
#(
  parameter string       NAME      = "org",
  parameter int unsigned ROW_BITS  = 12,
  parameter int unsigned BANK_BITS = 2,
  parameter int unsigned PAGE_BITS = 12,
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned T_CL      = 3,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned NOPS      = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned A   = 27;
  localparam int unsigned T   = 18;          // lowest L2 tag bit
  localparam int unsigned C   = PAGE_BITS;   // column field [C-1:0]
  localparam int unsigned B   = BANK_BITS;
  localparam int unsigned CB  = PAGE_BITS - 4;
  localparam int unsigned NBK = 2 << BANK_BITS;

  policy_e             cfg_policy;
  map_scheme_e         cfg_scheme;
  logic                l2_rd_valid, l2_rd_ready, rd_valid, rd_last;
  logic [A-1:0]        l2_rd_addr, l2_wb_addr;
  logic [127:0]        rd_data;
  logic                l2_wb_valid, l2_wb_ready;
  logic [7:0][127:0]   l2_wb_line;
  logic [2:0]          wb_count;
  dram_cmd_e           dram_cmd;
  logic [0:0]          dram_group;
  logic [B-1:0]        dram_bank;
  logic [ROW_BITS-1:0] dram_row;
  logic [CB-1:0]       dram_col;
  logic                dram_wen;
  logic [127:0]        dram_wdata, dram_rdata;
  logic                ev_access, ev_write, ev_reopen, ev_refresh;
  acc_kind_e           ev_kind;

  mem_ctrl_top #(
    .ROW_BITS(ROW_BITS), .BANK_BITS(BANK_BITS), .GROUP_BITS(1), .PAGE_BITS(PAGE_BITS),
    .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP)
  ) dut (.*);

  dram_model #(
    .ROW_BITS(ROW_BITS), .BANK_BITS(BANK_BITS), .GROUP_BITS(1), .COL_BITS(CB),
    .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP)
  ) u_mem (
    .clk, .rst_n, .cmd(dram_cmd), .group(dram_group), .bank(dram_bank), .row(dram_row),
    .col(dram_col), .wen(dram_wen), .wdata(dram_wdata), .rdata(dram_rdata)
  );

  longint unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin checks = 0; failures = 0; done = 0; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: %s", NAME, cyc, what);
    end
  endtask

  // ---------------- independent reference ----------------
  function automatic int fld(logic [A-1:0] a, int lo, int w);
    return int'((64'(a) >> lo) & ((64'd1 << w) - 1));
  endfunction

  // bank index = group * 2^B + bank, and row, from the field order of each scheme
  function automatic void ref_map(logic [A-1:0] a, map_scheme_e s, output int bi, output int row);
    int g, b;
    case (s)
      MAP_RGRBC, MAP_RGRBCX: begin          // R | Gr | ow | Bank | Col
        b = fld(a, C, B);
        g = fld(a, T, 1);
        row = (fld(a, T + 1, A - T - 1) << (T - C - B)) | fld(a, C + B, T - C - B);
        if (s == MAP_RGRBCX) b = b ^ fld(a, T + 1, B);
      end
      MAP_RBRGC, MAP_RBGBCX: begin          // R | Bank | ow | Gr | Col
        g = fld(a, C, 1);
        b = fld(a, T, B);
        row = (fld(a, T + B, A - T - B) << (T - C - 1)) | fld(a, C + 1, T - C - 1);
        if (s == MAP_RBGBCX) g = g ^ fld(a, T + B, 1);
      end
      default: begin                        // R | Gr | Bank | ow | Col
        b = fld(a, T, B);
        g = fld(a, T + B, 1);
        row = (fld(a, T + B + 1, A - T - B - 1) << (T - C)) | fld(a, C, T - C);
      end
    endcase
    bi = g * (1 << B) + b;
  endfunction

  logic [7:0][127:0] img [logic [A-8:0]];   // last line written, by line address
  bit                r_open [NBK];
  int                r_row  [NBK];

  logic [A-1:0] op_addr;      // operation being driven (stable between edges)
  bit           op_write;
  logic [A-1:0] rd_line;
  longint unsigned hs_cyc = 0, last_ref_cyc = 0;
  acc_kind_e    last_kind;
  int           beat = 0;
  int n_hit = 0, n_miss = 0, n_closed = 0, n_wmiss = 0, n_reopen = 0, n_reopen_exp = 0;
  int n_refresh = 0;
  int n_lat [3] = '{0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    if (ev_refresh) begin
      n_refresh++;
      last_ref_cyc = cyc;
      for (int i = 0; i < NBK; i++) r_open[i] = 0;
    end
    if (ev_reopen) n_reopen++;
    if (l2_rd_valid && l2_rd_ready) begin
      hs_cyc  = cyc;
      rd_line = l2_rd_addr;
      beat    = 0;
    end
    if (ev_access) begin
      automatic int bi, row;
      automatic acc_kind_e k;
      ref_map(op_addr, cfg_scheme, bi, row);
      if (r_open[bi] && r_row[bi] == row) k = ACC_HIT;
      else if (r_open[bi])                k = ACC_MISS;
      else                                k = ACC_CLOSED;
      check(ev_write == op_write, "access direction");
      check(ev_kind == k, $sformatf("class %s, expected %s (addr %h)", ev_kind.name(), k.name(), op_addr));
      last_kind = k;
      case (k)
        ACC_HIT:  n_hit++;
        ACC_MISS: n_miss++;
        default:  n_closed++;
      endcase
      if (!op_write || k == ACC_HIT) begin
        r_open[bi] = 1; r_row[bi] = row;
      end else begin
        n_wmiss++;
        r_open[bi] = 0;
        if (cfg_policy == POL_WM2 && k == ACC_MISS) begin
          r_open[bi] = 1;        // r_row keeps the displaced row
          n_reopen_exp++;
        end
      end
    end
    if (rd_valid) begin
      automatic logic [7:0][127:0] ln = img[rd_line[A-1:7]];
      check(rd_data == ln[beat], $sformatf("read beat %0d of %h", beat, rd_line));
      check(rd_last == (beat == 7), "rd_last position");
      if (beat == 0 && last_ref_cyc + 40 < hs_cyc) begin
        automatic longint unsigned want = (last_kind == ACC_HIT)    ? 3 + T_CL :
                                          (last_kind == ACC_CLOSED) ? 3 + T_RCD + T_CL :
                                                                      3 + T_RP + T_RCD + T_CL;
        check(cyc - hs_cyc == want, $sformatf("read latency %0d, expected %0d (%s)",
              cyc - hs_cyc, want, last_kind.name()));
        n_lat[int'(last_kind)]++;
      end
      beat++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic do_write(logic [A-1:0] a);
    @(negedge clk);
    op_addr = a; op_write = 1;
    l2_wb_addr = a;
    for (int i = 0; i < 8; i++) l2_wb_line[i] = {$urandom, $urandom, $urandom, $urandom};
    l2_wb_valid = 1;
    do @(posedge clk); while (!l2_wb_ready);
    img[a[A-1:7]] = l2_wb_line;
    @(negedge clk);
    l2_wb_valid = 0;
    while (wb_count != 0) @(negedge clk);
    repeat (25) @(negedge clk);
  endtask

  task automatic do_read(logic [A-1:0] a);
    @(negedge clk);
    op_addr = a; op_write = 0;
    l2_rd_addr = a;
    l2_rd_valid = 1;
    do @(posedge clk); while (!l2_rd_ready);
    @(negedge clk);
    l2_rd_valid = 0;
    while (!rd_last) @(negedge clk);
    repeat (25) @(negedge clk);
  endtask

  initial begin
    logic [A-T-1:0] tags [3];
    logic [T-8:0]   idxs [2];
    logic [A-1:0]   pool [12];
    cfg_policy = POL_WM1; cfg_scheme = MAP_RGRBC;
    l2_rd_valid = 0; l2_rd_addr = '0; l2_wb_valid = 0; l2_wb_addr = '0; l2_wb_line = '0;
    op_addr = '0; op_write = 0; rd_line = '0; last_kind = ACC_CLOSED;
    for (int i = 0; i < NBK; i++) begin r_open[i] = 0; r_row[i] = 0; end
    @(posedge rst_n);
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < 5; s++) begin
        repeat (10) @(negedge clk);
        cfg_policy = policy_e'(p);
        cfg_scheme = map_scheme_e'(s);
        u_mem.clear();
        img.delete();
        for (int i = 0; i < 3; i++) tags[i] = (A-T)'($urandom);
        for (int i = 0; i < 2; i++) idxs[i] = (T-7)'($urandom);
        for (int t = 0; t < 3; t++)
          for (int i = 0; i < 2; i++) begin
            pool[t*4 + i*2]     = {tags[t], idxs[i], 7'b0};
            pool[t*4 + i*2 + 1] = {tags[t], idxs[i] ^ (T-7)'(1), 7'b0};
          end
        // the scheme changed, so every line is written before it is read
        for (int i = 0; i < 12; i++) do_write(pool[i]);
        for (int n = 0; n < NOPS; n++) begin
          automatic logic [A-1:0] a = pool[$urandom % 12];
          if ($urandom % 5 < 2) do_write(a);
          else                  do_read(a);
        end
      end
    repeat (20) @(negedge clk);
    check(u_mem.violations == 0, $sformatf("%0d DRAM rule violations", u_mem.violations));
    check(u_mem.n_wra == n_wmiss, "auto-precharge writes differ from write misses");
    check(n_reopen == n_reopen_exp, $sformatf("%0d re-opens, expected %0d", n_reopen, n_reopen_exp));
    check(n_hit > 0,     "no row hit");
    check(n_miss > 0,    "no row miss");
    check(n_closed > 0,  "no closed-bank access");
    check(n_wmiss > 0,   "no write miss");
    check(n_reopen > 0,  "no previous-row re-open");
    check(n_refresh > 0, "no refresh");
    for (int k = 0; k < 3; k++) check(n_lat[k] > 0, $sformatf("no latency check of class %0d", k));
    $display("%s: hits=%0d misses=%0d closed=%0d write_misses=%0d reopens=%0d refreshes=%0d latency_checks=%0d/%0d/%0d",
             NAME, n_hit, n_miss, n_closed, n_wmiss, n_reopen, n_refresh, n_lat[0], n_lat[1], n_lat[2]);
    done = 1;
  end

endmodule
