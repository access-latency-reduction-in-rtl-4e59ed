// tb_bank_state_table: self-checking testbench of the open-row registers.
//
// Applies random open / close / close-all updates and compares every
// lookup and the any-open / all-ready summaries, cycle by cycle, with a
// reference copy of the table kept in this file (open flag, row and busy
// countdown per bank).
module tb_bank_state_table;
  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  lk_idx, up_idx;
  logic        lk_open, lk_ready, any_open, all_ready;
  logic [11:0] lk_row, up_row;
  logic        up_open, up_close, up_close_all;
  logic [4:0]  up_busy;

  bank_state_table dut (.*);

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          m_open [8];
  logic [11:0] m_row  [8];
  int          m_busy [8];
  int          n_open = 0, n_close = 0, n_all = 0;

  initial begin
    for (int i = 0; i < 8; i++) begin m_open[i] = 0; m_row[i] = 0; m_busy[i] = 0; end
    {up_open, up_close, up_close_all} = '0; up_idx = 0; up_row = 0; up_busy = 0; lk_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      automatic int op = $urandom % 8;
      // compare every bank before applying the next update
      for (int i = 0; i < 8; i++) begin
        automatic bit e_ready;
        lk_idx = 3'(i);
        #0.1;
        e_ready = (m_busy[i] == 0);
        check(lk_open == m_open[i], $sformatf("bank %0d open flag", i));
        if (m_open[i]) check(lk_row == m_row[i], $sformatf("bank %0d row", i));
        check(lk_ready == e_ready, $sformatf("bank %0d ready", i));
      end
      begin
        automatic bit ao = 0, ar = 1;
        for (int i = 0; i < 8; i++) begin ao |= m_open[i]; if (m_busy[i] != 0) ar = 0; end
        check(any_open == ao, "any_open");
        check(all_ready == ar, "all_ready");
      end
      up_idx  = 3'($urandom);
      up_row  = 12'($urandom);
      up_busy = 5'($urandom % 13);
      up_open = (op < 3); up_close = (op == 3 || op == 4); up_close_all = (op == 5);
      @(posedge clk);
      for (int i = 0; i < 8; i++) if (m_busy[i] != 0) m_busy[i]--;
      if (up_open) begin
        m_open[up_idx] = 1; m_row[up_idx] = up_row; m_busy[up_idx] = int'(up_busy); n_open++;
      end else if (up_close) begin
        m_open[up_idx] = 0; m_busy[up_idx] = int'(up_busy); n_close++;
      end else if (up_close_all) begin
        for (int i = 0; i < 8; i++) begin m_open[i] = 0; m_busy[i] = int'(up_busy); end
        n_all++;
      end
      @(negedge clk);
      {up_open, up_close, up_close_all} = '0;
    end
    check(n_open > 0 && n_close > 0 && n_all > 0, "every update kind used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
