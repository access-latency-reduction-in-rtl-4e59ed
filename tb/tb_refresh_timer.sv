// tb_refresh_timer: self-checking testbench of the refresh timer.
//
// Runs the timer at a short interval (40 cycles) and checks that a request
// appears exactly every interval, that it stays up until acknowledged, and
// that deadlines missed while the engine is slow to answer are kept: after a
// long stall, as many acknowledges are needed as intervals went by.
module tb_refresh_timer;
  localparam int unsigned IV = 40;
  logic clk = 0, rst_n = 0, ref_ack = 0, ref_req;
  always #5 clk = ~clk;

  refresh_timer #(.T_REFI(IV)) dut (.*);

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last = 0;
  always @(posedge clk) cyc++;

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // first request exactly IV cycles after reset; acknowledge at once
    for (int k = 0; k < 10; k++) begin
      while (!ref_req) @(negedge clk);
      if (k > 0) check(cyc - last == IV, $sformatf("interval %0d cycles", cyc - last));
      last = cyc;
      ref_ack = 1; @(negedge clk); ref_ack = 0;
      check(!ref_req, "request dropped after acknowledge");
    end
    // stall for three and a half intervals after the next request: it must stay up
    while (!ref_req) @(negedge clk);
    for (int c = 0; c < IV * 7 / 2; c++) begin
      @(negedge clk);
      check(ref_req, "request held while not acknowledged");
    end
    // three or four deadlines pending: acknowledge until it drops
    t = 0;
    while (ref_req && t < 10) begin
      ref_ack = 1; @(negedge clk); t++;
    end
    ref_ack = 0;
    check(t == 4, $sformatf("%0d pending refreshes served, expected 4", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
