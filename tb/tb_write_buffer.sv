// tb_write_buffer: self-checking testbench of the L2 write buffer.
//
// Pushes random lines and pops them at random times, comparing the head
// address, every beat of the head line, the count, the full flag and the
// read-address match with a reference FIFO (SystemVerilog queue).  Checks
// that the buffer refuses a fifth line while it holds four.
module tb_write_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid, in_ready, head_valid, pop, q_hit, full;
  logic [26:0]        in_addr, head_addr, q_addr;
  logic [7:0][127:0]  in_line;
  logic [2:0]         beat_idx;
  logic [127:0]       head_beat;
  logic [2:0]         count;

  write_buffer dut (.*);

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

  typedef struct { logic [26:0] a; logic [7:0][127:0] d; } ent_t;
  ent_t q [$];
  bit hold = 0, accepted;
  int n_full = 0, n_refused = 0, n_qhit = 0;

  initial begin
    in_valid = 0; pop = 0; in_addr = 0; in_line = '0; beat_idx = 0; q_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // compare the state
      check(count == 3'(q.size()), "count");
      check(full == (q.size() == 4), "full flag");
      check(in_ready == (q.size() < 4), "in_ready");
      check(head_valid == (q.size() > 0), "head_valid");
      if (q.size() > 0) begin
        check(head_addr == q[0].a, "head address");
        for (int b = 0; b < 8; b++) begin
          beat_idx = 3'(b); #0.1;
          check(head_beat == q[0].d[b], $sformatf("head beat %0d", b));
        end
      end
      // read-address match
      begin
        automatic bit e = 0;
        q_addr = (q.size() > 0 && $urandom % 2) ? q[$urandom % q.size()].a ^ 27'($urandom % 128)
                                                : 27'($urandom) & 27'h000FF80;
        #0.1;
        foreach (q[i]) if (q[i].a[26:7] == q_addr[26:7]) e = 1;
        check(q_hit == e, "read address match");
        if (e) n_qhit++;
      end
      // next operation
      if (!hold) begin
        in_valid = ($urandom % 2) == 0;
        in_addr  = 27'($urandom) & 27'h7FFFF80;
        for (int b = 0; b < 8; b++) in_line[b] = {$urandom, $urandom, $urandom, $urandom};
      end
      pop      = (q.size() > 0) && ($urandom % 3 == 0);
      #0.1;
      accepted = in_valid && !full;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (accepted) begin
        automatic ent_t e; e.a = in_addr; e.d = in_line; q.push_back(e);
      end else if (in_valid) n_refused++;
      hold = in_valid && !accepted;   // a refused line is offered again, unchanged
      if (q.size() == 4) n_full++;
      @(negedge clk);
      if (!hold) in_valid = 0;
      pop = 0;
    end
    check(n_full > 0, "buffer never full");
    check(n_refused > 0, "push never refused");
    check(n_qhit > 0, "no read address match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
