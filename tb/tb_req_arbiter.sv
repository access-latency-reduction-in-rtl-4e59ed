// tb_req_arbiter: self-checking testbench of the read / write-buffer arbiter.
//
// Walks through every combination of the arbiter's inputs (read valid, write
// buffer valid, full, conflict, engine ready) with random addresses and
// compares the choice, the offered address and the read acknowledge with
// the ordering rule: reads first, unless the buffer is full or the read hits
// a buffered line.
module tb_req_arbiter;
  logic        rd_valid, rd_ready, wb_valid, wb_full, wb_conflict;
  logic        req_valid, req_write, req_ready;
  logic [26:0] rd_addr, wb_addr, req_addr;

  req_arbiter dut (.*);

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rd_first = 0, n_full_first = 0, n_conflict_first = 0;

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int v = 0; v < 32; v++) begin
        automatic bit wr;
        {rd_valid, wb_valid, wb_full, wb_conflict, req_ready} = 5'(v);
        rd_addr = 27'($urandom); wb_addr = 27'($urandom);
        #1;
        wr = wb_valid && (!rd_valid || wb_full || wb_conflict);
        check(req_valid == (rd_valid || wb_valid), "req_valid");
        if (req_valid) begin
          check(req_write == wr, $sformatf("choice for inputs %b", 5'(v)));
          check(req_addr == (wr ? wb_addr : rd_addr), "offered address");
        end
        check(rd_ready == (req_ready && rd_valid && !wr), "read acknowledge");
        if (rd_valid && wb_valid && !wr) n_rd_first++;
        if (rd_valid && wb_valid && wb_full && wr) n_full_first++;
        if (rd_valid && wb_valid && wb_conflict && !wb_full && wr) n_conflict_first++;
      end
    check(n_rd_first > 0 && n_full_first > 0 && n_conflict_first > 0, "every ordering case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
