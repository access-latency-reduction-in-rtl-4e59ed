// tb_addr_remap: self-checking testbench of the address remapping unit.
//
// For random addresses and every scheme it compares group, bank, row and
// column with values built here from the bit positions of the default
// organisation (27-bit address, 4 KB page, 4 banks, 2 groups, L2 tag from
// bit 18).  It also checks two properties of every scheme: the mapping is a
// bijection on a sampled set (two different lines never share group, bank,
// row and column), and addresses of one page stay in one page.  Finally it
// checks the intent of the schemes: two addresses with the same L2 index and
// tags that differ only in their lowest bits never land in different rows of
// the same bank.
module tb_addr_remap;
  import dram_pkg::*;

  logic [26:0] addr;
  map_scheme_e scheme;
  logic [0:0]  group;
  logic [1:0]  bank;
  logic [11:0] row;
  logic [7:0]  col;

  addr_remap dut (.*);

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [22:0] expect_map(logic [26:0] a, map_scheme_e s);
    logic g; logic [1:0] b; logic [11:0] r;
    case (s)
      MAP_RGRBC:  begin g = a[18];         b = a[13:12];            r = {a[26:19], a[17:14]}; end
      MAP_RGRBCX: begin g = a[18];         b = a[13:12] ^ a[20:19]; r = {a[26:19], a[17:14]}; end
      MAP_RBRGC:  begin g = a[12];         b = a[19:18];            r = {a[26:20], a[17:13]}; end
      MAP_RBGBCX: begin g = a[12] ^ a[20]; b = a[19:18];            r = {a[26:20], a[17:13]}; end
      default:    begin g = a[20];         b = a[19:18];            r = {a[26:21], a[17:12]}; end
    endcase
    return {g, b, r, a[11:4]};
  endfunction

  bit seen [logic [22:0]];

  initial begin
    for (int s = 0; s < 5; s++) begin
      scheme = map_scheme_e'(s);
      seen.delete();
      for (int n = 0; n < 4000; n++) begin
        automatic logic [22:0] e;
        automatic logic [22:0] got;
        addr = 27'($urandom);
        #1;
        e   = expect_map(addr, scheme);
        got = {group, bank, row, col};
        check(got == e, $sformatf("%s addr %h: got %h expected %h", scheme.name(), addr, got, e));
        // same page: flip a column bit, only the column may change
        addr[4 + ($urandom % 8)] ^= 1'b1;
        #1;
        check({group, bank, row} == got[22:8], $sformatf("%s: page split at %h", scheme.name(), addr));
      end
      // bijection over the line addresses of a window
      for (int n = 0; n < 4096; n++) begin
        addr = 27'(n) << 7 | 27'(n % 7) << 20;
        #1;
        check(!seen.exists({group, bank, row, col}), $sformatf("%s: two lines map to one place", scheme.name()));
        seen[{group, bank, row, col}] = 1;
      end
      // L2 conflicts that differ in the lowest tag bit must not be row conflicts
      for (int n = 0; n < 500; n++) begin
        automatic logic [26:0] a0 = 27'($urandom);
        automatic logic [22:0] m0, m1;
        addr = a0; #1; m0 = {group, bank, row, col};
        addr = a0 ^ 27'(1 << 18); #1; m1 = {group, bank, row, col};
        check(m0[22:20] != m1[22:20], $sformatf("%s: L2 conflict pair in one bank", scheme.name()));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
