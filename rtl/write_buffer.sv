// write_buffer: the L2 cache's write buffer in front of the DRAM controller.
//
// The L2 cache writes dirty lines back to memory through this buffer: four
// entries, each one full 128 B L2 line plus its address.  It is a FIFO: the
// oldest entry (the head) is offered to the controller, which reads its data
// one memory-bus beat at a time during the write burst (`head_beat` for beat
// `beat_idx`, combinational) and pops the entry when the burst is done.  The
// head is never overwritten while it is being written out.
//
// A second, combinational port compares a read address with every valid entry
// (`q_hit`): a read of a line that still waits in the buffer must not go to
// the DRAM before the buffered write.  That check and everything about the
// handshakes (valid/ready push, pop strobe) are this design's choices; the
// buffer size and the entry size follow the evaluated system.
module write_buffer #(
  parameter int unsigned DEPTH      = 4,
  parameter int unsigned ADDR_BITS  = dram_pkg::D_ADDR_BITS,
  parameter int unsigned LINE_BYTES = dram_pkg::D_LINE_BYTES,
  parameter int unsigned DATA_BITS  = dram_pkg::D_DATA_BITS,
  localparam int unsigned BEATS     = LINE_BYTES * 8 / DATA_BITS,
  localparam int unsigned OFS_BITS  = $clog2(LINE_BYTES)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // push side (L2 write-back)
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic [ADDR_BITS-1:0]                in_addr,
  input  logic [BEATS-1:0][DATA_BITS-1:0]     in_line,
  // head side (DRAM controller)
  output logic                                head_valid,
  output logic [ADDR_BITS-1:0]                head_addr,
  input  logic [$clog2(BEATS)-1:0]            beat_idx,
  output logic [DATA_BITS-1:0]                head_beat,
  input  logic                                pop,
  // address match for reads
  input  logic [ADDR_BITS-1:0]                q_addr,
  output logic                                q_hit,
  // status
  output logic                                full,
  output logic [$clog2(DEPTH+1)-1:0]          count
);

  localparam int unsigned PTR = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_BITS-1:0]             mem [DEPTH][BEATS];
  logic [DEPTH-1:0][ADDR_BITS-1:0]  addr_q;
  logic [DEPTH-1:0]                 valid_q;
  logic [PTR-1:0]                   wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0]       cnt_q;
  logic                             do_push, do_pop;

  function automatic logic [PTR-1:0] inc(logic [PTR-1:0] p);
    return (p == PTR'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full       = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));
  assign count      = cnt_q;
  assign in_ready   = !full;
  assign do_push    = in_valid && in_ready;
  assign do_pop     = pop && head_valid;
  assign head_valid = valid_q[rd_ptr];
  assign head_addr  = addr_q[rd_ptr];
  assign head_beat  = mem[rd_ptr][beat_idx];

  always_ff @(posedge clk) begin
    if (do_push)
      for (int b = 0; b < BEATS; b++) mem[wr_ptr][b] <= in_line[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      valid_q <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      cnt_q   <= '0;
    end else begin
      if (do_push) begin
        addr_q[wr_ptr]  <= in_addr;
        valid_q[wr_ptr] <= 1'b1;
        wr_ptr          <= inc(wr_ptr);
      end
      if (do_pop) begin
        valid_q[rd_ptr] <= 1'b0;
        rd_ptr          <= inc(rd_ptr);
      end
      cnt_q <= cnt_q + ($bits(cnt_q))'(do_push) - ($bits(cnt_q))'(do_pop);
    end
  end

  always_comb begin
    q_hit = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (valid_q[i] && addr_q[i][ADDR_BITS-1:OFS_BITS] == q_addr[ADDR_BITS-1:OFS_BITS])
        q_hit = 1'b1;
  end

  // a push into a full buffer or a pop of an empty one is a protocol error
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
  a_push_hold:    assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid && !in_ready |=> in_valid && $stable(in_addr));

endmodule
