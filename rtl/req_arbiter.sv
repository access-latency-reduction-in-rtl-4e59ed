// req_arbiter: picks the next request for the DRAM command engine.
//
// Two sources compete: a read miss from the L2 cache and the head of the
// write buffer.  Reads go first, since the processor waits for them and the
// write buffer exists to take writes off the critical path, with two
// exceptions: when the write buffer is full, or when the read asks for a line
// that is still waiting in the buffer, the buffered write goes first.  The
// ordering rule is this design's choice.
//
// Interface: combinational.  The selected request is offered on
// `req_valid/req_write/req_addr`; when the engine takes it (`req_ready`),
// the read source sees `rd_ready`.  A granted write is popped from the write
// buffer by the engine only when its burst is finished, so the arbiter does
// not acknowledge the write source here.
module req_arbiter #(
  parameter int unsigned ADDR_BITS = dram_pkg::D_ADDR_BITS
) (
  // read miss from L2
  input  logic                 rd_valid,
  output logic                 rd_ready,
  input  logic [ADDR_BITS-1:0] rd_addr,
  // write buffer head
  input  logic                 wb_valid,
  input  logic [ADDR_BITS-1:0] wb_addr,
  input  logic                 wb_full,
  input  logic                 wb_conflict,   // rd_addr matches a buffered line
  // to the command engine
  output logic                 req_valid,
  output logic                 req_write,
  output logic [ADDR_BITS-1:0] req_addr,
  input  logic                 req_ready
);

  logic pick_write;

  always_comb begin
    pick_write = wb_valid && (!rd_valid || wb_full || wb_conflict);
    req_valid  = rd_valid || wb_valid;
    req_write  = pick_write;
    req_addr   = pick_write ? wb_addr : rd_addr;
    rd_ready   = req_ready && rd_valid && !pick_write;
  end

endmodule
