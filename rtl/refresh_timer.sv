// refresh_timer: periodic refresh request for the DRAM controller.
//
// A free-running down-counter reloads with T_REFI every time it reaches zero
// and then sets `ref_req`.  The request stays high until the command engine
// answers with a one-cycle `ref_ack` after it has issued the refresh; a
// deadline that passes while a request is still pending is counted (up to
// seven), so no refresh is lost when the engine is busy
// for longer than one interval.  The interval is this design's choice: 64 ms
// for 4096 rows at a 100 MHz bus clock, about 1560 cycles.
module refresh_timer #(
  parameter int unsigned T_REFI = dram_pkg::D_T_REFI
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_ack,
  output logic ref_req
);

  logic [$clog2(T_REFI+1)-1:0] cnt_q;
  logic [2:0]                  backlog_q;   // deadlines not yet served
  logic                        tick;

  assign tick    = (cnt_q == '0);
  assign ref_req = (backlog_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= ($clog2(T_REFI+1))'(T_REFI - 1);
      backlog_q <= '0;
    end else begin
      cnt_q <= tick ? ($clog2(T_REFI+1))'(T_REFI - 1) : cnt_q - 1'b1;
      unique case ({tick, ref_ack && ref_req})
        2'b10:   if (backlog_q != '1) backlog_q <= backlog_q + 1'b1;
        2'b01:   backlog_q <= backlog_q - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
