// nile_act_queue: the activation queue of the Nile Action Unit.
//
// A synchronous FIFO of activation packets, DEPTH entries deep, held in a
// circular buffer with read and write pointers and an occupancy counter.
// A packet is written when in_valid && in_ready and read when
// out_valid && out_ready; both may happen in one cycle, also when full
// (then the write waits: in_ready is low) or empty (the packet is first
// stored, out_valid rises the next cycle).
//
// Follows the published Nile design: the queue stores incoming activation packets and the
// control unit dequeues one while it is not empty. Own choice: DEPTH = 8,
// which the published design does not give.
module nile_act_queue
  import nile_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  act_pkt_t in_pkt,
  output logic     out_valid,
  input  logic     out_ready,
  output act_pkt_t out_pkt,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  act_pkt_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic push, pop;

  assign in_ready  = level != DEPTH[$clog2(DEPTH+1)-1:0];
  assign out_valid = level != '0;
  assign out_pkt   = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      if (push && !pop) level <= level + 1'b1;
      else if (pop && !push) level <= level - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_pkt;
  end

endmodule
