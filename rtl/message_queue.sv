// message_queue: the message queue of the central station, between the message
// controller and the barrier-buffer pipeline.
//
// A FIFO of DEPTH messages with valid/ready on both sides and its current
// occupancy on size_o (the "queue size" register in the document's diagram).
// The document gives no depth; 16 is this design's choice. A message pushed at
// a clock edge is at the head from the next cycle on.
module message_queue
  import barrier_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push_valid_i,
  output logic                     push_ready_o,
  input  msg_t                     push_msg_i,
  output logic                     pop_valid_o,
  input  logic                     pop_ready_i,
  output msg_t                     pop_msg_o,
  output logic [$clog2(DEPTH+1)-1:0] size_o
);
  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH);
  localparam int unsigned SW = $clog2(DEPTH + 1);
  msg_t          mem_q [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [SW-1:0] cnt_q;
  logic          push, pop;

  assign push_ready_o = (cnt_q != SW'(DEPTH));
  assign pop_valid_o  = (cnt_q != '0);
  assign pop_msg_o    = mem_q[rd_q];
  assign push         = push_valid_i && push_ready_o;
  assign pop          = pop_ready_i && pop_valid_o;
  assign size_o       = cnt_q;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + SW'(push) - SW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wr_q] <= push_msg_i;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push_valid_i |-> push_ready_o)
    else $error("message queue full");
endmodule
