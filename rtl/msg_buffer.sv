// msg_buffer: the message buffer of one input channel of the central station.
//
// A small FIFO (DEPTH = 4 in the document's configuration) that captures every
// message arriving on the channel. The optical channel has no back-pressure, so
// a message that arrives while the buffer is full is dropped and the sticky
// lost_o flag is set (this design's choice; the document gives no rule).
// A message written at a clock edge can be read from the next cycle on.
// Read side: valid/ready (pop on valid_o && pop_i).
module msg_buffer
  import barrier_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  chan_t in_i,
  output logic  valid_o,
  output msg_t  msg_o,
  input  logic  pop_i,
  output logic  lost_o
);
  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH);
  msg_t          mem_q [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          full, push, pop;

  assign full    = (cnt_q == (AW+1)'(DEPTH));
  assign valid_o = (cnt_q != '0);
  assign msg_o   = mem_q[rd_q];
  assign pop     = pop_i && valid_o;
  assign push    = in_i.valid && (!full || pop);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= '0;
      wr_q   <= '0;
      cnt_q  <= '0;
      lost_o <= 1'b0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
      if (in_i.valid && !push) lost_o <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wr_q] <= in_i.msg;
  end
endmodule
