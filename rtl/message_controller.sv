// message_controller: the message controller of the central station.
//
// Each cycle it picks one non-empty input message buffer, round-robin, and
// moves its head message towards the barrier-buffer pipeline. When the message
// queue is empty and the pipeline can take a message, the message goes to the
// pipeline directly (bypass); otherwise it is appended to the queue. The queue
// head has priority for the pipeline. The document names both paths; the
// round-robin choice and one message per cycle are this design's choices.
// Combinational; buffer pops and queue pushes take effect at the next edge.
module message_controller
  import barrier_pkg::*;
#(
  parameter int unsigned NCH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // message buffers
  input  logic [NCH-1:0]       buf_valid_i,
  input  msg_t [NCH-1:0]       buf_msg_i,
  output logic [NCH-1:0]       buf_pop_o,
  // message queue
  output logic                 q_push_valid_o,
  input  logic                 q_push_ready_i,
  output msg_t                 q_push_msg_o,
  input  logic                 q_pop_valid_i,
  output logic                 q_pop_ready_o,
  input  msg_t                 q_pop_msg_i,
  // pipeline
  output logic                 pipe_valid_o,
  input  logic                 pipe_ready_i,
  output msg_t                 pipe_msg_o,
  output logic                 bypass_o          // a message took the direct path
);
  localparam int unsigned IW = (NCH < 2) ? 1 : $clog2(NCH);
  logic [IW-1:0] last_q;
  logic          found;
  logic [IW-1:0] sel;

  // round-robin: first valid buffer after the last one served
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 1; k <= int'(NCH); k++) begin
      int idx;
      idx = (int'(last_q) + k) % int'(NCH);
      if (!found && buf_valid_i[idx]) begin
        found = 1'b1;
        sel   = IW'(idx);
      end
    end
  end

  always_comb begin
    buf_pop_o      = '0;
    q_push_valid_o = 1'b0;
    q_push_msg_o   = buf_msg_i[sel];
    q_pop_ready_o  = 1'b0;
    pipe_valid_o   = 1'b0;
    pipe_msg_o     = q_pop_msg_i;
    bypass_o       = 1'b0;
    if (q_pop_valid_i) begin
      pipe_valid_o  = 1'b1;
      q_pop_ready_o = pipe_ready_i;
      if (found && q_push_ready_i) begin
        q_push_valid_o = 1'b1;
        buf_pop_o[sel] = 1'b1;
      end
    end else if (found) begin
      if (pipe_ready_i) begin
        pipe_valid_o   = 1'b1;
        pipe_msg_o     = buf_msg_i[sel];
        bypass_o       = 1'b1;
        buf_pop_o[sel] = 1'b1;
      end else if (q_push_ready_i) begin
        q_push_valid_o = 1'b1;
        buf_pop_o[sel] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= IW'(NCH - 1);
    else if (buf_pop_o != '0)  last_q <= sel;
  end
endmodule
