// central_station: the central station of the centralized barrier protocol.
//
// Every core's barrier unit sends REGISTER (barrier_init) and ENTRY
// (barrier_wait) messages to it over NCH optical input channels. Each channel
// has a message buffer (BUF_DEPTH messages). The message controller takes one
// buffered message per cycle and feeds the barrier-buffer pipeline either
// directly or through the message queue. The barrier buffer (a CAM of ENTRIES
// barriers) counts arrivals and, when a barrier is complete, sends RELEASE on
// the station's own output channel, which all barrier units read, and writes the
// flipped sense to the barrier's memory word. Sizes as in the document's
// evaluation: 16 channels, 4 buffers per channel, 32 barrier entries.
//
// Latency with empty buffers and queue: a message on an input channel at cycle
// t is in its buffer at t+1, in pipeline stage 1 at t+2, in stage 2 at t+3, and
// the RELEASE it completes is on rel_o from t+4.
module central_station
  import barrier_pkg::*;
#(
  parameter int unsigned NCH       = 16,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned Q_DEPTH   = 16,
  parameter int unsigned ENTRIES   = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  chan_t [NCH-1:0]       in_i,
  output chan_t                 rel_o,
  output logic                  mem_wr_valid_o,
  output mem_req_t              mem_wr_o,
  output logic                  overflow_o,
  output logic                  spill_valid_o,
  output msg_t                  spill_msg_o,
  output logic                  miss_valid_o,
  output msg_t                  miss_msg_o,
  output logic [NCH-1:0]        lost_o,
  output logic [$clog2(Q_DEPTH+1)-1:0] queue_size_o,
  output logic                  bypass_o,
  output logic                  stall_o
);
  logic [NCH-1:0] bvalid, bpop;
  msg_t [NCH-1:0] bmsg;

  for (genvar c = 0; c < NCH; c++) begin : g_buf
    msg_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk(clk), .rst_n(rst_n), .in_i(in_i[c]), .valid_o(bvalid[c]), .msg_o(bmsg[c]),
      .pop_i(bpop[c]), .lost_o(lost_o[c]));
  end

  logic qpush_v, qpush_r, qpop_v, qpop_r, pipe_v, pipe_r;
  msg_t qpush_m, qpop_m, pipe_m;

  message_controller #(.NCH(NCH)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .buf_valid_i(bvalid), .buf_msg_i(bmsg), .buf_pop_o(bpop),
    .q_push_valid_o(qpush_v), .q_push_ready_i(qpush_r), .q_push_msg_o(qpush_m),
    .q_pop_valid_i(qpop_v), .q_pop_ready_o(qpop_r), .q_pop_msg_i(qpop_m),
    .pipe_valid_o(pipe_v), .pipe_ready_i(pipe_r), .pipe_msg_o(pipe_m), .bypass_o(bypass_o));

  message_queue #(.DEPTH(Q_DEPTH)) u_queue (
    .clk(clk), .rst_n(rst_n),
    .push_valid_i(qpush_v), .push_ready_o(qpush_r), .push_msg_i(qpush_m),
    .pop_valid_o(qpop_v), .pop_ready_i(qpop_r), .pop_msg_o(qpop_m), .size_o(queue_size_o));

  logic [$clog2(ENTRIES+1)-1:0] used;
  barrier_buffer #(.ENTRIES(ENTRIES)) u_bb (
    .clk(clk), .rst_n(rst_n), .in_valid_i(pipe_v), .in_ready_o(pipe_r), .in_msg_i(pipe_m),
    .rel_o(rel_o), .mem_wr_valid_o(mem_wr_valid_o), .mem_wr_o(mem_wr_o),
    .overflow_o(overflow_o), .spill_valid_o(spill_valid_o), .spill_msg_o(spill_msg_o),
    .miss_valid_o(miss_valid_o), .miss_msg_o(miss_msg_o), .stall_o(stall_o), .used_o(used));
endmodule
