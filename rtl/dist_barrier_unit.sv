// dist_barrier_unit: the per-core barrier unit of the distributed protocol.
//
// It joins the blocks of the document's barrier-unit diagram: the barrier-id
// comparators behind the detectors, the ENTRY message counter (adder tree), the
// minimum thread id detector (comparator tree, shared between election and
// co-ordinator transfer), and three controllers: barrier-wait, co-ordinator and
// context-swap. The optical modulator and detectors are outside: tx_o is what
// the unit puts on its own channel and rx_i is every channel as detected.
//
// Timing. All units keep the same cycle count; a round is M cycles and starts
// when the count is a multiple of M (M = 2 in the document). The message chosen
// at the end of a round is held on tx_o for the whole next round. Received
// messages are evaluated combinationally and the controllers act at the last
// cycle of the round, so a message sent in round r is answered in round r+1.
// With a co-ordinator present, a barrier_wait() accepted in round 0 sends ENTRY
// in round 1, the co-ordinator answers RELEASE in round 2, and rel_valid_o
// pulses at the end of round 2: three rounds, six cycles.
//
// Only one message can be sent per round. Priority: RELEASE, COUNT, TRANSFER,
// ACCEPT, REPLY, ENTRY; the controllers are arranged so that two of them never
// need the same round, except COUNT over ACCEPT, where COUNT acknowledges too.
// The memory port is shared by the co-ordinator (priority) and the
// context-swap controller.
//
// This design's own choices: the co-ordinator keeps its role after a release
// (so the next instance needs no election), and gives it up when its thread
// waits on a different barrier; that request is held off (wait_ready_o low)
// until the co-ordinator is idle.
module dist_barrier_unit
  import barrier_pkg::*;
#(
  parameter int unsigned N     = 64,   // barrier units on the network
  parameter int unsigned SELF  = 0,    // this unit's channel
  parameter int unsigned M     = 2,    // cycles per round
  parameter int unsigned TAU_W = 200   // cycles before a memory read after election / swap in
) (
  input  logic           clk,
  input  logic           rst_n,
  // optical network
  input  chan_t [N-1:0]  rx_i,
  output chan_t          tx_o,
  // core: barrier_wait() and release
  input  logic           wait_valid_i,
  output logic           wait_ready_o,
  input  bar_ctx_t       wait_ctx_i,
  output logic           rel_valid_o,
  output logic           rel_sense_o,
  // core: context switches
  input  logic           so_req_i,
  output logic           so_done_o,
  output bar_ctx_t       so_ctx_o,
  input  logic           si_valid_i,
  output logic           si_ready_o,
  input  bar_ctx_t       si_ctx_i,
  // memory word of the barrier (count and sense)
  output logic           mem_req_valid_o,
  input  logic           mem_req_ready_i,
  output mem_req_t       mem_req_o,
  input  logic           mem_rsp_valid_i,
  input  mem_rsp_t       mem_rsp_i,
  // status
  output logic           is_coord_o,
  output logic [CNT_W-1:0] coord_count_o
);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned PW = (M < 2) ? 1 : $clog2(M);

  // ---------------------------------------------------------------- round timer
  logic [PW-1:0] phase_q;
  logic          round_end;
  assign round_end = (M < 2) ? 1'b1 : (phase_q == PW'(M - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase_q <= '0;
    else if (round_end) phase_q <= '0;
    else                phase_q <= phase_q + 1'b1;
  end

  // ---------------------------------------------------------------- receive side
  bar_ctx_t                bw_ctx;
  logic                    bw_busy, bw_waiting;
  logic                    is_coord;
  logic [N-1:0]            entry_v, reply_v;
  logic [N-1:0][TID_W-1:0] tids;
  logic                    got_accept, got_release, got_transfer, got_count;
  logic [TID_W-1:0]        count_val;
  logic [NW-1:0]           n_entry;
  logic                    sel_reply, min_any;
  logic [TID_W-1:0]        min_tid;
  logic [N-1:0]            self_mask;

  assign self_mask = N'(1) << SELF;

  bid_comparators #(.N(N)) u_cmp (
    .rx_i(rx_i), .self_mask_i(self_mask), .en_i(bw_waiting || bw_busy || is_coord),
    .bid_i(bw_ctx.bid), .entry_o(entry_v), .reply_o(reply_v), .tid_o(tids),
    .accept_o(got_accept), .release_o(got_release), .transfer_o(got_transfer),
    .count_o(got_count), .count_val_o(count_val));

  entry_counter #(.N(N)) u_cnt (.bits_i(entry_v), .sum_o(n_entry));

  min_tid_detector #(.N(N)) u_min (
    .valid_i(sel_reply ? reply_v : entry_v), .tid_i(tids), .any_o(min_any), .min_o(min_tid));

  // ---------------------------------------------------------------- controllers
  logic             tx_entry, self_arrive, elect, elect_trans, drop;
  logic [CNT_W-1:0] elect_cnt, co_count, co_count_next;
  logic             co_idle, co_tx_release, co_tx_accept, self_release;
  logic             hold, ld_valid, clear, swap_release;
  logic             cs_tx_transfer, cs_tx_reply, cs_tx_count;
  logic [TID_W-1:0] cs_field;
  logic             co_mem_valid, cs_mem_valid;
  mem_req_t         co_mem_req, cs_mem_req;
  logic             co_rd_pending, cs_rd_pending;

  // A co-ordinator whose thread now waits on another barrier gives up the
  // role. This is allowed only while the co-ordinator is idle (after a release
  // its count is 0 and the memory already holds the new sense); until then the
  // new request is held off.
  logic bw_ready, leave_diff, leave_block, leave;
  assign leave_diff  = is_coord &&
                       ({wait_ctx_i.bid.addr, wait_ctx_i.bid.pid} != {bw_ctx.bid.addr, bw_ctx.bid.pid});
  assign leave_block = leave_diff && !co_idle;
  assign leave       = wait_valid_i && bw_ready && leave_diff && !leave_block;
  assign wait_ready_o = bw_ready && !leave_block;

  barrier_wait_fsm #(.NW(NW)) u_bw (
    .clk(clk), .rst_n(rst_n), .round_end_i(round_end),
    .wait_valid_i(wait_valid_i && !leave_block), .wait_ready_o(bw_ready), .wait_ctx_i(wait_ctx_i),
    .ld_valid_i(ld_valid), .ld_ctx_i(si_ctx_i), .clear_i(clear), .ctx_o(bw_ctx),
    .busy_rounds_o(bw_busy), .waiting_o(bw_waiting),
    .n_entry_i(n_entry), .min_any_i(min_any && !sel_reply), .min_tid_i(min_tid),
    .got_accept_i(got_accept), .got_release_i(got_release),
    .is_coord_i(is_coord), .self_release_i(self_release), .swap_release_i(swap_release),
    .hold_i(hold), .tx_entry_o(tx_entry), .self_arrive_o(self_arrive),
    .elect_o(elect), .elect_cnt_o(elect_cnt),
    .rel_valid_o(rel_valid_o), .rel_sense_o(rel_sense_o));

  coordinator_fsm #(.NW(NW), .TAU_W(TAU_W)) u_co (
    .clk(clk), .rst_n(rst_n), .round_end_i(round_end),
    .bid_i(bw_ctx.bid), .capacity_i(bw_ctx.capacity),
    .elect_i(elect), .elect_cnt_i(elect_cnt), .elect_trans_i(elect_trans), .drop_i(drop || leave),
    .n_entry_i(n_entry), .self_arrive_i(self_arrive),
    .got_count_i(got_count), .count_val_i(count_val),
    .is_coord_o(is_coord), .idle_o(co_idle), .count_o(co_count), .count_next_o(co_count_next),
    .tx_release_o(co_tx_release), .tx_accept_o(co_tx_accept), .self_release_o(self_release),
    .mem_req_valid_o(co_mem_valid), .mem_req_ready_i(mem_req_ready_i), .mem_req_o(co_mem_req),
    .mem_rsp_valid_i(mem_rsp_valid_i && co_rd_pending), .mem_rsp_i(mem_rsp_i));

  context_swap_fsm #(.TAU_W(TAU_W)) u_cs (
    .clk(clk), .rst_n(rst_n), .round_end_i(round_end),
    .so_req_i(so_req_i), .so_done_o(so_done_o), .so_ctx_o(so_ctx_o),
    .si_valid_i(si_valid_i), .si_ready_o(si_ready_o), .si_ctx_i(si_ctx_i),
    .bw_ctx_i(bw_ctx), .bw_busy_rounds_i(bw_busy), .bw_waiting_i(bw_waiting),
    .hold_o(hold), .ld_valid_o(ld_valid), .clear_o(clear), .swap_release_o(swap_release),
    .is_coord_i(is_coord), .co_idle_i(co_idle), .co_count_i(co_count),
    .co_count_next_i(co_count_next), .co_tx_release_i(co_tx_release),
    .drop_o(drop), .elect_trans_o(elect_trans),
    .got_transfer_i(got_transfer), .min_any_i(min_any && sel_reply), .min_tid_i(min_tid),
    .sel_reply_o(sel_reply), .tx_transfer_o(cs_tx_transfer), .tx_reply_o(cs_tx_reply),
    .tx_count_o(cs_tx_count), .tx_field_o(cs_field),
    .mem_req_valid_o(cs_mem_valid), .mem_req_ready_i(mem_req_ready_i && !co_mem_valid),
    .mem_req_o(cs_mem_req),
    .mem_rsp_valid_i(mem_rsp_valid_i && cs_rd_pending), .mem_rsp_i(mem_rsp_i));

  // ---------------------------------------------------------------- memory port
  assign mem_req_valid_o = co_mem_valid || cs_mem_valid;
  assign mem_req_o       = co_mem_valid ? co_mem_req : cs_mem_req;

  // Route read data to whoever issued the read (one read outstanding at most).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      co_rd_pending <= 1'b0;
      cs_rd_pending <= 1'b0;
    end else begin
      if (mem_rsp_valid_i) begin
        co_rd_pending <= 1'b0;
        cs_rd_pending <= 1'b0;
      end
      if (mem_req_ready_i && co_mem_valid && !co_mem_req.write) co_rd_pending <= 1'b1;
      else if (mem_req_ready_i && !co_mem_valid && cs_mem_valid && !cs_mem_req.write)
        cs_rd_pending <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- transmit side
  chan_t tx_q, tx_d;
  always_comb begin
    tx_d       = '0;
    tx_d.valid = 1'b1;
    if      (co_tx_release)  tx_d.msg = mk_msg(MSG_RELEASE,  bw_ctx.bid, '0);
    else if (cs_tx_count)    tx_d.msg = mk_msg(MSG_COUNT,    bw_ctx.bid, cs_field);
    else if (cs_tx_transfer) tx_d.msg = mk_msg(MSG_TRANSFER, bw_ctx.bid, cs_field);
    else if (co_tx_accept)   tx_d.msg = mk_msg(MSG_ACCEPT,   bw_ctx.bid, '0);
    else if (cs_tx_reply)    tx_d.msg = mk_msg(MSG_REPLY,    bw_ctx.bid, cs_field);
    else if (tx_entry)       tx_d.msg = mk_msg(MSG_ENTRY,    bw_ctx.bid, bw_ctx.tid);
    else                     tx_d.valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         tx_q <= '0;
    else if (round_end) tx_q <= tx_d;
  end
  assign tx_o = tx_q;

  assign is_coord_o    = is_coord;
  assign coord_count_o = co_count;

  // Controllers never need the memory port for two reads at once.
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(co_rd_pending && cs_rd_pending));
endmodule
