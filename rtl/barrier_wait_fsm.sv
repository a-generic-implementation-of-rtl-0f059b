// barrier_wait_fsm: the controller of a distributed barrier unit that handles
// barrier_wait() for the thread running on the core: ENTRY, ACCEPT and RELEASE.
//
// It holds the thread's barrier state (barrier id with the local sense,
// capacity, thread id). A wait request is latched at any cycle (PEND). At the
// next round boundary the unit either counts itself (when it is the
// co-ordinator) or broadcasts ENTRY during the following round (E1). Over that
// round and the next (E2) it accumulates the number and the minimum thread id
// of the other ENTRY messages, and watches for an acknowledgement. If none came
// by the end of E2 and its own thread id is the smallest it has seen, it
// declares itself co-ordinator with count = entries seen + 1, as in the
// document's election. A unit that lost the election waits one more round (E3)
// for the winner's ACCEPT and re-sends ENTRY if it does not arrive: this retry
// is this design's addition, it keeps a unit whose ENTRY fell outside the
// winner's two-round window from being lost. RELEASE (from the network, from
// the co-ordinator in this unit, or from the swap-in sense check) flips the
// local sense and pulses rel_valid_o.
// All state changes happen on round_end_i, except latching a request or a
// swapped-in context and the swap-in release.
module barrier_wait_fsm
  import barrier_pkg::*;
#(
  parameter int unsigned NW = 7   // width of the ENTRY count of one round
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             round_end_i,
  // barrier_wait() from the core
  input  logic             wait_valid_i,
  output logic             wait_ready_o,
  input  bar_ctx_t         wait_ctx_i,     // bid, capacity, tid used
  // context swap
  input  logic             ld_valid_i,     // swap in
  input  bar_ctx_t         ld_ctx_i,
  input  logic             clear_i,        // swap out completed
  output bar_ctx_t         ctx_o,
  output logic             busy_rounds_o,  // in PEND/E1/E2/E3
  output logic             waiting_o,      // in E1/E2/E3/WAIT (counted or trying)
  // round results from the trees and comparators
  input  logic [NW-1:0]    n_entry_i,
  input  logic             min_any_i,
  input  logic [TID_W-1:0] min_tid_i,
  input  logic             got_accept_i,
  input  logic             got_release_i,
  // other controllers
  input  logic             is_coord_i,
  input  logic             self_release_i,
  input  logic             swap_release_i,
  input  logic             hold_i,         // swap-out taken: keep PEND as is
  output logic             tx_entry_o,     // broadcast ENTRY next round
  output logic             self_arrive_o,  // co-ordinator's own thread arrived
  output logic             elect_o,        // become co-ordinator
  output logic [CNT_W-1:0] elect_cnt_o,
  // release to the core
  output logic             rel_valid_o,
  output logic             rel_sense_o
);
  typedef enum logic [2:0] {S_IDLE, S_PEND, S_E1, S_E2, S_E3, S_WAIT} bw_state_e;

  bw_state_e        state_q, state_d;
  bid_t             bid_q;
  logic [CNT_W-1:0] cap_q;
  logic [TID_W-1:0] tid_q;
  logic [CNT_W-1:0] acc_cnt_q;
  logic [TID_W-1:0] acc_min_q;
  logic             acked_q;

  logic             release_now;
  logic [TID_W-1:0] min_all;

  assign wait_ready_o  = (state_q == S_IDLE) && !ld_valid_i && !clear_i;
  assign busy_rounds_o = state_q inside {S_PEND, S_E1, S_E2, S_E3};
  assign waiting_o     = state_q inside {S_E1, S_E2, S_E3, S_WAIT};

  always_comb begin
    ctx_o               = '0;
    ctx_o.bid           = bid_q;
    ctx_o.capacity      = cap_q;
    ctx_o.tid           = tid_q;
    ctx_o.waiting       = waiting_o;
    ctx_o.entry_pending = (state_q == S_PEND);
  end

  // Minimum of everything seen so far, this round and the unit's own id.
  always_comb begin
    min_all = (acc_min_q < tid_q) ? acc_min_q : tid_q;
    if (min_any_i && min_tid_i < min_all) min_all = min_tid_i;
  end

  assign release_now = waiting_o && (swap_release_i ||
                       (round_end_i && (got_release_i || self_release_i)));

  always_comb begin
    state_d       = state_q;
    tx_entry_o    = 1'b0;
    self_arrive_o = 1'b0;
    elect_o       = 1'b0;
    elect_cnt_o   = acc_cnt_q + CNT_W'(n_entry_i) + CNT_W'(1);
    if (release_now) begin
      state_d = S_IDLE;
    end else if (round_end_i) begin
      unique case (state_q)
        S_PEND: begin
          if (hold_i) begin
            state_d = S_PEND;
          end else if (is_coord_i) begin
            self_arrive_o = 1'b1;
            state_d       = S_WAIT;
          end else begin
            tx_entry_o = 1'b1;
            state_d    = S_E1;
          end
        end
        S_E1: state_d = S_E2;
        S_E2: begin
          if (acked_q || got_accept_i) begin
            state_d = S_WAIT;
          end else if (min_all == tid_q) begin
            elect_o = 1'b1;
            state_d = S_WAIT;
          end else begin
            state_d = S_E3;
          end
        end
        S_E3: begin
          if (got_accept_i) begin
            state_d = S_WAIT;
          end else begin
            tx_entry_o = 1'b1;     // retry
            state_d    = S_E1;
          end
        end
        default: ;
      endcase
    end
  end

  assign rel_valid_o = release_now;
  assign rel_sense_o = !bid_q.sense;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      bid_q     <= '0;
      cap_q     <= '0;
      tid_q     <= '0;
      acc_cnt_q <= '0;
      acc_min_q <= '1;
      acked_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (clear_i) begin
        state_q <= S_IDLE;
      end else if (ld_valid_i) begin
        bid_q   <= ld_ctx_i.bid;
        cap_q   <= ld_ctx_i.capacity;
        tid_q   <= ld_ctx_i.tid;
        state_q <= ld_ctx_i.entry_pending ? S_PEND :
                   ld_ctx_i.waiting       ? S_WAIT : S_IDLE;
      end else if (wait_valid_i && wait_ready_o) begin
        bid_q   <= wait_ctx_i.bid;
        cap_q   <= wait_ctx_i.capacity;
        tid_q   <= wait_ctx_i.tid;
        state_q <= S_PEND;
      end
      if (release_now) bid_q.sense <= !bid_q.sense;
      if (round_end_i) begin
        if (tx_entry_o) begin
          acc_cnt_q <= '0;
          acc_min_q <= '1;
          acked_q   <= 1'b0;
        end else if (state_q == S_E1) begin
          acc_cnt_q <= acc_cnt_q + CNT_W'(n_entry_i);
          if (min_any_i && min_tid_i < acc_min_q) acc_min_q <= min_tid_i;
          acked_q   <= got_accept_i;
        end
      end
    end
  end
endmodule
