// context_swap_fsm: the context-switch controller of a distributed barrier unit.
//
// Swap out (so_req_i): taken at a round boundary when the unit is not in the
// middle of its ENTRY rounds and, if it is co-ordinator, has no memory access
// or reply outstanding. A plain unit hands back the thread's barrier context at
// once (entry_pending set if ENTRY had not been sent yet). A co-ordinator first
// broadcasts TRANSFER with its count (round a); waiting units of the same
// barrier answer with REPLY and their thread id (round a+1); at the end of
// round a+1 the smallest replying thread id becomes the new co-ordinator with
// count 0. The old co-ordinator then gives up its role and, in round a+2,
// either sends its count in a COUNT message (someone replied) or writes count
// and local sense to the barrier's memory word (nobody replied). If it released
// the barrier meanwhile, nothing is handed over. The COUNT message also serves
// as the acknowledgement of ENTRY messages of round a+1 (this design's choice).
//
// Receiving side: a waiting unit that sees a TRANSFER for its barrier sends
// REPLY in the next round and, at its end, takes over if its thread id is
// smaller than every other REPLY (elect_trans_o).
//
// Swap in (si_valid_i): the context is loaded into the barrier-wait controller;
// if the thread was waiting, the unit waits TAU_W cycles, reads the barrier's
// memory word and releases the thread if the stored sense differs from the
// local sense (the barrier was released while the thread was away).
module context_swap_fsm
  import barrier_pkg::*;
#(
  parameter int unsigned TAU_W = 200
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             round_end_i,
  // core side
  input  logic             so_req_i,
  output logic             so_done_o,
  output bar_ctx_t         so_ctx_o,
  input  logic             si_valid_i,
  output logic             si_ready_o,
  input  bar_ctx_t         si_ctx_i,
  // barrier-wait controller
  input  bar_ctx_t         bw_ctx_i,
  input  logic             bw_busy_rounds_i,
  input  logic             bw_waiting_i,
  output logic             hold_o,
  output logic             ld_valid_o,
  output logic             clear_o,
  output logic             swap_release_o,
  // co-ordinator controller
  input  logic             is_coord_i,
  input  logic             co_idle_i,
  input  logic [CNT_W-1:0] co_count_i,
  input  logic [CNT_W-1:0] co_count_next_i,
  input  logic             co_tx_release_i,
  output logic             drop_o,
  output logic             elect_trans_o,
  // network results
  input  logic             got_transfer_i,
  input  logic             min_any_i,
  input  logic [TID_W-1:0] min_tid_i,
  output logic             sel_reply_o,     // min tree looks at REPLY messages
  output logic             tx_transfer_o,
  output logic             tx_reply_o,
  output logic             tx_count_o,
  output logic [TID_W-1:0] tx_field_o,
  // memory
  output logic             mem_req_valid_o,
  input  logic             mem_req_ready_i,
  output mem_req_t         mem_req_o,
  input  logic             mem_rsp_valid_i,
  input  mem_rsp_t         mem_rsp_i
);
  typedef enum logic [2:0] {X_IDLE, X_TRANSFER, X_REPLYW, X_WB, R_REPLY, I_TAUW, I_RDREQ, I_RDRSP}
    cs_state_e;
  localparam int unsigned TW = (TAU_W < 2) ? 1 : $clog2(TAU_W + 1);

  cs_state_e     state_q;
  logic [TW-1:0] tau_q;
  mem_req_t      wb_q;
  bar_ctx_t      saved_q;
  logic          rel_seen_q;
  logic          take;

  logic so_now;
  // A unit in PEND may be swapped out: its ENTRY becomes pending in the context.
  assign take = round_end_i && (state_q == X_IDLE) && so_req_i &&
                (!bw_busy_rounds_i || bw_ctx_i.entry_pending);
  assign so_now = take && (!is_coord_i || co_idle_i);
  assign hold_o = so_now || (state_q inside {X_TRANSFER, X_REPLYW, X_WB});
  assign si_ready_o = (state_q == X_IDLE) && !bw_waiting_i && !bw_busy_rounds_i && !so_req_i;
  assign ld_valid_o = si_valid_i && si_ready_o;
  assign sel_reply_o = (state_q == R_REPLY) || (state_q == X_REPLYW);

  always_comb begin
    so_done_o      = 1'b0;
    so_ctx_o       = bw_ctx_i;
    clear_o        = 1'b0;
    drop_o         = 1'b0;
    elect_trans_o  = 1'b0;
    tx_transfer_o  = 1'b0;
    tx_reply_o     = 1'b0;
    tx_count_o     = 1'b0;
    tx_field_o     = bw_ctx_i.tid;
    swap_release_o = 1'b0;
    unique case (state_q)
      X_IDLE: begin
        if (so_now && !is_coord_i) begin
          so_done_o = 1'b1;
          clear_o   = 1'b1;
        end else if (so_now) begin
          tx_transfer_o = 1'b1;
          tx_field_o    = co_count_i[TID_W-1:0];
        end else if (round_end_i && got_transfer_i && bw_waiting_i && !is_coord_i) begin
          tx_reply_o = 1'b1;
          tx_field_o = bw_ctx_i.tid;
        end
      end
      X_REPLYW: begin
        if (round_end_i) begin
          drop_o = 1'b1;
          if (rel_seen_q || co_tx_release_i) begin
            so_done_o = 1'b1;
            clear_o   = 1'b1;
          end else if (min_any_i) begin
            tx_count_o = 1'b1;
            tx_field_o = co_count_next_i[TID_W-1:0];
            so_done_o  = 1'b1;
            clear_o    = 1'b1;
          end
        end
      end
      X_WB: begin
        if (mem_req_ready_i) begin
          so_done_o = 1'b1;
          clear_o   = 1'b1;
        end
      end
      R_REPLY: begin
        if (round_end_i && bw_waiting_i && (!min_any_i || bw_ctx_i.tid < min_tid_i))
          elect_trans_o = 1'b1;
      end
      I_RDRSP: begin
        if (mem_rsp_valid_i && bw_waiting_i && mem_rsp_i.sense != bw_ctx_i.bid.sense)
          swap_release_o = 1'b1;
      end
      default: ;
    endcase
  end

  always_comb begin
    mem_req_valid_o = 1'b0;
    mem_req_o       = wb_q;
    if (state_q == X_WB) begin
      mem_req_valid_o = 1'b1;
    end else if (state_q == I_RDREQ) begin
      mem_req_valid_o = 1'b1;
      mem_req_o       = '0;
      mem_req_o.addr  = bw_ctx_i.bid.addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= X_IDLE;
      tau_q      <= '0;
      wb_q       <= '0;
      saved_q    <= '0;
      rel_seen_q <= 1'b0;
    end else begin
      unique case (state_q)
        X_IDLE: begin
          if (so_now && is_coord_i) begin
            state_q    <= X_TRANSFER;
            saved_q    <= bw_ctx_i;
            rel_seen_q <= 1'b0;
          end else if (tx_reply_o) begin
            state_q <= R_REPLY;
          end else if (ld_valid_o && si_ctx_i.waiting && !si_ctx_i.entry_pending) begin
            state_q <= I_TAUW;
            tau_q   <= TW'(TAU_W);
          end
        end
        X_TRANSFER: if (round_end_i) begin
          state_q <= X_REPLYW;
          if (co_tx_release_i) rel_seen_q <= 1'b1;
        end
        X_REPLYW: if (round_end_i) begin
          if (rel_seen_q || co_tx_release_i || min_any_i) begin
            state_q <= X_IDLE;
          end else begin
            state_q     <= X_WB;
            wb_q        <= '0;
            wb_q.write  <= 1'b1;
            wb_q.addr   <= saved_q.bid.addr;
            wb_q.count  <= co_count_next_i;
            wb_q.sense  <= saved_q.bid.sense;
          end
        end
        X_WB:    if (mem_req_ready_i) state_q <= X_IDLE;
        R_REPLY: if (round_end_i) state_q <= X_IDLE;
        I_TAUW:  if (!bw_waiting_i) state_q <= X_IDLE;
                 else if (tau_q == '0) state_q <= I_RDREQ;
                 else tau_q <= tau_q - 1'b1;
        I_RDREQ: if (!bw_waiting_i) state_q <= X_IDLE;
                 else if (mem_req_ready_i) state_q <= I_RDRSP;
        I_RDRSP: if (mem_rsp_valid_i) state_q <= X_IDLE;
        default: state_q <= X_IDLE;
      endcase
    end
  end
endmodule
