// coordinator_fsm: the co-ordinator controller of a distributed barrier unit.
//
// A unit becomes co-ordinator of its thread's barrier either by election after
// ENTRY messages (elect_i, with the initial count) or by a hand-over during a
// context switch (elect_trans_i, count 0, the old co-ordinator's count follows
// in a COUNT message). After an election it waits TAU_W cycles, reads the
// barrier's memory word and, if the stored sense equals the local sense, adds
// the stored count (the count left behind by an earlier co-ordinator that was
// swapped out). After a hand-over no read is made: the document's rule adds
// nothing in that case. At every round boundary it adds the ENTRY messages of
// the round (and its own thread's arrival, and a received COUNT) to the count.
// When the count reaches the capacity it broadcasts RELEASE in the next round,
// writes the flipped sense and a zero count to memory, releases its own thread
// at the end of that round and stays co-ordinator of the next barrier instance
// with count 0. Otherwise, if ENTRY messages arrived, it answers with ACCEPT.
// No release is decided before the memory read has returned or while the
// previous release's memory write is outstanding.
// Memory port: valid/ready request, read data returned with rsp_valid_i.
module coordinator_fsm
  import barrier_pkg::*;
#(
  parameter int unsigned NW    = 7,
  parameter int unsigned TAU_W = 200
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             round_end_i,
  input  bid_t             bid_i,          // barrier id (with local sense)
  input  logic [CNT_W-1:0] capacity_i,
  input  logic             elect_i,
  input  logic [CNT_W-1:0] elect_cnt_i,
  input  logic             elect_trans_i,
  input  logic             drop_i,         // role handed over / written back
  input  logic [NW-1:0]    n_entry_i,
  input  logic             self_arrive_i,
  input  logic             got_count_i,
  input  logic [TID_W-1:0] count_val_i,
  output logic             is_coord_o,
  output logic             idle_o,         // active, nothing outstanding or received
  output logic [CNT_W-1:0] count_o,
  output logic [CNT_W-1:0] count_next_o,   // count after this round's additions
  output logic             tx_release_o,
  output logic             tx_accept_o,
  output logic             self_release_o,
  // memory
  output logic             mem_req_valid_o,
  input  logic             mem_req_ready_i,
  output mem_req_t         mem_req_o,
  input  logic             mem_rsp_valid_i,
  input  mem_rsp_t         mem_rsp_i
);
  typedef enum logic [2:0] {C_NONE, C_TAUW, C_RDREQ, C_RDRSP, C_ACTIVE} co_state_e;
  localparam int unsigned TW = (TAU_W < 2) ? 1 : $clog2(TAU_W + 1);

  co_state_e        state_q;
  logic [CNT_W-1:0] count_q;
  logic [TW-1:0]    tau_q;
  logic             wr_pend_q;
  mem_req_t         wr_req_q;
  logic             rel_pend_q;
  logic [CNT_W-1:0] add;
  logic [CNT_W-1:0] mem_add;

  assign is_coord_o = (state_q != C_NONE);
  assign count_o    = count_q;

  always_comb begin
    add = CNT_W'(n_entry_i) + CNT_W'(self_arrive_i);
    if (got_count_i) add = add + CNT_W'(count_val_i);
  end
  assign mem_add = (state_q == C_RDRSP && mem_rsp_valid_i && mem_rsp_i.sense == bid_i.sense)
                   ? mem_rsp_i.count : '0;
  assign count_next_o = count_q + add + mem_add;

  always_comb begin
    tx_release_o = 1'b0;
    tx_accept_o  = 1'b0;
    if (round_end_i && is_coord_o) begin
      if (state_q == C_ACTIVE && !wr_pend_q && count_next_o >= capacity_i)
        tx_release_o = 1'b1;
      else if (n_entry_i != '0)
        tx_accept_o = 1'b1;
    end
    if (round_end_i && elect_i) tx_accept_o = 1'b1;   // announce the new co-ordinator
  end

  // Nothing outstanding and nothing received this round. The own thread's
  // arrival is not looked at: the context-swap controller holds it back when it
  // takes a swap-out, so the count cannot reach the capacity in that round.
  assign idle_o = (state_q == C_ACTIVE) && !wr_pend_q && !rel_pend_q &&
                  (n_entry_i == '0) && !got_count_i;
  assign self_release_o = round_end_i && rel_pend_q;

  // Memory requests: the release write, or the read after an election.
  always_comb begin
    mem_req_valid_o = 1'b0;
    mem_req_o       = wr_req_q;
    if (wr_pend_q) begin
      mem_req_valid_o = 1'b1;
    end else if (state_q == C_RDREQ) begin
      mem_req_valid_o = 1'b1;
      mem_req_o       = '0;
      mem_req_o.addr  = bid_i.addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= C_NONE;
      count_q    <= '0;
      tau_q      <= '0;
      wr_pend_q  <= 1'b0;
      wr_req_q   <= '0;
      rel_pend_q <= 1'b0;
    end else begin
      if (wr_pend_q && mem_req_ready_i) wr_pend_q <= 1'b0;
      if (round_end_i) rel_pend_q <= 1'b0;
      unique case (state_q)
        C_TAUW:  if (tau_q == '0) state_q <= C_RDREQ;
                 else tau_q <= tau_q - 1'b1;
        C_RDREQ: if (!wr_pend_q && mem_req_ready_i) state_q <= C_RDRSP;
        C_RDRSP: if (mem_rsp_valid_i) state_q <= C_ACTIVE;
        default: ;
      endcase
      if (is_coord_o) begin
        if (state_q == C_RDRSP && mem_rsp_valid_i) count_q <= count_q + mem_add;
        if (round_end_i) begin
          if (tx_release_o) begin
            count_q             <= '0;
            wr_pend_q           <= 1'b1;
            rel_pend_q          <= 1'b1;
            wr_req_q            <= '0;
            wr_req_q.write      <= 1'b1;
            wr_req_q.addr       <= bid_i.addr;
            wr_req_q.sense      <= !bid_i.sense;
          end else begin
            count_q <= count_next_o;
          end
        end
      end
      if (round_end_i && elect_i) begin
        state_q <= C_TAUW;
        tau_q   <= TW'(TAU_W);
        count_q <= elect_cnt_i;
      end else if (round_end_i && elect_trans_i) begin
        state_q <= C_ACTIVE;
        count_q <= '0;
      end
      if (drop_i) state_q <= C_NONE;
    end
  end
endmodule
