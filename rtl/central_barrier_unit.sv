// central_barrier_unit: the per-core barrier unit of the centralized protocol.
//
// barrier_init() makes it send a REGISTER message (barrier id and capacity) to
// the central station; barrier_wait() makes it send ENTRY and then wait until a
// RELEASE with the thread's barrier id (address, process id, local sense) comes
// back on the station's broadcast channel. It then flips the local sense and
// pulses rel_valid_o. Messages leave through a valid/ready port (tx_*) towards
// the cluster's optical transmitter.
//
// Context switches: swap-out completes in one cycle and returns the thread's
// barrier context; if ENTRY had not been sent yet, entry_pending is set and the
// unit sends ENTRY after the thread is swapped back in. A thread swapped in
// while waiting waits TAU_W cycles, reads the barrier's memory word and
// releases itself if the stored sense differs from its local sense.
module central_barrier_unit
  import barrier_pkg::*;
#(
  parameter int unsigned TAU_W = 200
) (
  input  logic             clk,
  input  logic             rst_n,
  // core
  input  logic             init_valid_i,
  output logic             init_ready_o,
  input  bar_ctx_t         init_ctx_i,     // bid (initial sense) and capacity used
  input  logic             wait_valid_i,
  output logic             wait_ready_o,
  input  bar_ctx_t         wait_ctx_i,
  output logic             rel_valid_o,
  output logic             rel_sense_o,
  input  logic             so_req_i,
  output logic             so_done_o,
  output bar_ctx_t         so_ctx_o,
  input  logic             si_valid_i,
  output logic             si_ready_o,
  input  bar_ctx_t         si_ctx_i,
  // network
  output logic             tx_valid_o,
  input  logic             tx_ready_i,
  output msg_t             tx_msg_o,
  input  chan_t            rx_i,
  // memory word of the barrier (read only)
  output logic             mem_req_valid_o,
  input  logic             mem_req_ready_i,
  output mem_req_t         mem_req_o,
  input  logic             mem_rsp_valid_i,
  input  mem_rsp_t         mem_rsp_i
);
  typedef enum logic [2:0] {U_IDLE, U_REG, U_ENTRY, U_WAIT, U_TAUW, U_RDREQ, U_RDRSP} cu_state_e;
  localparam int unsigned TW = (TAU_W < 2) ? 1 : $clog2(TAU_W + 1);

  cu_state_e     state_q;
  bar_ctx_t      ctx_q;
  msg_t          reg_msg_q;
  logic [TW-1:0] tau_q;
  logic          waiting, rel_net, rel_mem;

  assign waiting      = state_q inside {U_WAIT, U_TAUW, U_RDREQ, U_RDRSP};
  assign init_ready_o = (state_q == U_IDLE) && !wait_valid_i && !si_valid_i;
  assign wait_ready_o = (state_q == U_IDLE) && !si_valid_i;
  assign si_ready_o   = (state_q == U_IDLE);
  assign so_done_o    = so_req_i && !(state_q == U_REG) && !(state_q inside {U_RDREQ, U_RDRSP});

  always_comb begin
    so_ctx_o               = ctx_q;
    so_ctx_o.waiting       = waiting;
    so_ctx_o.entry_pending = (state_q == U_ENTRY);
  end

  assign tx_valid_o = ((state_q == U_REG) || (state_q == U_ENTRY)) && !so_done_o;
  assign tx_msg_o   = (state_q == U_REG) ? reg_msg_q : mk_msg(MSG_ENTRY, ctx_q.bid, ctx_q.tid);

  assign rel_net = waiting && rx_i.valid && rx_i.msg.mtype == MSG_RELEASE && rx_i.msg.bid == ctx_q.bid;
  assign rel_mem = (state_q == U_RDRSP) && mem_rsp_valid_i && mem_rsp_i.sense != ctx_q.bid.sense;
  assign rel_valid_o = (rel_net || rel_mem) && !so_done_o;
  assign rel_sense_o = !ctx_q.bid.sense;

  assign mem_req_valid_o = (state_q == U_RDREQ);
  always_comb begin
    mem_req_o      = '0;
    mem_req_o.addr = ctx_q.bid.addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= U_IDLE;
      ctx_q     <= '0;
      reg_msg_q <= '0;
      tau_q     <= '0;
    end else if (so_done_o) begin
      state_q <= U_IDLE;
    end else if (rel_valid_o) begin
      state_q         <= U_IDLE;
      ctx_q.bid.sense <= !ctx_q.bid.sense;
    end else begin
      unique case (state_q)
        U_IDLE: begin
          if (si_valid_i) begin
            ctx_q <= si_ctx_i;
            if (si_ctx_i.entry_pending) state_q <= U_ENTRY;
            else if (si_ctx_i.waiting) begin
              state_q <= U_TAUW;
              tau_q   <= TW'(TAU_W);
            end
          end else if (wait_valid_i) begin
            ctx_q   <= wait_ctx_i;
            state_q <= U_ENTRY;
          end else if (init_valid_i) begin
            reg_msg_q <= mk_msg(MSG_REGISTER, init_ctx_i.bid, cap_encode(init_ctx_i.capacity));
            state_q   <= U_REG;
          end
        end
        U_REG:   if (tx_ready_i) state_q <= U_IDLE;
        U_ENTRY: if (tx_ready_i) state_q <= U_WAIT;
        U_WAIT:  ;   // until RELEASE (handled above)
        U_TAUW:  if (tau_q == '0) state_q <= U_RDREQ;
                 else tau_q <= tau_q - 1'b1;
        U_RDREQ: if (mem_req_ready_i) state_q <= U_RDRSP;
        U_RDRSP: if (mem_rsp_valid_i) state_q <= U_WAIT;
        default: state_q <= U_IDLE;
      endcase
    end
  end
endmodule
