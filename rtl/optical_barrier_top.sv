// optical_barrier_top: hardware barriers over an optical broadcast network, in
// the two protocols of the design, side by side.
//
//  * d_*: the distributed protocol (dist_barrier_system). One barrier unit per
//    core; the units elect a co-ordinator per barrier, which counts ENTRY
//    messages and broadcasts RELEASE. Scales with the core count.
//  * c_*: the centralized protocol (cent_barrier_system). One small barrier unit
//    per core; a central station counts ENTRY messages for up to 32 barriers.
//
// The two systems share only the clock and reset; a chip would use one of them.
// Cores and main memory are outside: barrier_wait()/barrier_init(), releases,
// context switches and the accesses to each barrier's memory word (count and
// sense) are ports. Defaults: 64 cores, 16 clusters/channels, 2-cycle rounds,
// tau_w = 200 cycles (the memory latency of the evaluated system).
module optical_barrier_top
  import barrier_pkg::*;
#(
  parameter int unsigned NCORE     = 64,
  parameter int unsigned NCH       = 16,
  parameter int unsigned M         = 2,
  parameter int unsigned TAU_W     = 200,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned Q_DEPTH   = 16,
  parameter int unsigned ENTRIES   = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ---------------- distributed protocol
  input  logic     [NCORE-1:0]   d_wait_valid_i,
  output logic     [NCORE-1:0]   d_wait_ready_o,
  input  bar_ctx_t [NCORE-1:0]   d_wait_ctx_i,
  output logic     [NCORE-1:0]   d_rel_valid_o,
  output logic     [NCORE-1:0]   d_rel_sense_o,
  input  logic     [NCORE-1:0]   d_so_req_i,
  output logic     [NCORE-1:0]   d_so_done_o,
  output bar_ctx_t [NCORE-1:0]   d_so_ctx_o,
  input  logic     [NCORE-1:0]   d_si_valid_i,
  output logic     [NCORE-1:0]   d_si_ready_o,
  input  bar_ctx_t [NCORE-1:0]   d_si_ctx_i,
  output logic     [NCORE-1:0]   d_mem_req_valid_o,
  input  logic     [NCORE-1:0]   d_mem_req_ready_i,
  output mem_req_t [NCORE-1:0]   d_mem_req_o,
  input  logic     [NCORE-1:0]   d_mem_rsp_valid_i,
  input  mem_rsp_t [NCORE-1:0]   d_mem_rsp_i,
  output logic     [NCORE-1:0]   d_is_coord_o,
  output chan_t    [NCORE-1:0]   d_bus_o,
  // ---------------- centralized protocol
  input  logic     [NCORE-1:0]   c_init_valid_i,
  output logic     [NCORE-1:0]   c_init_ready_o,
  input  bar_ctx_t [NCORE-1:0]   c_init_ctx_i,
  input  logic     [NCORE-1:0]   c_wait_valid_i,
  output logic     [NCORE-1:0]   c_wait_ready_o,
  input  bar_ctx_t [NCORE-1:0]   c_wait_ctx_i,
  output logic     [NCORE-1:0]   c_rel_valid_o,
  output logic     [NCORE-1:0]   c_rel_sense_o,
  input  logic     [NCORE-1:0]   c_so_req_i,
  output logic     [NCORE-1:0]   c_so_done_o,
  output bar_ctx_t [NCORE-1:0]   c_so_ctx_o,
  input  logic     [NCORE-1:0]   c_si_valid_i,
  output logic     [NCORE-1:0]   c_si_ready_o,
  input  bar_ctx_t [NCORE-1:0]   c_si_ctx_i,
  output logic     [NCORE-1:0]   c_mem_req_valid_o,
  input  logic     [NCORE-1:0]   c_mem_req_ready_i,
  output mem_req_t [NCORE-1:0]   c_mem_req_o,
  input  logic     [NCORE-1:0]   c_mem_rsp_valid_i,
  input  mem_rsp_t [NCORE-1:0]   c_mem_rsp_i,
  output logic                   c_st_mem_wr_valid_o,
  output mem_req_t               c_st_mem_wr_o,
  output logic                   c_overflow_o,
  output logic                   c_spill_valid_o,
  output msg_t                   c_spill_msg_o,
  output logic                   c_miss_valid_o,
  output msg_t                   c_miss_msg_o,
  output logic     [NCH-1:0]     c_lost_o,
  output logic [$clog2(Q_DEPTH+1)-1:0] c_queue_size_o,
  output logic                   c_bypass_o,
  output logic                   c_stall_o
);
  dist_barrier_system #(.N(NCORE), .M(M), .TAU_W(TAU_W)) u_dist (
    .clk(clk), .rst_n(rst_n),
    .wait_valid_i(d_wait_valid_i), .wait_ready_o(d_wait_ready_o), .wait_ctx_i(d_wait_ctx_i),
    .rel_valid_o(d_rel_valid_o), .rel_sense_o(d_rel_sense_o),
    .so_req_i(d_so_req_i), .so_done_o(d_so_done_o), .so_ctx_o(d_so_ctx_o),
    .si_valid_i(d_si_valid_i), .si_ready_o(d_si_ready_o), .si_ctx_i(d_si_ctx_i),
    .mem_req_valid_o(d_mem_req_valid_o), .mem_req_ready_i(d_mem_req_ready_i),
    .mem_req_o(d_mem_req_o), .mem_rsp_valid_i(d_mem_rsp_valid_i), .mem_rsp_i(d_mem_rsp_i),
    .is_coord_o(d_is_coord_o), .bus_o(d_bus_o));

  cent_barrier_system #(.NCORE(NCORE), .NCH(NCH), .BUF_DEPTH(BUF_DEPTH), .Q_DEPTH(Q_DEPTH),
                        .ENTRIES(ENTRIES), .TAU_W(TAU_W)) u_cent (
    .clk(clk), .rst_n(rst_n),
    .init_valid_i(c_init_valid_i), .init_ready_o(c_init_ready_o), .init_ctx_i(c_init_ctx_i),
    .wait_valid_i(c_wait_valid_i), .wait_ready_o(c_wait_ready_o), .wait_ctx_i(c_wait_ctx_i),
    .rel_valid_o(c_rel_valid_o), .rel_sense_o(c_rel_sense_o),
    .so_req_i(c_so_req_i), .so_done_o(c_so_done_o), .so_ctx_o(c_so_ctx_o),
    .si_valid_i(c_si_valid_i), .si_ready_o(c_si_ready_o), .si_ctx_i(c_si_ctx_i),
    .mem_req_valid_o(c_mem_req_valid_o), .mem_req_ready_i(c_mem_req_ready_i),
    .mem_req_o(c_mem_req_o), .mem_rsp_valid_i(c_mem_rsp_valid_i), .mem_rsp_i(c_mem_rsp_i),
    .st_mem_wr_valid_o(c_st_mem_wr_valid_o), .st_mem_wr_o(c_st_mem_wr_o),
    .overflow_o(c_overflow_o), .spill_valid_o(c_spill_valid_o), .spill_msg_o(c_spill_msg_o),
    .miss_valid_o(c_miss_valid_o), .miss_msg_o(c_miss_msg_o), .lost_o(c_lost_o),
    .queue_size_o(c_queue_size_o), .bypass_o(c_bypass_o), .stall_o(c_stall_o));
endmodule
