// cent_barrier_system: the centralized-protocol barrier hardware of a manycore
// chip. NCORE cores, each with a central_barrier_unit, grouped in clusters of
// NCORE/NCH cores; each cluster shares one optical channel (cluster_tx_arbiter)
// towards the central station; the station's RELEASE channel is broadcast to all
// units. Both directions use the SWMR network model (swmr_bus, BUS_LAT cycles).
// Default: 64 cores, 16 channels, as in the document's evaluation.
//
// End-to-end latency for the ENTRY that completes a barrier, with idle
// buffers: ENTRY leaves the unit at cycle t, reaches the station at t+1, RELEASE
// leaves the station at t+5 and the units release at the end of cycle t+6.
module cent_barrier_system
  import barrier_pkg::*;
#(
  parameter int unsigned NCORE     = 64,
  parameter int unsigned NCH       = 16,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned Q_DEPTH   = 16,
  parameter int unsigned ENTRIES   = 32,
  parameter int unsigned TAU_W     = 200,
  parameter int unsigned BUS_LAT   = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic     [NCORE-1:0]   init_valid_i,
  output logic     [NCORE-1:0]   init_ready_o,
  input  bar_ctx_t [NCORE-1:0]   init_ctx_i,
  input  logic     [NCORE-1:0]   wait_valid_i,
  output logic     [NCORE-1:0]   wait_ready_o,
  input  bar_ctx_t [NCORE-1:0]   wait_ctx_i,
  output logic     [NCORE-1:0]   rel_valid_o,
  output logic     [NCORE-1:0]   rel_sense_o,
  input  logic     [NCORE-1:0]   so_req_i,
  output logic     [NCORE-1:0]   so_done_o,
  output bar_ctx_t [NCORE-1:0]   so_ctx_o,
  input  logic     [NCORE-1:0]   si_valid_i,
  output logic     [NCORE-1:0]   si_ready_o,
  input  bar_ctx_t [NCORE-1:0]   si_ctx_i,
  // memory: unit read ports and the station's write port
  output logic     [NCORE-1:0]   mem_req_valid_o,
  input  logic     [NCORE-1:0]   mem_req_ready_i,
  output mem_req_t [NCORE-1:0]   mem_req_o,
  input  logic     [NCORE-1:0]   mem_rsp_valid_i,
  input  mem_rsp_t [NCORE-1:0]   mem_rsp_i,
  output logic                   st_mem_wr_valid_o,
  output mem_req_t               st_mem_wr_o,
  // station status
  output logic                   overflow_o,
  output logic                   spill_valid_o,
  output msg_t                   spill_msg_o,
  output logic                   miss_valid_o,
  output msg_t                   miss_msg_o,
  output logic     [NCH-1:0]     lost_o,
  output logic [$clog2(Q_DEPTH+1)-1:0] queue_size_o,
  output logic                   bypass_o,
  output logic                   stall_o
);
  localparam int unsigned NC = NCORE / NCH;

  logic  [NCORE-1:0] tx_valid, tx_ready;
  msg_t  [NCORE-1:0] tx_msg;
  chan_t [NCH-1:0]   up_tx, up_rx;
  chan_t [0:0]       dn_tx, dn_rx;

  for (genvar k = 0; k < NCH; k++) begin : g_cluster
    cluster_tx_arbiter #(.NC(NC)) u_arb (
      .clk(clk), .rst_n(rst_n), .valid_i(tx_valid[k*NC +: NC]), .ready_o(tx_ready[k*NC +: NC]),
      .msg_i(tx_msg[k*NC +: NC]), .chan_o(up_tx[k]));
  end

  swmr_bus #(.N(NCH), .LAT(BUS_LAT)) u_up (.clk(clk), .rst_n(rst_n), .tx_i(up_tx), .rx_o(up_rx));

  central_station #(.NCH(NCH), .BUF_DEPTH(BUF_DEPTH), .Q_DEPTH(Q_DEPTH), .ENTRIES(ENTRIES)) u_st (
    .clk(clk), .rst_n(rst_n), .in_i(up_rx), .rel_o(dn_tx[0]),
    .mem_wr_valid_o(st_mem_wr_valid_o), .mem_wr_o(st_mem_wr_o),
    .overflow_o(overflow_o), .spill_valid_o(spill_valid_o), .spill_msg_o(spill_msg_o),
    .miss_valid_o(miss_valid_o), .miss_msg_o(miss_msg_o), .lost_o(lost_o),
    .queue_size_o(queue_size_o), .bypass_o(bypass_o), .stall_o(stall_o));

  swmr_bus #(.N(1), .LAT(BUS_LAT)) u_dn (.clk(clk), .rst_n(rst_n), .tx_i(dn_tx), .rx_o(dn_rx));

  for (genvar i = 0; i < NCORE; i++) begin : g_unit
    central_barrier_unit #(.TAU_W(TAU_W)) u_unit (
      .clk(clk), .rst_n(rst_n),
      .init_valid_i(init_valid_i[i]), .init_ready_o(init_ready_o[i]), .init_ctx_i(init_ctx_i[i]),
      .wait_valid_i(wait_valid_i[i]), .wait_ready_o(wait_ready_o[i]), .wait_ctx_i(wait_ctx_i[i]),
      .rel_valid_o(rel_valid_o[i]), .rel_sense_o(rel_sense_o[i]),
      .so_req_i(so_req_i[i]), .so_done_o(so_done_o[i]), .so_ctx_o(so_ctx_o[i]),
      .si_valid_i(si_valid_i[i]), .si_ready_o(si_ready_o[i]), .si_ctx_i(si_ctx_i[i]),
      .tx_valid_o(tx_valid[i]), .tx_ready_i(tx_ready[i]), .tx_msg_o(tx_msg[i]), .rx_i(dn_rx[0]),
      .mem_req_valid_o(mem_req_valid_o[i]), .mem_req_ready_i(mem_req_ready_i[i]),
      .mem_req_o(mem_req_o[i]), .mem_rsp_valid_i(mem_rsp_valid_i[i]), .mem_rsp_i(mem_rsp_i[i]));
  end
endmodule
