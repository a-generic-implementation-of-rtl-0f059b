// dist_barrier_system: the distributed-protocol barrier hardware of a manycore
// chip: one dist_barrier_unit per core, all joined by the SWMR optical network
// (swmr_bus), so every message a unit sends reaches every other unit.
//
// Core i talks to unit i through the per-core arrays below (barrier_wait(),
// release, context switches) and unit i's accesses to barrier memory words come
// out on the mem_* arrays; main memory is outside this block. Unit i owns
// channel i. Default size: 64 cores, as in the document's evaluated system.
module dist_barrier_system
  import barrier_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned M       = 2,
  parameter int unsigned TAU_W   = 200,
  parameter int unsigned BUS_LAT = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic     [N-1:0]       wait_valid_i,
  output logic     [N-1:0]       wait_ready_o,
  input  bar_ctx_t [N-1:0]       wait_ctx_i,
  output logic     [N-1:0]       rel_valid_o,
  output logic     [N-1:0]       rel_sense_o,
  input  logic     [N-1:0]       so_req_i,
  output logic     [N-1:0]       so_done_o,
  output bar_ctx_t [N-1:0]       so_ctx_o,
  input  logic     [N-1:0]       si_valid_i,
  output logic     [N-1:0]       si_ready_o,
  input  bar_ctx_t [N-1:0]       si_ctx_i,
  output logic     [N-1:0]       mem_req_valid_o,
  input  logic     [N-1:0]       mem_req_ready_i,
  output mem_req_t [N-1:0]       mem_req_o,
  input  logic     [N-1:0]       mem_rsp_valid_i,
  input  mem_rsp_t [N-1:0]       mem_rsp_i,
  output logic     [N-1:0]       is_coord_o,
  output chan_t    [N-1:0]       bus_o          // network contents, for observation
);
  chan_t [N-1:0] tx, rx;

  swmr_bus #(.N(N), .LAT(BUS_LAT)) u_bus (.clk(clk), .rst_n(rst_n), .tx_i(tx), .rx_o(rx));

  for (genvar i = 0; i < N; i++) begin : g_unit
    logic [CNT_W-1:0] ccount;
    dist_barrier_unit #(.N(N), .SELF(i), .M(M), .TAU_W(TAU_W)) u_unit (
      .clk(clk), .rst_n(rst_n), .rx_i(rx), .tx_o(tx[i]),
      .wait_valid_i(wait_valid_i[i]), .wait_ready_o(wait_ready_o[i]), .wait_ctx_i(wait_ctx_i[i]),
      .rel_valid_o(rel_valid_o[i]), .rel_sense_o(rel_sense_o[i]),
      .so_req_i(so_req_i[i]), .so_done_o(so_done_o[i]), .so_ctx_o(so_ctx_o[i]),
      .si_valid_i(si_valid_i[i]), .si_ready_o(si_ready_o[i]), .si_ctx_i(si_ctx_i[i]),
      .mem_req_valid_o(mem_req_valid_o[i]), .mem_req_ready_i(mem_req_ready_i[i]),
      .mem_req_o(mem_req_o[i]), .mem_rsp_valid_i(mem_rsp_valid_i[i]), .mem_rsp_i(mem_rsp_i[i]),
      .is_coord_o(is_coord_o[i]), .coord_count_o(ccount));
  end

  assign bus_o = rx;
endmodule
