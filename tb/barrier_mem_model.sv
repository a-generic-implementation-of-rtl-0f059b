// barrier_mem_model: behavioural main memory for the barrier testbenches.
//
// Holds the count and sense word of every barrier address (never-written words
// read as count 0, sense 0). N independent request ports, each always ready.
// A write takes effect when accepted; a read returns the word RLAT cycles after
// it was accepted. At most one read per port is in flight.
module barrier_mem_model
  import barrier_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned RLAT = 4
) (
  input  logic                 clk,
  input  logic     [N-1:0]     req_valid_i,
  output logic     [N-1:0]     req_ready_o,
  input  mem_req_t [N-1:0]     req_i,
  output logic     [N-1:0]     rsp_valid_o,
  output mem_rsp_t [N-1:0]     rsp_o,
  input  logic [ADDR_W-1:0]    probe_addr_i,   // testbench view of one word
  output mem_rsp_t             probe_o
);
  mem_rsp_t store [logic [ADDR_W-1:0]];
  int       cnt   [N];
  logic [ADDR_W-1:0] raddr [N];
  int       writes, reads;

  initial begin
    writes = 0;
    reads  = 0;
    for (int i = 0; i < int'(N); i++) cnt[i] = 0;
    rsp_valid_o = '0;
    rsp_o       = '0;
  end
  assign req_ready_o = '1;

  function automatic mem_rsp_t peek(input logic [ADDR_W-1:0] a);
    if (store.exists(a)) return store[a];
    return '0;
  endfunction

  always_comb probe_o = peek(probe_addr_i);

  always @(posedge clk) begin
    for (int i = 0; i < int'(N); i++) begin
      rsp_valid_o[i] <= 1'b0;
      if (cnt[i] > 0) begin
        cnt[i] = cnt[i] - 1;
        if (cnt[i] == 0) begin
          rsp_valid_o[i] <= 1'b1;
          rsp_o[i]       <= peek(raddr[i]);
        end
      end
      if (req_valid_i[i]) begin
        if (req_i[i].write) begin
          store[req_i[i].addr] = '{count: req_i[i].count, sense: req_i[i].sense};
          writes++;
        end else begin
          raddr[i] = req_i[i].addr;
          cnt[i]   = RLAT;
          reads++;
        end
      end
    end
  end
endmodule
