// cluster_tx_arbiter: shares one optical transmitter among the cores of a cluster.
//
// In the evaluated centralized system 64 cores in 16 clusters send to a central
// station with 16 input channels, so the NC barrier units of a cluster take
// turns on their cluster's channel. Round-robin, one message per cycle; the
// granted unit sees tx_ready. The output drives the channel combinationally.
// The arbitration scheme is this design's choice.
module cluster_tx_arbiter
  import barrier_pkg::*;
#(
  parameter int unsigned NC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NC-1:0]   valid_i,
  output logic [NC-1:0]   ready_o,
  input  msg_t [NC-1:0]   msg_i,
  output chan_t           chan_o
);
  localparam int unsigned IW = (NC < 2) ? 1 : $clog2(NC);
  logic [IW-1:0] last_q, sel;
  logic          found;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 1; k <= int'(NC); k++) begin
      int idx;
      idx = (int'(last_q) + k) % int'(NC);
      if (!found && valid_i[idx]) begin
        found = 1'b1;
        sel   = IW'(idx);
      end
    end
    ready_o        = '0;
    ready_o[sel]   = found;
    chan_o.valid   = found;
    chan_o.msg     = msg_i[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     last_q <= IW'(NC - 1);
    else if (found) last_q <= sel;
  end
endmodule
