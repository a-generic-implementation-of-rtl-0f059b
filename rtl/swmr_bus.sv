// swmr_bus: behavioural model of a single-writer multiple-reader (SWMR) optical
// broadcast network. BEHAVIOURAL MODEL: the modulators, waveguides and
// detectors are analog photonic parts; this model keeps only their logical
// effect.
//
// Each of the N writers owns one channel. Whatever a writer drives in a cycle
// is seen by every reader LAT cycles later, on every channel at once; readers
// get the whole array and ignore the channels they do not want (a unit's own
// channel, for instance). The document gives 100 ps for modulation, 100 ps for
// detection and up to 350 ps of waveguide flight, 550 ps in all; at 2 GHz this
// model rounds that to LAT = 1 cycle. With rounds of two cycles the receiving
// logic then has the second cycle of the round, matching the document's claim
// that the whole broadcast and decode fits within one round.
module swmr_bus
  import barrier_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned LAT = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  chan_t [N-1:0] tx_i,
  output chan_t [N-1:0] rx_o
);
  chan_t [N-1:0] stage_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(LAT); s++) stage_q[s] <= '0;
    end else begin
      stage_q[0] <= tx_i;
      for (int s = 1; s < int'(LAT); s++) stage_q[s] <= stage_q[s-1];
    end
  end
  assign rx_o = stage_q[LAT-1];
endmodule
