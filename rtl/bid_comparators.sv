// bid_comparators: the barrier-id comparators behind the optical detectors of a
// distributed barrier unit.
//
// Every channel of the broadcast network is compared with the unit's own
// barrier id (all 65 bits, so a message for another instance of the same
// barrier, with the other sense, does not match). Messages for other barriers
// are discarded. The unit's own channel is masked because a unit does not
// receive its own broadcast. Matching messages are decoded by type: per-channel
// bit vectors for ENTRY and REPLY (for the adder and comparator trees), and
// single flags for RELEASE, TRANSFER, COUNT and for any message that proves a
// co-ordinator exists (ACCEPT, TRANSFER or COUNT; treating the last two as an
// acknowledgement is this design's choice). Combinational.
module bid_comparators
  import barrier_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  chan_t [N-1:0]            rx_i,
  input  logic [N-1:0]             self_mask_i,  // one-hot: own channel
  input  logic                     en_i,         // unit holds a barrier id
  input  bid_t                     bid_i,
  output logic [N-1:0]             entry_o,
  output logic [N-1:0]             reply_o,
  output logic [N-1:0][TID_W-1:0]  tid_o,
  output logic                     accept_o,
  output logic                     release_o,
  output logic                     transfer_o,
  output logic                     count_o,
  output logic [TID_W-1:0]         count_val_o
);
  logic [N-1:0] hit;
  always_comb begin
    entry_o     = '0;
    reply_o     = '0;
    accept_o    = 1'b0;
    release_o   = 1'b0;
    transfer_o  = 1'b0;
    count_o     = 1'b0;
    count_val_o = '0;
    for (int i = 0; i < N; i++) begin
      hit[i]   = en_i && rx_i[i].valid && !self_mask_i[i] && (rx_i[i].msg.bid == bid_i);
      tid_o[i] = rx_i[i].msg.field;
      if (hit[i]) begin
        unique case (rx_i[i].msg.mtype)
          MSG_ENTRY:    entry_o[i] = 1'b1;
          MSG_REPLY:    reply_o[i] = 1'b1;
          MSG_ACCEPT:   accept_o   = 1'b1;
          MSG_RELEASE:  release_o  = 1'b1;
          MSG_TRANSFER: begin transfer_o = 1'b1; accept_o = 1'b1; end
          MSG_COUNT:    begin count_o = 1'b1; accept_o = 1'b1; count_val_o = rx_i[i].msg.field; end
          default: ;
        endcase
      end
    end
  end
endmodule
