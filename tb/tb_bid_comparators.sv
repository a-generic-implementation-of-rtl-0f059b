// Testbench for bid_comparators, the 64 barrier-id comparators of a barrier
// unit. Each channel randomly carries a message whose barrier id equals the
// unit's own, or differs from it only in the address, only in the process id
// or only in the sense bit. The bench works out which messages must match
// (valid, not the unit's own channel, enable set, all 65 bits equal) and
// checks the per-channel ENTRY/REPLY flags, the thread-id fields and the
// ACCEPT/RELEASE/TRANSFER/COUNT summary outputs (TRANSFER and COUNT also
// count as an acknowledgement). Combinational; the clock paces the stimulus.
module tb_bid_comparators;
  import barrier_pkg::*;
  localparam int N = 64;

  logic                    clk = 1'b0;
  chan_t [N-1:0]           rx;
  logic  [N-1:0]           self_mask;
  logic                    en;
  bid_t                    bid;
  logic  [N-1:0]           entry, reply;
  logic  [N-1:0][TID_W-1:0] tid;
  logic                    accept, release_, transfer, count;
  logic  [TID_W-1:0]       count_val;
  int                      checks = 0, failures = 0;
  int                      n_near = 0;

  always #5 clk = ~clk;

  bid_comparators #(.N(N)) dut (
    .rx_i(rx), .self_mask_i(self_mask), .en_i(en), .bid_i(bid),
    .entry_o(entry), .reply_o(reply), .tid_o(tid), .accept_o(accept), .release_o(release_),
    .transfer_o(transfer), .count_o(count), .count_val_o(count_val));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      logic [N-1:0] e_entry, e_reply;
      bit e_acc, e_rel, e_tr, e_cnt;
      logic [TID_W-1:0] e_cval;
      int self;
      bid       = {$urandom, $urandom, 1'($urandom)};
      en        = ($urandom_range(0, 7) != 0);
      self      = $urandom_range(0, N - 1);
      self_mask = N'(1) << self;
      e_entry = '0; e_reply = '0; e_acc = 0; e_rel = 0; e_tr = 0; e_cnt = 0; e_cval = '0;
      for (int i = 0; i < N; i++) begin
        int kind, bitpos;
        bit hit;
        rx[i].valid     = ($urandom_range(0, 3) != 0);
        rx[i].msg.mtype = msg_type_e'($urandom_range(0, 6));
        rx[i].msg.field = TID_W'($urandom);
        rx[i].msg.bid   = bid;
        kind = $urandom_range(0, 5);
        bitpos = $urandom_range(0, ADDR_W - 1);
        if (kind == 1) rx[i].msg.bid.addr[bitpos] = !bid.addr[bitpos];
        if (kind == 2) rx[i].msg.bid.pid[bitpos % PID_W] = !bid.pid[bitpos % PID_W];
        if (kind == 3) rx[i].msg.bid.sense ^= 1'b1;
        if (kind >= 1 && kind <= 3) n_near++;
        // only a few acknowledgement-type messages, so that "none" also occurs
        if (rx[i].msg.mtype inside {MSG_ACCEPT, MSG_RELEASE, MSG_TRANSFER, MSG_COUNT} &&
            $urandom_range(0, 15) != 0) rx[i].valid = 1'b0;
        hit = en && rx[i].valid && (i != self) && (kind == 0 || kind > 3);
        if (hit) begin
          case (rx[i].msg.mtype)
            MSG_ENTRY:    e_entry[i] = 1'b1;
            MSG_REPLY:    e_reply[i] = 1'b1;
            MSG_ACCEPT:   e_acc = 1;
            MSG_RELEASE:  e_rel = 1;
            MSG_TRANSFER: begin e_tr = 1; e_acc = 1; end
            MSG_COUNT:    begin e_cnt = 1; e_acc = 1; e_cval = rx[i].msg.field; end
            default: ;
          endcase
        end
      end
      @(posedge clk);
      check(entry == e_entry, "ENTRY flags");
      check(reply == e_reply, "REPLY flags");
      for (int i = 0; i < N; i++) check(tid[i] == rx[i].msg.field, "thread id field");
      check(accept == e_acc && release_ == e_rel && transfer == e_tr && count == e_cnt,
            "acknowledgement, RELEASE, TRANSFER, COUNT flags");
      if (e_cnt) check(count_val == e_cval, "COUNT value");
    end
    check(n_near > 0, "near-miss barrier ids were presented");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
