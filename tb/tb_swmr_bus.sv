// Testbench for swmr_bus, the behavioural model of the optical broadcast
// network: every writer's channel must reach every reader exactly LAT cycles
// later, with no change to the message. Random traffic on all 64 channels is
// compared with a copy delayed in the bench; reset must clear the channels.
module tb_swmr_bus;
  import barrier_pkg::*;
  localparam int N   = 64;
  localparam int LAT = 1;

  logic          clk = 1'b0, rst_n = 1'b1;
  chan_t [N-1:0] tx, rx, prev;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  swmr_bus #(.N(N), .LAT(LAT)) dut (.clk(clk), .rst_n(rst_n), .tx_i(tx), .rx_o(rx));

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx = '0;
    #1 rst_n = 1'b0;
    #20 checks++;
    if (rx != '0) begin failures++; $display("FAIL: channels not cleared by reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      prev = tx;
      for (int i = 0; i < N; i++) begin
        tx[i].valid       = 1'($urandom);
        tx[i].msg.mtype   = msg_type_e'($urandom_range(0, 6));
        tx[i].msg.bid     = {$urandom, $urandom, 1'($urandom)};
        tx[i].msg.field   = TID_W'($urandom);
      end
      @(posedge clk); #1;
      checks++;
      if (rx != tx) begin failures++; $display("FAIL: cycle %0d channels differ", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
