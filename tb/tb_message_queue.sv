// Testbench for message_queue, the station's queue between the message
// controller and the barrier-buffer pipeline. Random pushes (only when the
// queue says it has room, as the controller does) and random pops are checked
// against a reference queue: order, contents, the ready and valid flags and the
// size output. The queue is driven to full and to empty during the run.
module tb_message_queue;
  import barrier_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b1;
  logic push_valid, push_ready, pop_valid, pop_ready;
  msg_t push_msg, pop_msg;
  logic [$clog2(DEPTH+1)-1:0] size;
  msg_t ref_q [$];
  bit   saw_full = 0, saw_empty = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  message_queue #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n),
    .push_valid_i(push_valid), .push_ready_o(push_ready), .push_msg_i(push_msg),
    .pop_valid_o(pop_valid), .pop_ready_i(pop_ready), .pop_msg_o(pop_msg), .size_o(size));

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
    push_valid = 1'b0; pop_ready = 1'b0; push_msg = '0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check(int'(size) == ref_q.size(), "size output");
      check(push_ready == (ref_q.size() < DEPTH), "ready flag");
      check(pop_valid == (ref_q.size() != 0), "valid flag");
      if (ref_q.size() != 0) check(pop_msg == ref_q[0], "head message");
      if (ref_q.size() == DEPTH) saw_full = 1;
      if (ref_q.size() == 0 && k > 100) saw_empty = 1;
      // phases of filling and draining
      push_valid = push_ready && (((k / 100) % 2 == 0) ? ($urandom_range(0, 3) != 0)
                                                       : ($urandom_range(0, 3) == 0));
      push_msg   = mk_msg(msg_type_e'($urandom_range(0, 1)), {$urandom, $urandom, 1'($urandom)},
                          TID_W'($urandom));
      pop_ready  = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (pop_ready && ref_q.size() != 0) void'(ref_q.pop_front());
      if (push_valid) ref_q.push_back(push_msg);
    end
    check(saw_full && saw_empty, "queue reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
