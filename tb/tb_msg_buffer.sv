// Testbench for msg_buffer, the 4-deep buffer behind each input channel of the
// central station. Random arrivals and random pops are checked against a
// reference queue in the bench: order, contents, the valid flag, and that a
// message arriving at a full buffer (with no pop in the same cycle) is dropped
// and sets the lost flag. Arrivals are taken at the clock edge; the head is
// visible in the cycle after.
module tb_msg_buffer;
  import barrier_pkg::*;
  localparam int DEPTH = 4;

  logic  clk = 1'b0, rst_n = 1'b1;
  chan_t in;
  logic  valid, pop, lost;
  msg_t  msg;
  msg_t  ref_q [$];
  bit    ref_lost;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  msg_buffer #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .in_i(in), .valid_o(valid),
    .msg_o(msg), .pop_i(pop), .lost_o(lost));

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
    in = '0; pop = 1'b0; ref_lost = 0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // compare the visible state with the reference
      check(valid == (ref_q.size() != 0), "valid flag");
      if (ref_q.size() != 0) check(msg == ref_q[0], "head message");
      check(lost == ref_lost, "lost flag");
      // bursts fill the buffer, quiet phases drain it
      in.valid     = ((k / 50) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 5) == 0);
      in.msg       = mk_msg(msg_type_e'($urandom_range(0, 1)), {$urandom, $urandom, 1'($urandom)},
                            TID_W'($urandom));
      pop          = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      begin
        bit did_pop;
        did_pop = pop && ref_q.size() != 0;
        if (did_pop) void'(ref_q.pop_front());
        if (in.valid) begin
          if (ref_q.size() < DEPTH) ref_q.push_back(in.msg);
          else ref_lost = 1;
        end
      end
    end
    check(ref_lost, "the test filled the buffer at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
