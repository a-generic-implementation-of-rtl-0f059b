// Testbench for min_tid_detector: the comparator tree that finds the smallest
// thread id among the channels carrying a matching message. Random valid masks
// and random 6-bit ids on all 64 inputs, plus the empty mask and single inputs,
// are compared with a linear search in the bench. Combinational block; the
// clock only paces the stimulus.
module tb_min_tid_detector;
  import barrier_pkg::*;
  localparam int N = 64;

  logic                    clk = 1'b0;
  logic [N-1:0]            valid;
  logic [N-1:0][TID_W-1:0] tid;
  logic                    any;
  logic [TID_W-1:0]        mn;
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  min_tid_detector #(.N(N)) dut (.valid_i(valid), .tid_i(tid), .any_o(any), .min_o(mn));

  task automatic try();
    int best = -1;
    for (int i = 0; i < N; i++)
      if (valid[i] && (best < 0 || int'(tid[i]) < best)) best = int'(tid[i]);
    @(posedge clk);
    checks++;
    if (any != (best >= 0) || (best >= 0 && int'(mn) != best)) begin
      failures++;
      $display("FAIL: any=%b min=%0d expected %0d", any, mn, best);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = '0;
    for (int i = 0; i < N; i++) tid[i] = TID_W'(i);
    try();
    for (int i = 0; i < N; i++) begin valid = N'(1) << i; try(); end
    for (int k = 0; k < 2000; k++) begin
      valid = {$urandom, $urandom};
      if (k % 4 == 0) valid &= {$urandom, $urandom} & {$urandom, $urandom};
      for (int i = 0; i < N; i++) tid[i] = TID_W'($urandom);
      try();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
