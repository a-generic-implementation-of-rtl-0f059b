// Testbench for entry_counter: the adder tree that counts ENTRY messages.
// Drives all-zero, all-one, one-hot and random vectors into the full 64-input
// tree and compares the sum with a population count worked out in the bench.
// The block is combinational; a clock only paces the stimulus and the watchdog.
module tb_entry_counter;
  localparam int N  = 64;
  localparam int SW = $clog2(N + 1);

  logic          clk = 1'b0;
  logic [N-1:0]  bits;
  logic [SW-1:0] sum;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  entry_counter #(.N(N)) dut (.bits_i(bits), .sum_o(sum));

  function automatic int popcount(input logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic try(input logic [N-1:0] v);
    bits = v;
    @(posedge clk);
    checks++;
    if (int'(sum) != popcount(v)) begin
      failures++;
      $display("FAIL: bits=%h sum=%0d expected %0d", v, sum, popcount(v));
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
    try('0);
    try('1);
    for (int i = 0; i < N; i++) try(N'(1) << i);
    for (int k = 0; k < 2000; k++) try({$urandom, $urandom} & ({$urandom, $urandom} | {$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
