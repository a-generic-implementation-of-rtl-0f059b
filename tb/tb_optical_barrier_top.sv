// tb_optical_barrier_top: end-to-end test of both barrier systems at their
// default size (64 cores, 16 channels, 32 barrier entries, tau_w = 200).
//
// A behavioural main memory serves both systems. A reference model checks
// every release (the thread was waiting, every thread of that barrier instance
// had arrived, the new local sense is flipped) and that no thread is left
// waiting. Each mechanism of the design is made to happen and counted; a
// mechanism that never happened counts as a failure:
//   distributed: election without co-ordinator, the election retry, ACCEPT,
//   RELEASE with the 6-cycle latency, co-ordinator hand-over (TRANSFER, REPLY,
//   COUNT), write-back when nobody can take over, co-ordinator read of the
//   stored count, swap-in sense check, pending ENTRY, several barriers at once.
//   centralized: REGISTER, direct path, message queue, same-barrier stall,
//   overflow of the barrier buffer, swap-in sense check, pending ENTRY.
module tb_optical_barrier_top;
  import barrier_pkg::*;

  localparam int N    = 64;
  localparam int NCH  = 16;
  localparam int M    = 2;
  localparam int TAU  = 200;
  localparam int RLAT = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  // two copies of every core-side signal: index 0 distributed, 1 centralized
  logic     [1:0][N-1:0] wait_valid, wait_ready, rel_valid, rel_sense;
  bar_ctx_t [1:0][N-1:0] wait_ctx, so_ctx, si_ctx;
  logic     [1:0][N-1:0] so_req, so_done, si_valid, si_ready;
  logic     [N-1:0]      init_valid, init_ready;
  bar_ctx_t [N-1:0]      init_ctx;
  logic     [2*N:0]      mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t [2*N:0]      mreq;
  mem_rsp_t [2*N:0]      mrsp;
  logic     [N-1:0]      is_coord;
  chan_t    [N-1:0]      bus;
  logic                  overflow, spill_valid, miss_valid, bypass, stall;
  msg_t                  spill_msg, miss_msg;
  logic     [NCH-1:0]    lost;
  logic     [4:0]        qsize;

  optical_barrier_top dut (
    .clk(clk), .rst_n(rst_n),
    .d_wait_valid_i(wait_valid[0]), .d_wait_ready_o(wait_ready[0]), .d_wait_ctx_i(wait_ctx[0]),
    .d_rel_valid_o(rel_valid[0]), .d_rel_sense_o(rel_sense[0]),
    .d_so_req_i(so_req[0]), .d_so_done_o(so_done[0]), .d_so_ctx_o(so_ctx[0]),
    .d_si_valid_i(si_valid[0]), .d_si_ready_o(si_ready[0]), .d_si_ctx_i(si_ctx[0]),
    .d_mem_req_valid_o(mreq_valid[N-1:0]), .d_mem_req_ready_i(mreq_ready[N-1:0]),
    .d_mem_req_o(mreq[N-1:0]), .d_mem_rsp_valid_i(mrsp_valid[N-1:0]), .d_mem_rsp_i(mrsp[N-1:0]),
    .d_is_coord_o(is_coord), .d_bus_o(bus),
    .c_init_valid_i(init_valid), .c_init_ready_o(init_ready), .c_init_ctx_i(init_ctx),
    .c_wait_valid_i(wait_valid[1]), .c_wait_ready_o(wait_ready[1]), .c_wait_ctx_i(wait_ctx[1]),
    .c_rel_valid_o(rel_valid[1]), .c_rel_sense_o(rel_sense[1]),
    .c_so_req_i(so_req[1]), .c_so_done_o(so_done[1]), .c_so_ctx_o(so_ctx[1]),
    .c_si_valid_i(si_valid[1]), .c_si_ready_o(si_ready[1]), .c_si_ctx_i(si_ctx[1]),
    .c_mem_req_valid_o(mreq_valid[2*N-1:N]), .c_mem_req_ready_i(mreq_ready[2*N-1:N]),
    .c_mem_req_o(mreq[2*N-1:N]), .c_mem_rsp_valid_i(mrsp_valid[2*N-1:N]),
    .c_mem_rsp_i(mrsp[2*N-1:N]),
    .c_st_mem_wr_valid_o(mreq_valid[2*N]), .c_st_mem_wr_o(mreq[2*N]),
    .c_overflow_o(overflow), .c_spill_valid_o(spill_valid), .c_spill_msg_o(spill_msg),
    .c_miss_valid_o(miss_valid), .c_miss_msg_o(miss_msg), .c_lost_o(lost),
    .c_queue_size_o(qsize), .c_bypass_o(bypass), .c_stall_o(stall));

  logic [ADDR_W-1:0] probe_addr;
  mem_rsp_t          probe, w;
  barrier_mem_model #(.N(2 * N + 1), .RLAT(RLAT)) u_mem (
    .clk(clk), .req_valid_i(mreq_valid), .req_ready_o(mreq_ready), .req_i(mreq),
    .rsp_valid_o(mrsp_valid), .rsp_o(mrsp), .probe_addr_i(probe_addr), .probe_o(probe));

  task automatic memword(input logic [ADDR_W-1:0] a);
    probe_addr = a;
    #1;
    w = probe;
  endtask

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_elect = 0, n_retry = 0, n_trans_elect = 0, n_wb = 0, n_swap_rel_d = 0, n_rd_count = 0;
  int n_accept = 0, n_release = 0, n_transfer = 0, n_reply = 0, n_count = 0;
  int max_q = 0, n_bypass = 0, n_stall = 0, n_spill = 0, n_rel_mem_c = 0;
  int n_pending_d = 0, n_pending_c = 0;

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.u_dist.g_unit[i].u_unit.u_bw.elect_o) n_elect++;
      if (dut.u_dist.g_unit[i].u_unit.u_bw.round_end_i &&
          dut.u_dist.g_unit[i].u_unit.u_bw.state_q == 3'd4 &&   // E3
          dut.u_dist.g_unit[i].u_unit.u_bw.tx_entry_o) n_retry++;
      if (dut.u_dist.g_unit[i].u_unit.u_cs.elect_trans_o) n_trans_elect++;
      if (dut.u_dist.g_unit[i].u_unit.u_cs.mem_req_valid_o &&
          dut.u_dist.g_unit[i].u_unit.u_cs.mem_req_o.write) n_wb++;
      if (dut.u_dist.g_unit[i].u_unit.u_cs.swap_release_o) n_swap_rel_d++;
      if (dut.u_dist.g_unit[i].u_unit.u_co.mem_add != '0) n_rd_count++;
      if (dut.u_cent.g_unit[i].u_unit.rel_mem) n_rel_mem_c++;
      // every message is on the bus for one round; count it once
      if (dut.u_dist.g_unit[i].u_unit.round_end && bus[i].valid) begin
        unique case (bus[i].msg.mtype)
          MSG_ACCEPT:   n_accept++;
          MSG_RELEASE:  n_release++;
          MSG_TRANSFER: n_transfer++;
          MSG_REPLY:    n_reply++;
          MSG_COUNT:    n_count++;
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ reference model
  int           arrived [logic [ADDR_W+1:0]];
  logic [47:0]  t_addr  [2][N];
  int           t_cap   [2][N];
  logic         t_sense [2][N];   // local sense of the barrier a thread waits on
  logic         b_sense [2][N][logic [47:0]];  // local sense per thread and barrier
  bit           t_wait  [2][N];
  longint       t_acc   [2][N];
  longint       t_rel   [2][N];
  int           core_thr[2][N];

  function automatic logic [ADDR_W+1:0] key(input int s, input logic [47:0] a, input logic se);
    return {s[0], a, se};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (int'(qsize) > max_q) max_q = int'(qsize);
    if (bypass) n_bypass++;
    if (stall) n_stall++;
    if (spill_valid) n_spill++;
    if (lost != '0) begin failures++; $display("FAIL: message lost"); end
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < N; c++)
        if (rel_valid[s][c]) begin
          int t;
          t = core_thr[s][c];
          checks++;
          if (t < 0 || !t_wait[s][t] ||
              !arrived.exists(key(s, t_addr[s][t], t_sense[s][t])) ||
              arrived[key(s, t_addr[s][t], t_sense[s][t])] < t_cap[s][t] ||
              rel_sense[s][c] != !t_sense[s][t]) begin
            failures++;
            $display("FAIL @%0d: bad release system %0d core %0d", cycle, s, c);
          end
          if (t >= 0) begin
            t_wait[s][t]  = 0;
            t_sense[s][t] = rel_sense[s][c];
            b_sense[s][t][t_addr[s][t]] = rel_sense[s][c];
            t_rel[s][t]   = cycle;
          end
        end
  end

  task automatic waitcycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic to_round_start();
    while (((cycle + 1) % M) != 0) waitcycles(1);
  endtask

  task automatic binit(input int c, input logic [47:0] a, input int cap);
    init_ctx[c]          = '0;
    init_ctx[c].bid.addr = a;
    init_ctx[c].bid.pid  = 16'h0007;
    init_ctx[c].capacity = CNT_W'(cap);
    init_valid[c]        = 1'b1;
    do @(posedge clk); while (!init_ready[c]);
    #1 init_valid[c] = 1'b0;
  endtask

  // barrier_wait() of the threads in thr, on system s
  task automatic bwait(input int s, input bit [N-1:0] thr, input logic [47:0] a, input int cap);
    bit [N-1:0] pending;
    pending = '0;
    for (int t = 0; t < N; t++) if (thr[t]) begin
      int c;
      c = -1;
      for (int k = 0; k < N; k++) if (core_thr[s][k] == t) c = k;
      if (c < 0) $fatal(1, "thread not on a core");
      t_addr[s][t] = a; t_cap[s][t] = cap;
      t_sense[s][t] = b_sense[s][t].exists(a) ? b_sense[s][t][a] : 1'b0;
      wait_ctx[s][c]           = '0;
      wait_ctx[s][c].bid.addr  = a;
      wait_ctx[s][c].bid.pid   = 16'h0007;
      wait_ctx[s][c].bid.sense = t_sense[s][t];
      wait_ctx[s][c].capacity  = CNT_W'(cap);
      wait_ctx[s][c].tid       = TID_W'(t);
      wait_valid[s][c]         = 1'b1;
      pending[c]               = 1'b1;
    end
    while (pending != '0) begin
      @(posedge clk);
      for (int c = 0; c < N; c++) if (pending[c] && wait_ready[s][c]) begin
        int t;
        t = core_thr[s][c];
        pending[c]   = 1'b0;
        t_wait[s][t] = 1;
        t_acc[s][t]  = cycle;
        if (!arrived.exists(key(s, a, t_sense[s][t]))) arrived[key(s, a, t_sense[s][t])] = 0;
        arrived[key(s, a, t_sense[s][t])]++;
      end
      #1;
      for (int c = 0; c < N; c++) if (!pending[c]) wait_valid[s][c] = 1'b0;
    end
  endtask

  bar_ctx_t saved [2][N];

  task automatic swap_out(input int s, input int c);
    so_req[s][c] = 1'b1;
    do @(posedge clk); while (!so_done[s][c]);
    saved[s][core_thr[s][c]] = so_ctx[s][c];
    if (so_ctx[s][c].entry_pending) begin
      if (s == 0) n_pending_d++; else n_pending_c++;
    end
    #1;
    so_req[s][c] = 1'b0;
    core_thr[s][c] = -1;
  endtask

  task automatic swap_in(input int s, input int t, input int c);
    si_ctx[s][c]   = saved[s][t];
    si_valid[s][c] = 1'b1;
    do @(posedge clk); while (!si_ready[s][c]);
    core_thr[s][c] = t;
    #1;
    si_valid[s][c] = 1'b0;
  endtask

  task automatic wait_released(input int s, input bit [N-1:0] thr, input int limit,
                               input string what);
    int n;
    bit all;
    n = 0;
    do begin
      all = 1;
      for (int t = 0; t < N; t++) if (thr[t] && t_wait[s][t]) all = 0;
      if (!all) waitcycles(1);
      n++;
    end while (!all && n < limit);
    check(all, {what, ": all released"});
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [47:0] A = 48'h0000_0100_0000;
  localparam logic [47:0] B = 48'h0000_0200_0000;
  localparam logic [47:0] D = 48'h0000_0300_0000;
  localparam bit [N-1:0] ALL = '1;
  localparam bit [N-1:0] LO  = 64'h0000_0000_FFFF_FFFF;
  localparam bit [N-1:0] HI  = 64'hFFFF_FFFF_0000_0000;

  initial begin
    wait_valid = '0; so_req = '0; si_valid = '0; init_valid = '0;
    wait_ctx = '0; si_ctx = '0; init_ctx = '0; probe_addr = '0;
    for (int s = 0; s < 2; s++)
      for (int t = 0; t < N; t++) begin
        t_sense[s][t] = 0; t_wait[s][t] = 0; core_thr[s][t] = t;
      end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); cycle = 0; #1;

    // ================= distributed protocol
    // all 64 threads, no co-ordinator yet: election, memory read, release
    bwait(0, ALL, A, N);
    wait_released(0, ALL, TAU + 200, "D: first barrier of 64 threads");
    check(is_coord[0] && $countones(is_coord) == 1, "D: thread 0 elected");
    // with a co-ordinator, at a round start: 3 rounds
    waitcycles(3);
    to_round_start();
    bwait(0, ALL, A, N);
    wait_released(0, ALL, 50, "D: second barrier");
    for (int t = 0; t < N; t++)
      check(t_rel[0][t] - t_acc[0][t] == 3 * M, "D: release 6 cycles after the round start");
    // random arrival order
    begin
      int order [N];
      for (int t = 0; t < N; t++) order[t] = t;
      order.shuffle();
      for (int k = 0; k < N; k++) begin
        bwait(0, N'(1) << order[k], A, N);
        if ($urandom_range(0, 3) == 0) waitcycles($urandom_range(1, 5));
      end
      wait_released(0, ALL, 50, "D: random arrivals");
    end
    // two barriers: A for threads 0-31, B for 32-63 (new co-ordinator for B)
    bwait(0, HI, B, 32);
    bwait(0, LO, A, 32);
    wait_released(0, ALL, TAU + 200, "D: two barriers");
    // election retry: 41 arrives a round before 40 on a fresh barrier D
    to_round_start();
    bwait(0, 64'h1 << 41, D, 3);
    waitcycles(2);
    bwait(0, 64'h1 << 40, D, 3);
    waitcycles(TAU + 60);
    bwait(0, 64'h1 << 42, D, 3);
    wait_released(0, 64'h7 << 40, 60, "D: barrier after the election retry");
    // hand-over: threads 1-31 wait on A, co-ordinator 0 (idle) is swapped out
    bwait(0, LO & ~64'h1, A, 32);
    waitcycles(6);
    swap_out(0, 0);
    waitcycles(6);
    check(is_coord[1], "D: thread 1 took over A");
    swap_in(0, 0, 0);
    bwait(0, 64'h1, A, 32);
    wait_released(0, LO, 50, "D: barrier after hand-over");
    // write-back: B's co-ordinator (thread 32) waits alone and is swapped out
    bwait(0, 64'h1 << 32, B, 32);
    waitcycles(6);
    swap_out(0, 32);
    memword(B);
    check(w.count == 1, "D: count written back");
    // a waiting thread swapped out before the release, a pending ENTRY
    bwait(0, 64'h1 << 33, B, 32);
    waitcycles(TAU + 60);      // 33 elects itself and reads the stored count
    swap_out(0, 33);
    to_round_start();
    waitcycles(1);
    bwait(0, 64'h1 << 34, B, 32);
    swap_out(0, 34);
    bwait(0, HI & ~(64'h7 << 32), B, 32);
    swap_in(0, 34, 34);        // sends its pending ENTRY
    wait_released(0, HI & ~(64'h3 << 32), TAU + RLAT + 100, "D: B without 32 and 33");
    swap_in(0, 32, 32);
    swap_in(0, 33, 33);
    wait_released(0, 64'h3 << 32, TAU + RLAT + 20, "D: swapped-out threads released");

    // ================= centralized protocol
    binit(0, A, N);
    waitcycles(10);
    bwait(1, ALL, A, N);
    wait_released(1, ALL, 300, "C: 64 threads at once");
    // last arrival latency
    bwait(1, ALL & ~64'h1, A, N);
    waitcycles(300);        // the 63 ENTRY messages drain through the station
    bwait(1, 64'h1, A, N);
    wait_released(1, ALL, 50, "C: last arrival");
    check(t_rel[1][0] - t_acc[1][0] == 7,
          $sformatf("C: release 7 cycles after the last request (got %0d)", t_rel[1][0] - t_acc[1][0]));
    // swap-out while waiting, pending ENTRY
    bwait(1, 64'h2, A, N);
    waitcycles(10);
    swap_out(1, 1);
    bwait(1, 64'h4, A, N);
    swap_out(1, 2);
    bwait(1, ALL & ~64'h6, A, N);
    waitcycles(50);
    swap_in(1, 2, 2);
    wait_released(1, ALL & ~64'h2, 300, "C: barrier with a thread away");
    swap_in(1, 1, 1);
    wait_released(1, 64'h2, TAU + RLAT + 20, "C: swapped-out thread released");
    // fill the barrier buffer: 31 more barriers fit, the 33rd overflows
    for (int k = 1; k <= 32; k++) binit(k, 48'h0000_1000_0000 + 48'(k) * 64, 2);
    waitcycles(20);
    check(overflow && n_spill == 1, "C: overflow bit set by the 33rd barrier");

    for (int s = 0; s < 2; s++)
      for (int t = 0; t < N; t++) check(!t_wait[s][t], "nobody left waiting");

    // every mechanism happened
    check(n_elect >= 3,       "mechanism: election");
    check(n_retry > 0,        "mechanism: election retry");
    check(n_accept > 0,       "mechanism: ACCEPT");
    check(n_release > 0,      "mechanism: RELEASE");
    check(n_transfer > 0 && n_reply > 0 && n_count > 0 && n_trans_elect > 0,
          "mechanism: co-ordinator hand-over");
    check(n_wb > 0,           "mechanism: write-back");
    check(n_rd_count > 0,     "mechanism: stored count read by a new co-ordinator");
    check(n_swap_rel_d > 0,   "mechanism: distributed swap-in sense check");
    check(n_pending_d > 0,    "mechanism: distributed pending ENTRY");
    check(n_bypass > 0,       "mechanism: station direct path");
    check(max_q > 0,          "mechanism: station message queue");
    check(n_stall > 0,        "mechanism: station same-barrier stall");
    check(n_spill > 0,        "mechanism: barrier buffer overflow");
    check(n_rel_mem_c > 0,    "mechanism: centralized swap-in sense check");
    check(n_pending_c > 0,    "mechanism: centralized pending ENTRY");
    $display("elect=%0d retry=%0d accept=%0d release=%0d transfer=%0d reply=%0d count=%0d",
             n_elect, n_retry, n_accept, n_release, n_transfer, n_reply, n_count);
    $display("trans_elect=%0d wb=%0d rdcount=%0d swaprel=%0d pend_d=%0d bypass=%0d maxq=%0d stall=%0d spill=%0d relmem_c=%0d pend_c=%0d",
             n_trans_elect, n_wb, n_rd_count, n_swap_rel_d, n_pending_d, n_bypass, max_q,
             n_stall, n_spill, n_rel_mem_c, n_pending_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
