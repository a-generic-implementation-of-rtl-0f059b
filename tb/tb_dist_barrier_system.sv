// tb_dist_barrier_system: self-checking test of the distributed-protocol system
// (8 units, short tau_w) against a reference model of barrier semantics.
//
// The reference keeps, per barrier address and sense, how many threads have
// called barrier_wait(). Every release is checked: the thread must be waiting,
// all `capacity` threads of that barrier instance must have arrived, and each
// waiting thread is released exactly once. Scenarios: first barrier with no
// co-ordinator (election), release latency with a co-ordinator present
// (3 rounds = 6 cycles), staggered arrivals, two barriers at once, a waiting
// thread swapped out and back in after the release, a co-ordinator hand-over by
// TRANSFER/REPLY/COUNT, a co-ordinator write-back when nobody can take over,
// thread migration to another core and an ENTRY left pending by a swap-out.
module tb_dist_barrier_system;
  import barrier_pkg::*;

  localparam int N    = 8;
  localparam int M    = 2;
  localparam int TAU  = 6;
  localparam int RLAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic     [N-1:0] wait_valid, wait_ready, rel_valid, rel_sense;
  bar_ctx_t [N-1:0] wait_ctx, so_ctx, si_ctx;
  logic     [N-1:0] so_req, so_done, si_valid, si_ready;
  logic     [N-1:0] mreq_valid, mreq_ready, mrsp_valid, is_coord;
  mem_req_t [N-1:0] mreq;
  mem_rsp_t [N-1:0] mrsp;
  chan_t    [N-1:0] bus;

  dist_barrier_system #(.N(N), .M(M), .TAU_W(TAU)) dut (
    .clk(clk), .rst_n(rst_n),
    .wait_valid_i(wait_valid), .wait_ready_o(wait_ready), .wait_ctx_i(wait_ctx),
    .rel_valid_o(rel_valid), .rel_sense_o(rel_sense),
    .so_req_i(so_req), .so_done_o(so_done), .so_ctx_o(so_ctx),
    .si_valid_i(si_valid), .si_ready_o(si_ready), .si_ctx_i(si_ctx),
    .mem_req_valid_o(mreq_valid), .mem_req_ready_i(mreq_ready), .mem_req_o(mreq),
    .mem_rsp_valid_i(mrsp_valid), .mem_rsp_i(mrsp), .is_coord_o(is_coord), .bus_o(bus));

  barrier_mem_model #(.N(N), .RLAT(RLAT)) u_mem (
    .clk(clk), .req_valid_i(mreq_valid), .req_ready_o(mreq_ready), .req_i(mreq),
    .rsp_valid_o(mrsp_valid), .rsp_o(mrsp), .probe_addr_i(probe_addr), .probe_o(probe));

  logic [ADDR_W-1:0] probe_addr;
  mem_rsp_t          probe;
  mem_rsp_t          w;
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

  // ------------------------------------------------------------ reference model
  // Thread t has tid t; thr_core[t] is the core it runs on (-1: swapped out).
  int           arrived [logic [ADDR_W:0]];
  logic [47:0]  t_addr  [N];
  int           t_cap   [N];
  logic         t_sense [N];
  bit           t_wait  [N];
  int           t_rels  [N];
  longint       t_acc   [N];
  longint       t_rel   [N];
  int           core_thr[N];   // thread on core, -1 if none
  int           n_release = 0, n_transfer = 0, n_reply = 0, n_count = 0, n_accept = 0;

  function automatic logic [ADDR_W:0] key(input logic [47:0] a, input logic s);
    return {a, s};
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (rel_valid[c]) begin
        int t;
        t = core_thr[c];
        check(t >= 0, $sformatf("release on core %0d with no thread", c));
        if (t >= 0) begin
          check(t_wait[t], $sformatf("thread %0d released but not waiting", t));
          check(arrived.exists(key(t_addr[t], t_sense[t])) &&
                arrived[key(t_addr[t], t_sense[t])] >= t_cap[t],
                $sformatf("thread %0d released before all %0d arrived", t, t_cap[t]));
          check(rel_sense[c] == !t_sense[t], "new local sense is flipped");
          t_wait[t]  = 0;
          t_sense[t] = rel_sense[c];
          t_rels[t]++;
          t_rel[t]   = cycle;
        end
      end
      if (bus[c].valid) begin
        unique case (bus[c].msg.mtype)
          MSG_RELEASE:  n_release++;
          MSG_TRANSFER: n_transfer++;
          MSG_REPLY:    n_reply++;
          MSG_COUNT:    n_count++;
          MSG_ACCEPT:   n_accept++;
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ drivers
  // All drive happens just after a rising edge; the DUT samples at the next one.
  task automatic waitcycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic to_round_start();
    // next edge at which the units' phase returns to 0
    while (((cycle + 1) % M) != 0) waitcycles(1);
  endtask

  // barrier_wait() by the threads in `thr` (all at once) on barrier `a`.
  task automatic bwait(input bit [N-1:0] thr, input logic [47:0] a, input int cap);
    bit [N-1:0] pending;
    pending = '0;
    for (int t = 0; t < N; t++) if (thr[t]) begin
      int c;
      c = -1;
      for (int k = 0; k < N; k++) if (core_thr[k] == t) c = k;
      if (c < 0) $fatal(1, "thread not on a core");
      t_addr[t] = a; t_cap[t] = cap;
      wait_ctx[c]              = '0;
      wait_ctx[c].bid.addr     = a;
      wait_ctx[c].bid.pid      = 16'h0042;
      wait_ctx[c].bid.sense    = t_sense[t];
      wait_ctx[c].capacity     = CNT_W'(cap);
      wait_ctx[c].tid          = TID_W'(t);
      wait_valid[c]            = 1'b1;
      pending[c]               = 1'b1;
    end
    while (pending != '0) begin
      @(posedge clk);
      for (int c = 0; c < N; c++) if (pending[c] && wait_ready[c]) begin
        int t;
        t = core_thr[c];
        pending[c] = 1'b0;
        t_wait[t]  = 1;
        t_acc[t]   = cycle;
        if (!arrived.exists(key(a, t_sense[t]))) arrived[key(a, t_sense[t])] = 0;
        arrived[key(a, t_sense[t])]++;
      end
      #1;
      for (int c = 0; c < N; c++) if (!pending[c]) wait_valid[c] = 1'b0;
    end
  endtask

  bar_ctx_t saved [N];

  task automatic swap_out(input int c);
    so_req[c] = 1'b1;
    do @(posedge clk); while (!so_done[c]);
    saved[core_thr[c]] = so_ctx[c];
    #1;
    so_req[c] = 1'b0;
    core_thr[c] = -1;
  endtask

  task automatic swap_in(input int t, input int c);
    si_ctx[c]   = saved[t];
    si_valid[c] = 1'b1;
    do @(posedge clk); while (!si_ready[c]);
    core_thr[c] = t;
    #1;
    si_valid[c] = 1'b0;
  endtask

  task automatic wait_released(input bit [N-1:0] thr, input int limit, input string what);
    int n;
    bit all;
    n = 0;
    do begin
      all = 1;
      for (int t = 0; t < N; t++) if (thr[t] && t_wait[t]) all = 0;
      if (!all) waitcycles(1);
      n++;
    end while (!all && n < limit);
    check(all, {what, ": all released"});
  endtask

  function automatic int ncoord();
    return $countones(is_coord);
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scenarios
  localparam logic [47:0] A = 48'h0000_1000_0040;
  localparam logic [47:0] B = 48'h0000_2000_0080;
  localparam bit [N-1:0] ALL = '1;

  initial begin
    wait_valid = '0; so_req = '0; si_valid = '0; wait_ctx = '0; si_ctx = '0;
    for (int t = 0; t < N; t++) begin
      t_sense[t] = 0; t_wait[t] = 0; t_rels[t] = 0; core_thr[t] = t;
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // reset releases at a known edge: units count rounds from here
    @(posedge clk); cycle = 0; #1;

    // 1. first barrier: nobody is co-ordinator, election picks thread 0
    bwait(ALL, A, N);
    wait_released(ALL, 200, "first barrier");
    check(ncoord() == 1 && is_coord[0], "thread 0's unit is the elected co-ordinator");
    memword(A);
    check(w.sense == 1'b1 && w.count == 0, "memory sense flipped, count 0");
    for (int t = 0; t < N; t++) check(t_rels[t] == 1, "one release per thread");

    // 2. co-ordinator present, everyone arrives at a round start: 3 rounds
    waitcycles(5);
    to_round_start();
    bwait(ALL, A, N);
    wait_released(ALL, 50, "second barrier");
    for (int t = 0; t < N; t++)
      check(t_rel[t] - t_acc[t] == 3 * M,
            $sformatf("thread %0d release latency %0d cycles, expected %0d", t,
                      t_rel[t] - t_acc[t], 3 * M));

    // 3. staggered arrivals, random gaps
    for (int rep = 0; rep < 3; rep++) begin
      int order [N];
      for (int t = 0; t < N; t++) order[t] = t;
      order.shuffle();
      for (int k = 0; k < N; k++) begin
        bwait(N'(1) << order[k], A, N);
        waitcycles($urandom_range(0, 7));
        if (k < N - 1) for (int t = 0; t < N; t++) check(t_rels[t] == 2 + rep, "no early release");
      end
      wait_released(ALL, 50, "staggered barrier");
    end

    // 4. two barriers at the same time: threads 0-3 on A, 4-7 on B
    bwait(8'h0F, A, 4);
    bwait(8'hF0, B, 4);
    wait_released(ALL, 300, "two simultaneous barriers");
    check(ncoord() == 2 && is_coord[0] && is_coord[4], "one co-ordinator per barrier");

    // 5. a waiting thread is swapped out; barrier is released while it is away
    bwait(8'h02, A, 4);
    waitcycles(8);
    swap_out(1);
    check(saved[1].waiting, "context says waiting");
    bwait(8'h0D, A, 4);
    wait_released(8'h0D, 50, "barrier with one thread away");
    check(t_wait[1], "swapped-out thread not yet released");
    swap_in(1, 1);
    wait_released(8'h02, TAU + RLAT + 20, "released by the sense check after swap-in");

    // 6. co-ordinator hand-over: threads 1,2,3 wait, co-ordinator 0's thread is swapped out
    bwait(8'h0E, A, 4);
    waitcycles(8);
    begin
      int tr0;
      tr0 = n_transfer;
      swap_out(0);
      check(n_transfer > tr0, "TRANSFER sent");
    end
    waitcycles(4);
    check(is_coord[1] && !is_coord[0], "thread 1 took over as co-ordinator");
    check(n_count > 0 && n_reply >= 3, "REPLY and COUNT messages seen");
    swap_in(0, 0);      // thread 0 comes back, not waiting
    waitcycles(6);
    for (int t = 1; t < 4; t++) check(t_wait[t], "threads 1-3 still waiting for thread 0");
    check(ncoord() == 2, "still one co-ordinator per barrier");
    bwait(8'h01, A, 4);
    wait_released(8'h0F, 50, "barrier after hand-over");

    // 7. write-back: co-ordinator 4 of barrier B waits alone, swapped out, nobody to take over
    bwait(8'h10, B, 4);
    waitcycles(4);
    swap_out(4);
    memword(B);
    check(w.count == 1 && w.sense == t_sense[4],
          "count and sense written back to memory");
    check(!is_coord[4] && !is_coord[5] && !is_coord[6] && !is_coord[7], "no co-ordinator for B");
    // thread 4 migrates to core 4 again later; 5,6,7 arrive and elect, read count from memory
    bwait(8'hE0, B, 4);
    wait_released(8'hE0, 200, "barrier completed using the stored count");
    check(t_wait[4], "thread 4 still swapped out");
    // 8. migration: thread 4 resumes on core 4 after the release
    swap_in(4, 4);
    wait_released(8'h10, TAU + RLAT + 20, "migrated thread released by sense check");

    // 9. ENTRY pending: thread 5 is swapped out right after barrier_wait()
    to_round_start();
    waitcycles(1);
    bwait(8'h20, B, 4);
    so_req[5] = 1'b1;                 // taken at the coming round end, before ENTRY
    do @(posedge clk); while (!so_done[5]);
    saved[5] = so_ctx[5];
    #1 so_req[5] = 1'b0; core_thr[5] = -1;
    check(saved[5].entry_pending, "context records the unsent ENTRY");
    swap_in(5, 5);
    bwait(8'hD0, B, 4);
    wait_released(8'hF0, 100, "barrier with a pending ENTRY");

    for (int t = 0; t < N; t++) check(!t_wait[t], "nobody left waiting");
    check(n_release > 0 && n_accept > 0, "RELEASE and ACCEPT seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
