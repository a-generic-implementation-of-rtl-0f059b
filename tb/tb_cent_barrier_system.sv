// tb_cent_barrier_system: self-checking test of the centralized-protocol system
// (8 cores in 4 clusters, a 2-entry barrier buffer so that it overflows, short
// tau_w) against a reference model of barrier semantics.
//
// Every release is checked: the thread was waiting and all threads of that
// barrier instance had arrived. Scenarios: REGISTER initialises the memory
// word; all threads arrive at once (queueing, bypass and same-barrier stalls in
// the station); release latency of the last ENTRY (7 cycles from acceptance);
// two barriers at once; overflow of the barrier buffer; a waiting thread
// swapped out and released by the sense check after swap-in; an ENTRY left
// pending by a swap-out.
module tb_cent_barrier_system;
  import barrier_pkg::*;

  localparam int N    = 8;
  localparam int NCH  = 4;
  localparam int TAU  = 6;
  localparam int RLAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic     [N-1:0] init_valid, init_ready, wait_valid, wait_ready, rel_valid, rel_sense;
  bar_ctx_t [N-1:0] init_ctx, wait_ctx, so_ctx, si_ctx;
  logic     [N-1:0] so_req, so_done, si_valid, si_ready;
  logic     [N:0]   mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t [N:0]   mreq;
  mem_rsp_t [N:0]   mrsp;
  logic             overflow, spill_valid, miss_valid, bypass, stall;
  msg_t             spill_msg, miss_msg;
  logic [NCH-1:0]   lost;
  logic [4:0]       qsize;

  cent_barrier_system #(.NCORE(N), .NCH(NCH), .ENTRIES(2), .TAU_W(TAU)) dut (
    .clk(clk), .rst_n(rst_n),
    .init_valid_i(init_valid), .init_ready_o(init_ready), .init_ctx_i(init_ctx),
    .wait_valid_i(wait_valid), .wait_ready_o(wait_ready), .wait_ctx_i(wait_ctx),
    .rel_valid_o(rel_valid), .rel_sense_o(rel_sense),
    .so_req_i(so_req), .so_done_o(so_done), .so_ctx_o(so_ctx),
    .si_valid_i(si_valid), .si_ready_o(si_ready), .si_ctx_i(si_ctx),
    .mem_req_valid_o(mreq_valid[N-1:0]), .mem_req_ready_i(mreq_ready[N-1:0]),
    .mem_req_o(mreq[N-1:0]), .mem_rsp_valid_i(mrsp_valid[N-1:0]), .mem_rsp_i(mrsp[N-1:0]),
    .st_mem_wr_valid_o(mreq_valid[N]), .st_mem_wr_o(mreq[N]),
    .overflow_o(overflow), .spill_valid_o(spill_valid), .spill_msg_o(spill_msg),
    .miss_valid_o(miss_valid), .miss_msg_o(miss_msg), .lost_o(lost),
    .queue_size_o(qsize), .bypass_o(bypass), .stall_o(stall));

  logic [ADDR_W-1:0] probe_addr;
  mem_rsp_t          probe, w;
  barrier_mem_model #(.N(N + 1), .RLAT(RLAT)) u_mem (
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

  // ------------------------------------------------------------ reference model
  int           arrived [logic [ADDR_W:0]];
  logic [47:0]  t_addr  [N];
  int           t_cap   [N];
  logic         t_sense [N];
  bit           t_wait  [N];
  int           t_rels  [N];
  longint       t_acc   [N];
  longint       t_rel   [N];
  int           core_thr[N];
  int           max_q = 0, n_bypass = 0, n_stall = 0, n_spill = 0;

  function automatic logic [ADDR_W:0] key(input logic [47:0] a, input logic s);
    return {a, s};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (int'(qsize) > max_q) max_q = int'(qsize);
    if (bypass) n_bypass++;
    if (stall) n_stall++;
    if (spill_valid) n_spill++;
    check(lost == '0, "no message lost in the input buffers");
    for (int c = 0; c < N; c++) begin
      if (rel_valid[c]) begin
        int t;
        t = core_thr[c];
        check(t >= 0, "release on a core with a thread");
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
    end
  end

  task automatic waitcycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic binit(input int c, input logic [47:0] a, input int cap, input logic sense = 1'b0);
    init_ctx[c]           = '0;
    init_ctx[c].bid.sense = sense;
    init_ctx[c].bid.addr  = a;
    init_ctx[c].bid.pid   = 16'h0042;
    init_ctx[c].capacity  = CNT_W'(cap);
    init_valid[c]         = 1'b1;
    do @(posedge clk); while (!init_ready[c]);
    #1 init_valid[c] = 1'b0;
  endtask

  task automatic bwait(input bit [N-1:0] thr, input logic [47:0] a, input int cap);
    bit [N-1:0] pending;
    pending = '0;
    for (int t = 0; t < N; t++) if (thr[t]) begin
      int c;
      c = -1;
      for (int k = 0; k < N; k++) if (core_thr[k] == t) c = k;
      if (c < 0) $fatal(1, "thread not on a core");
      t_addr[t] = a; t_cap[t] = cap;
      wait_ctx[c]           = '0;
      wait_ctx[c].bid.addr  = a;
      wait_ctx[c].bid.pid   = 16'h0042;
      wait_ctx[c].bid.sense = t_sense[t];
      wait_ctx[c].capacity  = CNT_W'(cap);
      wait_ctx[c].tid       = TID_W'(t);
      wait_valid[c]         = 1'b1;
      pending[c]            = 1'b1;
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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [47:0] A = 48'h0000_1000_0040;
  localparam logic [47:0] B = 48'h0000_2000_0080;
  localparam logic [47:0] C = 48'h0000_3000_00C0;
  localparam bit [N-1:0] ALL = '1;

  initial begin
    init_valid = '0; wait_valid = '0; so_req = '0; si_valid = '0;
    init_ctx = '0; wait_ctx = '0; si_ctx = '0; probe_addr = '0;
    for (int t = 0; t < N; t++) begin
      t_sense[t] = 0; t_wait[t] = 0; t_rels[t] = 0; core_thr[t] = t;
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. barrier_init() writes the memory word through the station
    binit(0, A, N);
    waitcycles(10);
    memword(A);
    check(w.count == 0 && w.sense == 0, "REGISTER initialised memory");

    // 2. everyone arrives at once
    bwait(ALL, A, N);
    wait_released(ALL, 100, "all-at-once barrier");
    memword(A);
    check(w.sense == 1, "release flipped the memory sense");
    check(max_q > 0, "message queue used");
    check(n_bypass > 0, "direct path used");
    check(n_stall > 0, "same-barrier stall seen");

    // 3. release latency of the last arrival
    bwait(ALL & ~8'h01, A, N);
    waitcycles(30);
    for (int t = 1; t < N; t++) check(t_wait[t], "no early release");
    bwait(8'h01, A, N);
    wait_released(ALL, 50, "late arrival");
    for (int t = 0; t < N; t++)
      check(t_rel[t] - t_acc[0] == 7,
            $sformatf("thread %0d released %0d cycles after the last arrival, expected 7",
                      t, t_rel[t] - t_acc[0]));

    // 4. two barriers at once: A re-registered for threads 0-3, B for 4-7
    binit(0, A, 4, t_sense[0]);
    binit(4, B, 4);
    waitcycles(10);
    bwait(8'hF0, B, 4);
    bwait(8'h0F, A, 4);
    wait_released(ALL, 100, "two simultaneous barriers");

    // 5. a waiting thread is swapped out and released by the sense check
    bwait(8'h02, A, 4);
    waitcycles(10);
    swap_out(1);
    check(saved[1].waiting && !saved[1].entry_pending, "context says waiting");
    bwait(8'h0D, A, 4);
    wait_released(8'h0D, 50, "barrier with one thread away");
    check(t_wait[1], "swapped-out thread not yet released");
    swap_in(1, 1);
    wait_released(8'h02, TAU + RLAT + 20, "released by the sense check after swap-in");

    // 6. ENTRY pending: thread 6 is swapped out before its ENTRY leaves, then
    //    migrates to core 7's place after thread 7 is swapped out
    bwait(8'h40, B, 4);
    swap_out(6);
    check(saved[6].entry_pending && !saved[6].waiting, "context records the unsent ENTRY");
    bwait(8'h30, B, 4);
    swap_out(7);
    waitcycles(20);
    check(t_wait[4] && t_wait[5], "B not released without thread 6's ENTRY");
    swap_in(6, 7);
    waitcycles(20);
    check(t_wait[4] && t_wait[5], "B still needs thread 7");
    swap_in(7, 6);
    bwait(8'h80, B, 4);
    wait_released(8'hF0, 100, "barrier after migration and pending ENTRY");

    // 7. overflow: a third barrier does not fit in the 2-entry buffer
    binit(2, C, 2);
    waitcycles(10);
    check(overflow && n_spill == 1, "overflow bit set and REGISTER spilled");

    for (int t = 0; t < N; t++) check(!t_wait[t], "nobody left waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
