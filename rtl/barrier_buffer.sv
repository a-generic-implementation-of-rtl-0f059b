// barrier_buffer: the barrier buffer of the central station and the two-stage
// pipeline that updates it.
//
// The buffer is a content-addressable memory of ENTRIES barriers (32 in the
// document's configuration), searched by barrier id; each entry holds the
// barrier's count and capacity (and the sense of its current instance).
// Stage 1 searches the CAM and reads the entry; stage 2 increments the count
// and compares it with the capacity (the comparator of the document's diagram).
// When they are equal the barrier is released: a RELEASE message with the
// barrier id is sent on the station's output channel in the next cycle, the
// entry's count returns to 0 and its sense flips, and the flipped sense and a
// zero count are written to the barrier's memory word. A REGISTER message
// (barrier_init) creates or re-initialises an entry and writes count 0 and the
// initial sense to memory. If the CAM is full, the overflow bit is set and the
// REGISTER is handed out on spill_*; ENTRY messages that find no entry come out
// on miss_*. The document only says that overflowing entries live in a memory
// region handled by the controller; that handling is not part of this block.
//
// The search key is address and process id. A message in stage 1 for the same
// barrier as the message in stage 2 waits one cycle (no forwarding); this is
// the sequential bottleneck for many ENTRY messages of one barrier.
// Throughput one message per cycle otherwise; in_ready_o is the stage-1 ready.
module barrier_buffer
  import barrier_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  output logic                 in_ready_o,
  input  msg_t                 in_msg_i,
  output chan_t                rel_o,          // RELEASE broadcast, registered
  output logic                 mem_wr_valid_o, // memory side takes one write per cycle
  output mem_req_t             mem_wr_o,
  output logic                 overflow_o,
  output logic                 spill_valid_o,
  output msg_t                 spill_msg_o,
  output logic                 miss_valid_o,
  output msg_t                 miss_msg_o,
  output logic                 stall_o,
  output logic [$clog2(ENTRIES+1)-1:0] used_o
);
  localparam int unsigned IW = (ENTRIES < 2) ? 1 : $clog2(ENTRIES);
  localparam int unsigned KW = ADDR_W + PID_W;

  // CAM contents
  logic [ENTRIES-1:0]  e_valid_q;
  logic [KW-1:0]       e_key_q   [ENTRIES];
  logic                e_sense_q [ENTRIES];
  logic [CNT_W-1:0]    e_count_q [ENTRIES];
  logic [CNT_W-1:0]    e_cap_q   [ENTRIES];

  // stage registers
  logic             s1_v, s2_v;
  msg_t             s1_msg, s2_msg;
  logic             s2_hit;
  logic [IW-1:0]    s2_idx;
  logic             s2_sense;
  logic [CNT_W-1:0] s2_count, s2_cap;

  function automatic logic [KW-1:0] key_of(input msg_t m);
    return {m.bid.addr, m.bid.pid};
  endfunction

  // ---------------------------------------------------------- stage 1: search
  logic          hit1;
  logic [IW-1:0] idx1;
  always_comb begin
    hit1 = 1'b0;
    idx1 = '0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (!hit1 && e_valid_q[e] && e_key_q[e] == key_of(s1_msg)) begin
        hit1 = 1'b1;
        idx1 = IW'(e);
      end
    end
  end

  logic hazard, s1_adv;
  assign hazard     = s1_v && s2_v && key_of(s1_msg) == key_of(s2_msg);
  assign s1_adv     = s1_v && !hazard;
  assign in_ready_o = !s1_v || s1_adv;
  assign stall_o    = hazard;

  // ---------------------------------------------------------- stage 2: update
  logic             free_found;
  logic [IW-1:0]    free_idx;
  logic [CNT_W-1:0] newc;
  logic             do_release, do_entry, do_reg, do_alloc, do_spill, do_miss;

  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (!free_found && !e_valid_q[e]) begin
        free_found = 1'b1;
        free_idx   = IW'(e);
      end
    end
  end

  always_comb begin
    newc       = s2_count + 1'b1;
    do_entry   = s2_v && s2_msg.mtype == MSG_ENTRY && s2_hit && s2_sense == s2_msg.bid.sense;
    do_release = do_entry && (newc >= s2_cap);
    do_miss    = s2_v && s2_msg.mtype == MSG_ENTRY && !do_entry;
    do_reg     = s2_v && s2_msg.mtype == MSG_REGISTER;
    do_alloc   = do_reg && !s2_hit && free_found;
    do_spill   = do_reg && !s2_hit && !free_found;
  end

  always_comb begin
    mem_wr_valid_o = 1'b0;
    mem_wr_o       = '0;
    mem_wr_o.write = 1'b1;
    mem_wr_o.addr  = s2_msg.bid.addr;
    if (do_release) begin
      mem_wr_valid_o = 1'b1;
      mem_wr_o.sense = !s2_sense;
    end else if (do_reg && !do_spill) begin
      mem_wr_valid_o = 1'b1;
      mem_wr_o.sense = s2_msg.bid.sense;
    end
  end

  assign spill_valid_o = do_spill;
  assign spill_msg_o   = s2_msg;
  assign miss_valid_o  = do_miss;
  assign miss_msg_o    = s2_msg;
  assign used_o        = ($clog2(ENTRIES+1))'($countones(e_valid_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v       <= 1'b0;
      s2_v       <= 1'b0;
      s1_msg     <= '0;
      s2_msg     <= '0;
      s2_hit     <= 1'b0;
      s2_idx     <= '0;
      s2_sense   <= 1'b0;
      s2_count   <= '0;
      s2_cap     <= '0;
      e_valid_q  <= '0;
      rel_o      <= '0;
      overflow_o <= 1'b0;
    end else begin
      // stage 1 -> stage 2
      s2_v <= s1_adv;
      if (s1_adv) begin
        s2_msg   <= s1_msg;
        s2_hit   <= hit1;
        s2_idx   <= idx1;
        s2_sense <= e_sense_q[idx1];
        s2_count <= e_count_q[idx1];
        s2_cap   <= e_cap_q[idx1];
      end
      // input -> stage 1
      if (in_ready_o) begin
        s1_v <= in_valid_i;
        if (in_valid_i) s1_msg <= in_msg_i;
      end
      // stage 2 writes
      rel_o <= '0;
      if (do_release) begin
        e_count_q[s2_idx] <= '0;
        e_sense_q[s2_idx] <= !s2_sense;
        rel_o.valid       <= 1'b1;
        rel_o.msg         <= mk_msg(MSG_RELEASE, s2_msg.bid, '0);
      end else if (do_entry) begin
        e_count_q[s2_idx] <= newc;
      end
      if (do_reg && !do_spill) begin
        e_valid_q[do_alloc ? free_idx : s2_idx] <= 1'b1;
        e_key_q  [do_alloc ? free_idx : s2_idx] <= key_of(s2_msg);
        e_sense_q[do_alloc ? free_idx : s2_idx] <= s2_msg.bid.sense;
        e_count_q[do_alloc ? free_idx : s2_idx] <= '0;
        e_cap_q  [do_alloc ? free_idx : s2_idx] <= cap_decode(s2_msg.field);
      end
      if (do_spill) overflow_o <= 1'b1;
    end
  end
endmodule
