// barrier_pkg: types and constants shared by the optical barrier designs.
//
// A barrier is identified by a 65-bit barrier id made of its 48-bit physical
// address, the 16-bit process id and the 1-bit sense of the current barrier
// instance. Every message on the optical network carries a 3-bit message type,
// the barrier id and a 6-bit field that holds a thread id or a barrier count,
// 74 bits in all. These widths are the document's. The numeric encoding of the
// message types, the capacity/count widths and the memory-port records are
// choices of this design.
package barrier_pkg;

  localparam int unsigned ADDR_W = 48;  // physical address width
  localparam int unsigned PID_W  = 16;  // process id width
  localparam int unsigned TID_W  = 6;   // thread id / count field width
  localparam int unsigned CNT_W  = 7;   // internal counts and capacities (1..64)

  // Message types. The document names them but gives no encoding.
  typedef enum logic [2:0] {
    MSG_REGISTER = 3'd0,
    MSG_ENTRY    = 3'd1,
    MSG_RELEASE  = 3'd2,
    MSG_ACCEPT   = 3'd3,
    MSG_TRANSFER = 3'd4,
    MSG_REPLY    = 3'd5,
    MSG_COUNT    = 3'd6
  } msg_type_e;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [PID_W-1:0]  pid;
    logic              sense;
  } bid_t;

  typedef struct packed {
    msg_type_e         mtype;
    bid_t              bid;
    logic [TID_W-1:0]  field;   // thread id or count, depending on mtype
  } msg_t;

  // One optical channel during one cycle: light present (valid) and payload.
  typedef struct packed {
    logic valid;
    msg_t msg;
  } chan_t;

  // Barrier state kept in a thread's context and swapped with it.
  typedef struct packed {
    bid_t              bid;           // includes the thread's local sense
    logic [CNT_W-1:0]  capacity;
    logic [TID_W-1:0]  tid;
    logic              waiting;       // ENTRY sent, not yet released
    logic              entry_pending; // swapped out before ENTRY was sent
  } bar_ctx_t;

  // Request to the memory word that holds a barrier's count and sense.
  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [CNT_W-1:0]  count;
    logic              sense;
  } mem_req_t;

  typedef struct packed {
    logic [CNT_W-1:0]  count;
    logic              sense;
  } mem_rsp_t;

  // The 6-bit field of a REGISTER message cannot hold 64; 0 stands for 64.
  function automatic logic [CNT_W-1:0] cap_decode(input logic [TID_W-1:0] f);
    return (f == '0) ? CNT_W'(1 << TID_W) : CNT_W'(f);
  endfunction

  function automatic logic [TID_W-1:0] cap_encode(input logic [CNT_W-1:0] c);
    return c[TID_W-1:0];
  endfunction

  function automatic msg_t mk_msg(input msg_type_e t, input bid_t b, input logic [TID_W-1:0] f);
    msg_t m;
    m.mtype = t;
    m.bid   = b;
    m.field = f;
    return m;
  endfunction

endpackage
