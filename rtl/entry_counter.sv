// entry_counter: tree of adders that counts how many of N one-bit inputs are set.
//
// Each input bit says whether a matching ENTRY message arrived on the channel of
// the corresponding barrier unit during the current round. As in the document,
// the leaves of the tree are 1-bit values and the adders widen towards the root;
// the tree is built by splitting the inputs in two halves recursively.
// Purely combinational; the barrier unit samples the result at the end of a round.
// A lint run on this module alone may report the node signals of the inner
// branch as undriven: they are driven by the two recursive sub-instances,
// which that run does not elaborate. The full simulations check the results.
module entry_counter #(
  parameter int unsigned N  = 64,
  parameter int unsigned SW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits_i,
  output logic [SW-1:0] sum_o
);
  if (N == 1) begin : g_leaf
    assign sum_o = SW'(bits_i[0]);
  end else begin : g_node
    localparam int unsigned NL = N / 2;
    localparam int unsigned NR = N - NL;
    localparam int unsigned SL = $clog2(NL + 1);
    localparam int unsigned SR = $clog2(NR + 1);
    logic [SL-1:0] sl;
    logic [SR-1:0] sr;
    entry_counter #(.N(NL), .SW(SL)) u_l (.bits_i(bits_i[NL-1:0]), .sum_o(sl));
    entry_counter #(.N(NR), .SW(SR)) u_r (.bits_i(bits_i[N-1:NL]), .sum_o(sr));
    assign sum_o = SW'(sl) + SW'(sr);
  end
endmodule
