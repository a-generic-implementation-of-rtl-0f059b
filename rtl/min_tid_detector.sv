// min_tid_detector: tree of 6-bit comparators returning the smallest thread id
// among the inputs whose valid bit is set.
//
// Used during co-ordinator election (thread ids of ENTRY messages) and during a
// co-ordinator transfer (thread ids of REPLY messages). Each node of the tree
// keeps the minimum of its sub-tree, as the document describes; the recursive
// halving is this design's way of building the tree. Combinational.
// A lint run on this module alone may report the node signals of the inner
// branch as undriven: they are driven by the two recursive sub-instances,
// which that run does not elaborate. The full simulations check the results.
module min_tid_detector
  import barrier_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]            valid_i,
  input  logic [N-1:0][TID_W-1:0] tid_i,
  output logic                    any_o,
  output logic [TID_W-1:0]        min_o
);
  if (N == 1) begin : g_leaf
    assign any_o = valid_i[0];
    assign min_o = tid_i[0];
  end else begin : g_node
    localparam int unsigned NL = N / 2;
    localparam int unsigned NR = N - NL;
    logic al, ar;
    logic [TID_W-1:0] ml, mr;
    min_tid_detector #(.N(NL)) u_l (.valid_i(valid_i[NL-1:0]), .tid_i(tid_i[NL-1:0]),
                                    .any_o(al), .min_o(ml));
    min_tid_detector #(.N(NR)) u_r (.valid_i(valid_i[N-1:NL]), .tid_i(tid_i[N-1:NL]),
                                    .any_o(ar), .min_o(mr));
    assign any_o = al | ar;
    always_comb begin
      if (al && (!ar || ml <= mr)) min_o = ml;
      else                         min_o = mr;
    end
  end
endmodule
