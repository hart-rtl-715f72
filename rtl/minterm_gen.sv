// minterm_gen: minterm generator part of a hardware tautology checker.
//
// Takes a cube of N binary variables in positional notation and raises every
// output line whose minterm lies inside the cube: line m is high when, for
// every variable x_i, the cube holds the literal of the value x_i has in m.
// x1 is the most significant bit of the minterm number.
//
// It is built as a tree of split decoders.  A decoder for a group of W
// variables splits it into an upper group of ceil(W/2) and a lower group of
// floor(W/2) variables, decodes each with a smaller decoder, and forms line
// {mh, ml} as the two-input AND of upper line mh and lower line ml.  A single
// variable needs no gate: its two lines are its two literals.  The whole
// generator takes 2^N + M(ceil(N/2)) + M(floor(N/2)) two-input ANDs, i.e. 88,
// 304, 1120, 4272 and 16712 for N = 6, 8, 10, 12, 14, which are the
// minterm-generator gate counts given for the checker; the split itself is
// inferred from those counts.  The tree nodes are numbered like a heap (root
// 1, children 2j and 2j+1) and built in one generate loop.
//
// Interface: cube[i][0] is x_{i+1}^0, cube[i][1] is x_{i+1}^1; line[m] is
// minterm m.  Purely combinational.
module minterm_gen #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0][1:0]    cube,
  output logic [(1<<N)-1:0]    line
);

  localparam int unsigned NODES = 4 * N;   // heap indices used stay below 4N

  // Walk from the root to node j.  Returns the node's width (0 if j is not a
  // node of the tree) or, with want_start set, the index of its first variable.
  function automatic int unsigned node_walk(int unsigned j, bit want_start);
    int unsigned w, start, depth;
    w     = N;
    start = 0;
    depth = 0;
    while ((j >> (depth + 1)) != 0) depth++;
    for (int d = int'(depth) - 1; d >= 0; d--) begin
      if (w < 2) return 0;
      if (j[d]) begin
        start = start + (w + 1) / 2;
        w     = w / 2;
      end else begin
        w     = (w + 1) / 2;
      end
    end
    return want_start ? start : w;
  endfunction

  for (genvar j = 1; j < NODES; j++) begin : g_node
    localparam int unsigned W = node_walk(j, 1'b0);
    localparam int unsigned S = node_walk(j, 1'b1);
    logic [(1<<N)-1:0] l;   // lines of this decoder, 2^W of them used

    if (W == 0) begin : g_none
      assign l = '0;
    end else if (W == 1) begin : g_leaf
      assign l = {{((1 << N) - 2){1'b0}}, cube[S]};
    end else begin : g_split
      localparam int unsigned WL = W / 2;   // lower group width
      always_comb begin
        l = '0;
        for (int unsigned m = 0; m < (1 << W); m++) begin
          l[m] = g_node[2*j].l[m >> WL] & g_node[2*j+1].l[m & ((1 << WL) - 1)];
        end
      end
    end
  end

  assign line = g_node[1].l;

endmodule
