// mux_tree: 2^S-input multiplexer of N-bit inputs, built hierarchically from two-input muxes.
//
// S select bits choose one of 2^S inputs; the input width N is independent of S. The mux is
// a binary tree of mux2 cells: level 0 pairs the inputs under sel[0], each further level
// pairs the previous level's outputs under the next select bit, and the root gives y = d[sel].
// Combinational, S mux delays deep. Building a wide mux from a tree of 2:1 muxes is the
// classic construction; assigning sel[0] to the leaf level is this design's choice.
module mux_tree #(
  parameter int unsigned S = 2,
  parameter int unsigned N = 32
) (
  input  logic [S-1:0]        sel,
  input  logic [2**S-1:0][N-1:0] d,
  output logic [N-1:0]        y
);
  // node[l] holds the 2^(S-l) values present at tree level l; level 0 is the inputs.
  logic [S:0][2**S-1:0][N-1:0] node;

  assign node[0] = d;

  for (genvar l = 0; l < S; l++) begin : g_level
    for (genvar k = 0; k < 2**(S-l-1); k++) begin : g_node
      mux2 #(.W(N)) u_mux (
        .sel(sel[l]),
        .a  (node[l][2*k]),
        .b  (node[l][2*k+1]),
        .y  (node[l+1][k])
      );
    end
    // Unused upper slots of this level are tied off so every node bit is driven.
    if (2**(S-l-1) < 2**S) begin : g_tie
      assign node[l+1][2**S-1:2**(S-l-1)] = '0;
    end
  end

  assign y = node[S][0];
endmodule
