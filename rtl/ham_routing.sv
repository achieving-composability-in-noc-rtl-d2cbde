// ham_routing: Hamiltonian-path routing decision for a 2D mesh.
//
// The mesh nodes are numbered along a Hamiltonian path that snakes through
// the rows: in even rows the label grows with X, in odd rows it falls with X,
// so label(x,y) = y*NX + (y even ? x : NX-1-x). A packet whose target label
// is above the current one travels in the "high" subnetwork: it goes to the
// neighbour with the largest label that is above the current label and not
// above the target. A packet whose target label is below the current one
// goes to the neighbour with the smallest label that is below the current
// label and not below the target. Because labels only rise (or only fall)
// along a route, the two subnetworks are acyclic and the routing is
// deadlock-free. The paper names the Hamiltonian routing algorithm of Lin,
// McKinley and Ni for its NoC; the snake labelling starting at node (0,0),
// the North = +Y convention and the X/Y split of the 8-bit target are this
// design's choices. Purely combinational.
module ham_routing
  import qos_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4
) (
  input  logic [3:0] cur_x_i,
  input  logic [3:0] cur_y_i,
  input  logic [7:0] target_i,
  output dir_e       dir_o
);

  function automatic int label(int x, int y);
    return (y % 2 == 0) ? y * int'(NX) + x : y * int'(NX) + int'(NX) - 1 - x;
  endfunction

  int   lc, lt;          // labels of this node and of the target
  int   nb_lab [4];      // neighbour labels, in dir_e order N, S, E, W
  logic nb_ok  [4];      // neighbour exists

  always_comb begin
    int cx, cy;
    cx = int'(cur_x_i);
    cy = int'(cur_y_i);
    lc = label(cx, cy);
    lt = label(int'(target_i[7:4]), int'(target_i[3:0]));
    nb_ok[0]  = (cy + 1 < int'(NY));  nb_lab[0] = label(cx, cy + 1);
    nb_ok[1]  = (cy > 0);             nb_lab[1] = label(cx, cy - 1);
    nb_ok[2]  = (cx + 1 < int'(NX));  nb_lab[2] = label(cx + 1, cy);
    nb_ok[3]  = (cx > 0);             nb_lab[3] = label(cx - 1, cy);
  end

  always_comb begin
    int best;
    best  = lc;
    dir_o = DIR_LOCAL;
    for (int d = 0; d < 4; d++) begin
      if (lt > lc && nb_ok[d] && nb_lab[d] > best && nb_lab[d] <= lt) begin
        best  = nb_lab[d];
        dir_o = dir_e'(d);
      end
      if (lt < lc && nb_ok[d] && nb_lab[d] < best && nb_lab[d] >= lt) begin
        best  = nb_lab[d];
        dir_o = dir_e'(d);
      end
    end
  end

endmodule
