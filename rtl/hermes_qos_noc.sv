// hermes_qos_noc: NX x NY 2D mesh of QoS routers.
//
// Router (x,y) serves the node whose 8-bit address is {x[3:0], y[3:0]}.
// Neighbouring routers are joined channel by channel: East channel c of
// (x,y) feeds West channel c of (x+1,y), North channel c of (x,y) feeds
// South channel c of (x,y+1), and back. Ports on the mesh edge are tied
// off (no incoming flits, no credit), and the Hamiltonian routing never
// selects them. The two Local channels of every router are brought out,
// indexed by node number n = y*NX + x. The 2D mesh, the 4x4 size used for
// the paper's results and the duplicated channels are from the paper; the
// addressing and the port numbering are this design's choices.
module hermes_qos_noc
  import qos_pkg::*;
#(
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t local_in_i     [NX*NY][NCH],
  output logic  local_credit_o [NX*NY][NCH],
  output link_t local_out_o    [NX*NY][NCH],
  input  logic  local_credit_i [NX*NY][NCH],
  output logic  conn_o         [NX*NY][NPORT],
  output logic  grant_o        [NX*NY],
  output logic  grant_high_o   [NX*NY]
);

  localparam int unsigned N = NX * NY;

  link_t r_in      [N][NPORT];
  logic  r_cred_o  [N][NPORT];
  link_t r_out     [N][NPORT];
  logic  r_cred_i  [N][NPORT];

  function automatic int node(int x, int y);
    return y * int'(NX) + x;
  endfunction

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int n = y * NX + x;
      for (genvar c = 0; c < NCH; c++) begin : g_ch
        localparam int pN = 2*DIR_NORTH + c;
        localparam int pS = 2*DIR_SOUTH + c;
        localparam int pE = 2*DIR_EAST  + c;
        localparam int pW = 2*DIR_WEST  + c;
        localparam int pL = 2*DIR_LOCAL + c;
        // Local
        assign r_in[n][pL]          = local_in_i[n][c];
        assign local_credit_o[n][c] = r_cred_o[n][pL];
        assign local_out_o[n][c]    = r_out[n][pL];
        assign r_cred_i[n][pL]      = local_credit_i[n][c];
        // East side: neighbour (x+1,y) West port
        if (x + 1 < NX) begin : g_e
          assign r_in[n][pE]     = r_out[n+1][pW];
          assign r_cred_i[n][pE] = r_cred_o[n+1][pW];
        end else begin : g_e_edge
          assign r_in[n][pE]     = '0;
          assign r_cred_i[n][pE] = 1'b0;
        end
        // West side: neighbour (x-1,y) East port
        if (x > 0) begin : g_w
          assign r_in[n][pW]     = r_out[n-1][pE];
          assign r_cred_i[n][pW] = r_cred_o[n-1][pE];
        end else begin : g_w_edge
          assign r_in[n][pW]     = '0;
          assign r_cred_i[n][pW] = 1'b0;
        end
        // North side: neighbour (x,y+1) South port
        if (y + 1 < NY) begin : g_n
          assign r_in[n][pN]     = r_out[n+NX][pS];
          assign r_cred_i[n][pN] = r_cred_o[n+NX][pS];
        end else begin : g_n_edge
          assign r_in[n][pN]     = '0;
          assign r_cred_i[n][pN] = 1'b0;
        end
        // South side: neighbour (x,y-1) North port
        if (y > 0) begin : g_s
          assign r_in[n][pS]     = r_out[n-NX][pN];
          assign r_cred_i[n][pS] = r_cred_o[n-NX][pN];
        end else begin : g_s_edge
          assign r_in[n][pS]     = '0;
          assign r_cred_i[n][pS] = 1'b0;
        end
      end

      qos_router #(
        .NX(NX), .NY(NY), .X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)
      ) u_router (
        .clk         (clk),
        .rst_n       (rst_n),
        .in_i        (r_in[n]),
        .credit_o    (r_cred_o[n]),
        .out_o       (r_out[n]),
        .credit_i    (r_cred_i[n]),
        .conn_o      (conn_o[n]),
        .grant_o     (grant_o[n]),
        .grant_high_o(grant_high_o[n])
      );
    end
  end

endmodule
