// qos_router: Hermes-style wormhole router with duplicated physical channels.
//
// Five directions (North, South, East, West, Local), each with two physical
// channels, give ten input and ten output ports (index 2*direction+channel,
// see qos_pkg). Every input port has its own input buffer; one switch
// control serves all ports and programs a 10x10 crossbar. Channel 0 is
// reserved for high-priority packets and for circuit-switched connections,
// channel 1 carries high- and low-priority packets.
// Link protocol per physical channel: the sender drives tx with a flit and
// its eop bit; the flit is taken in the cycle in which the receiver's credit
// is high. Latency: a header written into an input buffer at clock edge t
// is granted at edge t+1 (if its output is free) and is written into the
// next router's buffer at edge t+2, so an uncontended hop costs two cycles;
// payload flits then follow one per cycle. The structure follows the paper's router figure; buffer
// depth and link protocol are this design's choices.
module qos_router
  import qos_pkg::*;
#(
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in_i      [NPORT],
  output logic  credit_o  [NPORT],
  output link_t out_o     [NPORT],
  input  logic  credit_i  [NPORT],
  output logic  conn_o    [NPORT],
  output logic  grant_o,
  output logic  grant_high_o
);

  logic              head_valid [NPORT];
  flit_t             head       [NPORT];
  logic              pop        [NPORT];
  logic              out_en     [NPORT];
  logic [PORT_W-1:0] out_sel    [NPORT];
  logic              in_en      [NPORT];
  logic [PORT_W-1:0] in_out     [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_buf
    qos_input_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk         (clk),
      .rst_n       (rst_n),
      .tx_i        (in_i[p].tx),
      .flit_i      (in_i[p].flit),
      .credit_o    (credit_o[p]),
      .head_valid_o(head_valid[p]),
      .head_o      (head[p]),
      .pop_i       (pop[p])
    );
  end

  qos_switch_control #(.NX(NX), .NY(NY), .X(X), .Y(Y)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .head_valid_i(head_valid),
    .head_i      (head),
    .pop_i       (pop),
    .out_en_o    (out_en),
    .out_sel_o   (out_sel),
    .in_en_o     (in_en),
    .in_out_o    (in_out),
    .conn_o      (conn_o),
    .grant_o     (grant_o),
    .grant_high_o(grant_high_o)
  );

  qos_crossbar u_xbar (
    .head_valid_i(head_valid),
    .head_i      (head),
    .pop_o       (pop),
    .out_en_i    (out_en),
    .out_sel_i   (out_sel),
    .in_en_i     (in_en),
    .in_out_i    (in_out),
    .out_o       (out_o),
    .credit_i    (credit_i)
  );

endmodule
