// hs_scale_qos_mpsoc: communication fabric of the NX x NY MPSoC: the QoS
// mesh NoC plus one network interface per Network Processing Unit (NPU).
//
// Each NPU tile holds a processor with its local memory, timer, interrupt
// controller and UART, running a multitasking micro-kernel; those are not
// part of this RTL. Their connection to the fabric is the processor side of
// the tile's network interface, which is brought out here as arrays indexed
// by node number n = y*NX + x (node address {x[3:0], y[3:0]}). Software
// sends a packet by writing a descriptor (service, priority, target, length)
// and the payload; it reads incoming packets flit by flit. The per-router
// status outputs show which inputs hold a circuit and when the switch
// controls grant a header (and whether it was high priority).
// Defaults: a 4x4 mesh, 16-bit flits, two physical channels per direction,
// as in the paper's evaluation platform; buffer depth 8 and an 8-bit
// payload length field are this design's choices.
module hs_scale_qos_mpsoc
  import qos_pkg::*;
#(
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned LEN_W     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side of every NI
  input  logic              desc_valid_i   [NX*NY],
  output logic              desc_ready_o   [NX*NY],
  input  service_e          desc_service_i [NX*NY],
  input  logic              desc_prio_i    [NX*NY],
  input  logic [7:0]        desc_target_i  [NX*NY],
  input  logic [LEN_W-1:0]  desc_len_i     [NX*NY],
  input  logic              pay_valid_i    [NX*NY],
  input  logic [FLIT_W-1:0] pay_data_i     [NX*NY],
  output logic              pay_ready_o    [NX*NY],
  output logic              conn_open_o    [NX*NY],
  output logic              rx_valid_o     [NX*NY],
  output flit_t             rx_flit_o      [NX*NY],
  output logic              rx_first_o     [NX*NY],
  output logic              rx_ch_o        [NX*NY],
  input  logic              rx_ready_i     [NX*NY],
  // router status
  output logic              conn_o         [NX*NY][NPORT],
  output logic              grant_o        [NX*NY],
  output logic              grant_high_o   [NX*NY]
);

  localparam int unsigned N = NX * NY;

  link_t ni_to_noc   [N][NCH];
  logic  noc_cred_o  [N][NCH];
  link_t noc_to_ni   [N][NCH];
  logic  ni_cred_o   [N][NCH];

  hermes_qos_noc #(.NX(NX), .NY(NY), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk           (clk),
    .rst_n         (rst_n),
    .local_in_i    (ni_to_noc),
    .local_credit_o(noc_cred_o),
    .local_out_o   (noc_to_ni),
    .local_credit_i(ni_cred_o),
    .conn_o        (conn_o),
    .grant_o       (grant_o),
    .grant_high_o  (grant_high_o)
  );

  for (genvar n = 0; n < N; n++) begin : g_ni
    qos_ni #(.LEN_W(LEN_W)) u_ni (
      .clk           (clk),
      .rst_n         (rst_n),
      .desc_valid_i  (desc_valid_i[n]),
      .desc_ready_o  (desc_ready_o[n]),
      .desc_service_i(desc_service_i[n]),
      .desc_prio_i   (desc_prio_i[n]),
      .desc_target_i (desc_target_i[n]),
      .desc_len_i    (desc_len_i[n]),
      .pay_valid_i   (pay_valid_i[n]),
      .pay_data_i    (pay_data_i[n]),
      .pay_ready_o   (pay_ready_o[n]),
      .conn_open_o   (conn_open_o[n]),
      .rx_valid_o    (rx_valid_o[n]),
      .rx_flit_o     (rx_flit_o[n]),
      .rx_first_o    (rx_first_o[n]),
      .rx_ch_o       (rx_ch_o[n]),
      .rx_ready_i    (rx_ready_i[n]),
      .noc_out_o     (ni_to_noc[n]),
      .noc_credit_i  (noc_cred_o[n]),
      .noc_in_i      (noc_to_ni[n]),
      .noc_credit_o  (ni_cred_o[n])
    );
  end

endmodule
