// qos_ni: network interface between a processing element and the Local
// ports (channels 0 and 1) of its router.
//
// Send side: the processor gives a packet descriptor (service, priority,
// target address, number of payload flits) and then streams the payload.
// The NI builds the header flit, appends the payload and marks the last
// flit with eop, so a packet is 1 + len flits long. It picks the physical
// channel itself:
//   * connection establishment, release and GT packets go on channel 0,
//     the only channel on which circuits exist;
//   * high-priority packets go on channel 0 while no connection of this NI
//     is open, otherwise on channel 1;
//   * low-priority packets always go on channel 1.
// conn_open_o is set when an establishment packet has been sent and cleared
// when a release packet has been sent; the software layer uses it to make
// a second task wait for the connection (an assertion flags a second
// establishment request while one is open). A GT data packet keeps the header
// format, with the GT service code in the header instead of a priority
// (the P bit of establishment, release and GT headers is written as 0).
// Receive side: packets arriving on the two Local output channels are
// handed to the processor one whole packet at a time (channel 0 is chosen
// first when both start together), with rx_first_o on the header flit,
// rx_flit_o.eop on the last flit and rx_ch_o naming the channel.
// Timing: one flit per cycle on each side when the router gives credit.
// Packaging, eop marking and the use of channel 0 for connections follow
// the paper; the descriptor interface, the length field width and the
// channel policy for high-priority traffic are this design's choices.
module qos_ni
  import qos_pkg::*;
#(
  parameter int unsigned LEN_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor send side
  input  logic              desc_valid_i,
  output logic              desc_ready_o,
  input  service_e          desc_service_i,
  input  logic              desc_prio_i,
  input  logic [7:0]        desc_target_i,
  input  logic [LEN_W-1:0]  desc_len_i,
  input  logic              pay_valid_i,
  input  logic [FLIT_W-1:0] pay_data_i,
  output logic              pay_ready_o,
  output logic              conn_open_o,
  // processor receive side
  output logic              rx_valid_o,
  output flit_t             rx_flit_o,
  output logic              rx_first_o,
  output logic              rx_ch_o,
  input  logic              rx_ready_i,
  // router Local ports (index = channel)
  output link_t             noc_out_o    [NCH],
  input  logic              noc_credit_i [NCH],
  input  link_t             noc_in_i     [NCH],
  output logic              noc_credit_o [NCH]
);

  // ------------------------------------------------------------------
  // Send side
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_PAY} tx_state_e;

  tx_state_e         tx_st;
  header_t           hdr_q;
  logic [LEN_W-1:0]  left_q;
  logic              ch_q;
  logic              conn_open;
  logic              tx_fire;
  logic              sel_ch;

  always_comb begin
    if (desc_service_i != SRV_PACKET) sel_ch = 1'b0;
    else if (desc_prio_i == PRIO_HIGH && !conn_open) sel_ch = 1'b0;
    else sel_ch = 1'b1;
  end

  assign desc_ready_o = (tx_st == TX_IDLE);
  assign conn_open_o  = conn_open;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      noc_out_o[c].tx   = 1'b0;
      noc_out_o[c].flit = '0;
    end
    pay_ready_o = 1'b0;
    tx_fire     = 1'b0;
    unique case (tx_st)
      TX_HDR: begin
        noc_out_o[ch_q].tx        = 1'b1;
        noc_out_o[ch_q].flit.data = hdr_q;
        noc_out_o[ch_q].flit.eop  = (left_q == '0);
        tx_fire                   = noc_credit_i[ch_q];
      end
      TX_PAY: begin
        noc_out_o[ch_q].tx        = pay_valid_i;
        noc_out_o[ch_q].flit.data = pay_data_i;
        noc_out_o[ch_q].flit.eop  = (left_q == LEN_W'(1));
        pay_ready_o               = noc_credit_i[ch_q];
        tx_fire                   = pay_valid_i && noc_credit_i[ch_q];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_st     <= TX_IDLE;
      hdr_q     <= '0;
      left_q    <= '0;
      ch_q      <= 1'b0;
      conn_open <= 1'b0;
    end else begin
      unique case (tx_st)
        TX_IDLE: if (desc_valid_i) begin
          hdr_q.service <= desc_service_i;
          hdr_q.unused  <= '0;
          hdr_q.prio    <= (desc_service_i == SRV_PACKET) ? desc_prio_i : PRIO_HIGH;
          hdr_q.target  <= desc_target_i;
          left_q        <= desc_len_i;
          ch_q          <= sel_ch;
          tx_st         <= TX_HDR;
        end
        TX_HDR: if (tx_fire) begin
          tx_st <= (left_q == '0) ? TX_IDLE : TX_PAY;
          if (hdr_q.service == SRV_CONNECT) conn_open <= 1'b1;
          if (left_q == '0 && hdr_q.service == SRV_RELEASE) conn_open <= 1'b0;
        end
        TX_PAY: if (tx_fire) begin
          left_q <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) begin
            tx_st <= TX_IDLE;
            if (hdr_q.service == SRV_RELEASE) conn_open <= 1'b0;
          end
        end
        default: tx_st <= TX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // Receive side
  // ------------------------------------------------------------------
  logic rx_busy;   // inside a packet on channel rx_sel
  logic rx_sel;
  logic cur_ch;

  assign cur_ch     = rx_busy ? rx_sel : !noc_in_i[0].tx;
  assign rx_valid_o = noc_in_i[cur_ch].tx;
  assign rx_flit_o  = noc_in_i[cur_ch].flit;
  assign rx_first_o = !rx_busy;
  assign rx_ch_o    = cur_ch;

  always_comb begin
    for (int c = 0; c < NCH; c++)
      noc_credit_o[c] = rx_ready_i && (cur_ch == 1'(c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_busy <= 1'b0;
      rx_sel  <= 1'b0;
    end else if (rx_valid_o && rx_ready_i) begin
      rx_busy <= !rx_flit_o.eop;
      rx_sel  <= cur_ch;
    end
  end

  // The processor must hold a payload flit until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   pay_valid_i && !pay_ready_o && tx_st == TX_PAY |=> pay_valid_i)
    else $error("payload withdrawn before it was taken");

  // One connection per node: a second establishment packet while one is
  // open would travel down the existing circuit instead of opening a new one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   desc_valid_i && desc_ready_o && desc_service_i == SRV_CONNECT |-> !conn_open)
    else $error("connection establishment while a connection is open");

endmodule
