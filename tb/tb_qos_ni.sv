// tb_qos_ni: checks both sides of the network interface.
// Send side: a sequence of descriptors (ordinary high and low priority
// packets, connection establishment, GT data, release) with random payload
// and random router credit. Each packet seen on the Local links is checked
// for its header fields, its channel (connections and GT on channel 0, low
// priority on channel 1, high priority on channel 0 unless a connection is
// open), its payload and the eop on the last flit; conn_open must follow
// the establishment and release packets.
// Receive side: packets offered at the same time on both channels must be
// delivered whole, one after the other, channel 0 first when both start in
// the same cycle, with the header flagged as first flit.
module tb_qos_ni;
  import qos_pkg::*;

  logic              clk = 0;
  logic              rst_n;
  logic              desc_valid, desc_ready;
  service_e          desc_service;
  logic              desc_prio;
  logic [7:0]        desc_target;
  logic [7:0]        desc_len;
  logic              pay_valid, pay_ready;
  logic [15:0]       pay_data;
  logic              conn_open;
  logic              rx_valid, rx_first, rx_ch, rx_ready;
  flit_t             rx_flit;
  link_t             noc_out [NCH];
  logic              noc_cred_in [NCH];
  link_t             noc_in [NCH];
  logic              noc_cred_out [NCH];

  int checks = 0, failures = 0;

  qos_ni dut (
    .clk(clk), .rst_n(rst_n),
    .desc_valid_i(desc_valid), .desc_ready_o(desc_ready), .desc_service_i(desc_service),
    .desc_prio_i(desc_prio), .desc_target_i(desc_target), .desc_len_i(desc_len),
    .pay_valid_i(pay_valid), .pay_data_i(pay_data), .pay_ready_o(pay_ready),
    .conn_open_o(conn_open),
    .rx_valid_o(rx_valid), .rx_flit_o(rx_flit), .rx_first_o(rx_first), .rx_ch_o(rx_ch),
    .rx_ready_i(rx_ready),
    .noc_out_o(noc_out), .noc_credit_i(noc_cred_in), .noc_in_i(noc_in), .noc_credit_o(noc_cred_out)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------- send side ----------------
  // expected flits per channel
  flit_t exp_q [NCH][$];

  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (rst_n && noc_out[c].tx && noc_cred_in[c]) begin
        check(exp_q[c].size() > 0, $sformatf("unexpected flit on channel %0d", c));
        if (exp_q[c].size() > 0) begin
          check(noc_out[c].flit == exp_q[c][0],
                $sformatf("channel %0d flit %h/%0b, expected %h/%0b", c, noc_out[c].flit.data,
                          noc_out[c].flit.eop, exp_q[c][0].data, exp_q[c][0].eop));
          void'(exp_q[c].pop_front());
        end
      end
      noc_cred_in[c] <= ($urandom % 3) != 0;
    end
  end

  task automatic send(service_e s, logic prio, logic [7:0] tgt, int len, int exp_ch);
    logic [15:0] w;
    exp_q[exp_ch].push_back('{eop: (len == 0),
                              data: {s, 3'b0, (s == SRV_PACKET) ? prio : PRIO_HIGH, tgt}});
    @(negedge clk);
    desc_valid = 1; desc_service = s; desc_prio = prio; desc_target = tgt; desc_len = 8'(len);
    do @(posedge clk); while (!desc_ready);
    @(negedge clk);
    desc_valid = 0;
    for (int k = 0; k < len; k++) begin
      w = 16'($urandom);
      exp_q[exp_ch].push_back('{eop: (k == len - 1), data: w});
      pay_valid = 1; pay_data = w;
      do @(posedge clk); while (!pay_ready);
      @(negedge clk);
      pay_valid = 0;
    end
    while (exp_q[exp_ch].size() > 0) @(posedge clk);
    @(negedge clk);
  endtask

  // ---------------- receive side ----------------
  flit_t in_q [NCH][$];
  flit_t rx_exp [$];
  int    rx_exp_ch [$];
  logic  in_go;

  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (noc_in[c].tx && noc_cred_out[c]) void'(in_q[c].pop_front());
    end
    for (int c = 0; c < NCH; c++) begin
      noc_in[c].tx   <= in_go && in_q[c].size() > 0;
      noc_in[c].flit <= (in_q[c].size() > 0) ? in_q[c][0] : '0;
    end
    rx_ready <= ($urandom % 4) != 0;
    if (rst_n && rx_valid && rx_ready) begin
      check(rx_exp.size() > 0, "unexpected received flit");
      if (rx_exp.size() > 0) begin
        check(rx_flit == rx_exp[0] && int'(rx_ch) == rx_exp_ch[0], "received flit and channel");
        void'(rx_exp.pop_front());
        void'(rx_exp_ch.pop_front());
      end
    end
  end

  logic rx_in_pkt = 0;
  always @(posedge clk)
    if (rst_n && rx_valid && rx_ready) begin
      check(rx_first == !rx_in_pkt, "first-flit flag");
      rx_in_pkt <= !rx_flit.eop;
    end

  task automatic offer(int c, int len, logic [7:0] tag);
    in_q[c].push_back('{eop: 1'b0, data: {SRV_PACKET, 3'b0, 1'(c), tag}});
    for (int k = 0; k < len; k++) in_q[c].push_back('{eop: (k == len - 1), data: {tag, 8'(k)}});
  endtask

  initial begin
    desc_valid = 0; pay_valid = 0; pay_data = 0; desc_service = SRV_PACKET; desc_prio = 0;
    desc_target = 0; desc_len = 0; in_go = 0; rx_ready = 0;
    for (int c = 0; c < NCH; c++) begin noc_in[c] = '0; noc_cred_in[c] = 0; end
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // send side
    send(SRV_PACKET, PRIO_HIGH, 8'h23, 3, 0);
    send(SRV_PACKET, PRIO_LOW,  8'h31, 4, 1);
    check(!conn_open, "no connection yet");
    send(SRV_CONNECT, PRIO_HIGH, 8'h33, 0, 0);
    check(conn_open, "connection open after establishment packet");
    send(SRV_GT, PRIO_LOW, 8'h33, 5, 0);
    send(SRV_PACKET, PRIO_HIGH, 8'h12, 2, 1);
    send(SRV_PACKET, PRIO_LOW,  8'h12, 1, 1);
    check(conn_open, "connection stays open");
    send(SRV_RELEASE, PRIO_HIGH, 8'h33, 1, 0);
    check(!conn_open, "connection closed after release packet");
    send(SRV_PACKET, PRIO_HIGH, 8'h00, 6, 0);
    for (int k = 0; k < 20; k++) begin
      int len;
      logic p;
      len = 1 + int'($urandom % 5);
      p   = 1'($urandom);
      send(SRV_PACKET, p, 8'($urandom), len, (p == PRIO_HIGH) ? 0 : 1);
    end
    // receive side: packets offered together on both channels
    for (int r = 0; r < 10; r++) begin
      int l0, l1;
      l0 = 1 + int'($urandom % 4);
      l1 = 1 + int'($urandom % 4);
      offer(0, l0, 8'(2*r));
      offer(1, l1, 8'(2*r+1));
      foreach (in_q[0][k]) begin rx_exp.push_back(in_q[0][k]); rx_exp_ch.push_back(0); end
      foreach (in_q[1][k]) begin rx_exp.push_back(in_q[1][k]); rx_exp_ch.push_back(1); end
      @(negedge clk);
      in_go = 1;
      while (rx_exp.size() > 0) @(posedge clk);
      in_go = 0;
      repeat (3) @(posedge clk);
    end
    check(rx_exp.size() == 0, "all received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
