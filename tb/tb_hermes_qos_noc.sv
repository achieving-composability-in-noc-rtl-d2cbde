// tb_hermes_qos_noc: end-to-end test of the 4x4 router mesh.
// 1. Latency: one packet from node (0,0) to node (3,0) through an empty
//    mesh; its route is East, East, East, so four routers are crossed and
//    the header must appear at the target's Local port 8 cycles after it
//    entered (two cycles per router).
// 2. Circuit: node (0,0) opens a connection to node (3,3) on channel 0, the
//    routers on the way must hold the circuit, GT packets cross it and a
//    release packet tears it down.
// 3. Random traffic from every node on both Local channels (high priority
//    on channel 0, random priority on channel 1) to random targets, with
//    random back-pressure at every Local output. Every packet must reach its
//    target once and intact, and no low priority packet may arrive on
//    Local channel 0.
module tb_hermes_qos_noc;
  import qos_pkg::*;

  localparam int NX = 4, NY = 4, N = NX * NY;
  localparam int NPKT = 25;   // per node and channel

  logic  clk = 0;
  logic  rst_n;
  link_t l_in  [N][NCH];
  logic  c_out [N][NCH];
  link_t l_out [N][NCH];
  logic  c_in  [N][NCH];
  logic  conn  [N][NPORT];
  logic  grant [N];
  logic  grant_high [N];

  int checks = 0, failures = 0;
  flit_t txq [N][NCH][$];
  int sent = 0, received = 0;
  logic in_pkt [N][NCH];
  int   cur_id [N][NCH];
  int   cur_k  [N][NCH];
  int   cur_src [N][NCH];
  logic quiet = 1'b1;
  int   gt_rx = 0;
  bit   seen [int];

  hermes_qos_noc #(.NX(NX), .NY(NY)) dut (
    .clk(clk), .rst_n(rst_n), .local_in_i(l_in), .local_credit_o(c_out),
    .local_out_o(l_out), .local_credit_i(c_in), .conn_o(conn),
    .grant_o(grant), .grant_high_o(grant_high)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic logic [15:0] pattern(int id, int k);
    return 16'((id * 29 + k * 7) ^ 16'h3C3C);
  endfunction

  always @(posedge clk) begin
    for (int n = 0; n < N; n++)
      for (int c = 0; c < NCH; c++) begin
        if (l_in[n][c].tx && c_out[n][c]) void'(txq[n][c].pop_front());
        l_in[n][c].tx   <= txq[n][c].size() > 0 && (quiet || ($urandom % 3) != 0);
        l_in[n][c].flit <= (txq[n][c].size() > 0) ? txq[n][c][0] : '0;
      end
  end

  always @(posedge clk) begin
    for (int n = 0; n < N; n++)
      for (int c = 0; c < NCH; c++) begin
        if (rst_n && l_out[n][c].tx && c_in[n][c]) begin
          flit_t f;
          f = l_out[n][c].flit;
          if (!in_pkt[n][c]) begin
            header_t h;
            h = header_t'(f.data);
            if (h.service == SRV_PACKET) begin
              check(int'(h.target) == ((n % NX) << 4 | (n / NX)),
                    $sformatf("packet for %h delivered at node %0d", h.target, n));
              check(!(h.prio == PRIO_LOW && c == 0), "low priority on Local channel 0");
            end
            if (h.service == SRV_GT) gt_rx++;
            cur_k[n][c]  = 0;
            cur_id[n][c] = -1;
            in_pkt[n][c] = !f.eop;
          end else begin
            if (cur_k[n][c] == 0) begin
              cur_id[n][c] = int'(f.data);
              check(!seen.exists(cur_id[n][c]), "packet delivered once");
              seen[cur_id[n][c]] = 1'b1;
            end else check(f.data == pattern(cur_id[n][c], cur_k[n][c]), "payload intact");
            cur_k[n][c]++;
            if (f.eop) begin
              in_pkt[n][c] = 1'b0;
              received++;
            end
          end
        end
        c_in[n][c] <= quiet || (($urandom % 4) != 0);
      end
  end

  task automatic add_pkt(int src, int c, service_e s, logic prio, int tx, int ty, int id, int len);
    txq[src][c].push_back('{eop: 1'b0, data: {s, 3'b0, prio, 4'(tx), 4'(ty)}});
    txq[src][c].push_back('{eop: (len == 1), data: 16'(id)});
    for (int j = 1; j < len; j++) txq[src][c].push_back('{eop: (j == len - 1), data: pattern(id, j)});
  endtask

  function automatic int node(int x, int y);
    return y * NX + x;
  endfunction

  int t0, t1, id = 1;
  int path_conn;

  initial begin
    for (int n = 0; n < N; n++)
      for (int c = 0; c < NCH; c++) begin
        in_pkt[n][c] = 0; cur_k[n][c] = 0; cur_id[n][c] = 0; l_in[n][c] = '0; c_in[n][c] = 0;
      end
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. latency
    add_pkt(0, 0, SRV_PACKET, PRIO_HIGH, 3, 0, id++, 2); sent++;
    @(negedge clk);
    while (!l_in[0][0].tx) @(negedge clk);
    t0 = int'($time);
    while (!l_out[node(3, 0)][0].tx) @(negedge clk);
    t1 = int'($time);
    check(t1 - t0 == 80, $sformatf("4-router latency %0d ns, expected 8 cycles", t1 - t0));
    while (received < sent) @(posedge clk);
    // 2. circuit from (0,0) to (3,3)
    txq[0][0].push_back('{eop: 1'b1, data: {SRV_CONNECT, 3'b0, PRIO_HIGH, 8'h33}});
    repeat (40) @(posedge clk);
    path_conn = 0;
    for (int n = 0; n < N; n++) path_conn += int'(conn[n][2*DIR_LOCAL] || conn[n][0] || conn[n][2] || conn[n][4] || conn[n][6]);
    check(conn[0][2*DIR_LOCAL], "circuit holds Local channel 0 of the source router");
    check(path_conn >= 4, $sformatf("circuit spans the path (%0d routers)", path_conn));
    for (int k = 0; k < 3; k++) begin
      add_pkt(0, 0, SRV_GT, PRIO_HIGH, 3, 3, id++, 4); sent++;
    end
    txq[0][0].push_back('{eop: 1'b1, data: {SRV_RELEASE, 3'b0, PRIO_HIGH, 8'h33}});
    repeat (60) @(posedge clk);
    check(gt_rx == 3, "three GT packets crossed the circuit");
    path_conn = 0;
    for (int n = 0; n < N; n++)
      for (int p = 0; p < NPORT; p++) path_conn += int'(conn[n][p]);
    check(path_conn == 0, "circuit released everywhere");
    // 3. random traffic
    quiet = 1'b0;
    for (int n = 0; n < N; n++)
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < NPKT; k++) begin
          logic prio;
          prio = (c == 0) ? PRIO_HIGH : 1'($urandom);
          add_pkt(n, c, SRV_PACKET, prio, int'($urandom % NX), int'($urandom % NY), id++,
                  1 + int'($urandom % 8));
          sent++;
        end
    while (received < sent) @(posedge clk);
    check(received == sent, "all packets delivered");
    $display("noc: sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (received %0d of %0d)", received, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
