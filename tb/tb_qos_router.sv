// tb_qos_router: random traffic through one router, at (1,1) of a 4x4 mesh.
// Eight inputs inject packets (random target, priority and length; low
// priority packets only on channel 1, as an upstream router would send
// them) while the ten outputs accept flits with random credit. Every packet
// carries its identity in its first payload flit and a checkable pattern in
// the rest. At the outputs the testbench checks: the direction matches its
// own Hamiltonian route computation, low priority never appears on channel
// 0, packets are not interleaved on an output, payloads are intact, and all
// packets arrive. It also measures the header latency through an idle
// router (two cycles) and counts high priority packets that left on
// channel 1 (channel 0 busy) and cycles with an output kept busy.
module tb_qos_router;
  import qos_pkg::*;

  localparam int NX = 4, NY = 4, RX = 1, RY = 1;
  localparam int NPKT = 60;   // per active input

  logic  clk = 0;
  logic  rst_n;
  link_t in_l     [NPORT];
  logic  credit_o [NPORT];
  link_t out_l    [NPORT];
  logic  credit_i [NPORT];
  logic  conn     [NPORT];
  logic  grant, grant_high;

  int checks = 0, failures = 0;
  flit_t txq [NPORT][$];
  int sent = 0, received = 0, high_on_ch1 = 0;
  logic in_pkt [NPORT];
  int   cur_id [NPORT];
  int   cur_k  [NPORT];
  logic cur_low [NPORT];

  qos_router #(.NX(NX), .NY(NY), .X(RX), .Y(RY), .BUF_DEPTH(4)) dut (
    .clk(clk), .rst_n(rst_n), .in_i(in_l), .credit_o(credit_o), .out_o(out_l),
    .credit_i(credit_i), .conn_o(conn), .grant_o(grant), .grant_high_o(grant_high)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int lab(int x, int y);
    return (y % 2 == 0) ? y * NX + x : y * NX + NX - 1 - x;
  endfunction

  // independent route: pick the neighbour that moves furthest along the
  // snake without passing the target
  function automatic int route_dir(int tx, int ty);
    int lc, lt, best, d, nx, ny, l;
    lc = lab(RX, RY); lt = lab(tx, ty);
    if (lc == lt) return int'(DIR_LOCAL);
    d = -1; best = lc;
    for (int k = 0; k < 4; k++) begin
      nx = RX + ((k == 2) ? 1 : (k == 3) ? -1 : 0);
      ny = RY + ((k == 0) ? 1 : (k == 1) ? -1 : 0);
      if (nx < 0 || ny < 0 || nx >= NX || ny >= NY) continue;
      l = lab(nx, ny);
      if (lt > lc && l > best && l <= lt) begin best = l; d = k; end
      if (lt < lc && l < best && l >= lt) begin best = l; d = k; end
    end
    return d;
  endfunction

  function automatic logic [15:0] pattern(int id, int k);
    return 16'((id * 37 + k * 11) ^ 16'h5A5A);
  endfunction

  // drivers: one flit per cycle when credit is given
  always @(posedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      if (in_l[p].tx && credit_o[p]) void'(txq[p].pop_front());
    end
    for (int p = 0; p < NPORT; p++) begin
      in_l[p].tx   <= 1'b0;
      in_l[p].flit <= '0;
    end
    for (int p = 0; p < NPORT; p++) begin
      if (txq[p].size() > 0 && (quiet || ($urandom % 4) != 0)) begin
        in_l[p].tx   <= 1'b1;
        in_l[p].flit <= txq[p][0];
      end
    end
  end

  // sinks and scoreboard
  always @(posedge clk) begin
    for (int o = 0; o < NPORT; o++) begin
      if (rst_n && out_l[o].tx && credit_i[o]) begin
        flit_t f;
        f = out_l[o].flit;
        if (!in_pkt[o]) begin
          header_t h;
          h = header_t'(f.data);
          checks++;
          if (route_dir(int'(h.target[7:4]), int'(h.target[3:0])) != o / 2) begin
            failures++;
            $display("FAIL: packet to %h left on port %0d", h.target, o);
          end
          checks++;
          if (h.prio == PRIO_LOW && o % 2 == 0) begin
            failures++;
            $display("FAIL: low priority packet on channel 0 (port %0d)", o);
          end
          if (h.prio == PRIO_HIGH && o % 2 == 1) high_on_ch1++;
          cur_low[o] = h.prio;
          cur_k[o]   = 0;
          in_pkt[o]  = !f.eop;
          check(!f.eop, "every test packet has payload");
        end else begin
          if (cur_k[o] == 0) cur_id[o] = int'(f.data);
          else check(f.data == pattern(cur_id[o], cur_k[o]), $sformatf("payload of packet %0d", cur_id[o]));
          cur_k[o]++;
          if (f.eop) begin
            in_pkt[o] = 1'b0;
            received++;
          end
        end
      end
    end
    for (int o = 0; o < NPORT; o++) credit_i[o] <= quiet || (($urandom % 3) != 0);
  end

  int lat_start, lat_end;
  logic quiet = 1'b1;

  initial begin
    int ins [8] = '{0, 2, 3, 5, 6, 7, 8, 9};
    for (int o = 0; o < NPORT; o++) begin
      in_pkt[o] = 0; cur_id[o] = 0; cur_k[o] = 0; cur_low[o] = 0;
      credit_i[o] = 0; in_l[o] = '0;
    end
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency through an idle router: a header on the input link in cycle
    // c is on the output link in cycle c+2
    txq[2*DIR_WEST].push_back('{eop: 1'b0, data: 16'h0033});
    txq[2*DIR_WEST].push_back('{eop: 1'b1, data: 16'h0000});
    @(negedge clk);
    while (!in_l[2*DIR_WEST].tx) @(negedge clk);
    lat_start = int'($time);
    while (!out_l[2*DIR_NORTH].tx) @(negedge clk);
    lat_end = int'($time);
    check((lat_end - lat_start) == 20, $sformatf("header latency %0d ns, expected 2 cycles", lat_end - lat_start));
    repeat (4) @(negedge clk);
    check(in_pkt[2*DIR_NORTH] == 1'b0, "latency packet complete");
    quiet = 1'b0;
    // random traffic
    for (int a = 0; a < 8; a++) begin
      int p;
      p = ins[a];
      for (int k = 0; k < NPKT; k++) begin
        int id, len, tx, ty;
        logic prio;
        id   = p * 1000 + k;
        len  = 1 + int'($urandom % 6);
        tx   = int'($urandom % NX);
        ty   = int'($urandom % NY);
        prio = (p % 2 == 0) ? PRIO_HIGH : 1'($urandom);
        txq[p].push_back('{eop: 1'b0, data: {SRV_PACKET, 3'b0, prio, 4'(tx), 4'(ty)}});
        txq[p].push_back('{eop: (len == 1), data: 16'(id)});
        for (int j = 1; j < len; j++)
          txq[p].push_back('{eop: (j == len - 1), data: pattern(id, j)});
        sent++;
      end
    end
    while (received < sent) @(posedge clk);
    check(received == sent, "all packets received");
    check(high_on_ch1 > 0, "some high priority packets used the shared channel 1");
    $display("router: sent=%0d received=%0d high_on_ch1=%0d", sent, received, high_on_ch1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (received %0d of %0d)", received, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
