// tb_qos_switch_control: directed test of the router's switch control for
// the router at (1,1) of a 4x4 mesh. The testbench plays the input buffers
// (one queue per input) and the crossbar (a flit leaves when its input is
// allocated; downstream credit is always given). Every flit that leaves is
// checked against the output expected for its packet. Scenarios: low
// priority restricted to channel 1, high priority on channel 0 and spilling
// onto channel 1, high priority winning arbitration over low, a circuit
// that survives the end of its establishment packet, keeps channel 0 for
// itself, carries a GT packet without routing it, and is torn down by a
// release packet; local delivery.
// Expected routes (snake labels): from (1,1), label 6, target (3,3),
// label 12, goes North; target (0,0), label 0, goes South; (1,1) is Local.
module tb_qos_switch_control;
  import qos_pkg::*;

  localparam int N0 = 0, N1 = 1, S0 = 2, S1 = 3, E0 = 4, E1 = 5, W0 = 6, W1 = 7, L0 = 8, L1 = 9;

  logic              clk = 0;
  logic              rst_n;
  logic              head_valid [NPORT];
  flit_t             head       [NPORT];
  logic              pop        [NPORT];
  logic              out_en     [NPORT];
  logic [PORT_W-1:0] out_sel    [NPORT];
  logic              in_en      [NPORT];
  logic [PORT_W-1:0] in_out     [NPORT];
  logic              conn       [NPORT];
  logic              grant, grant_high;

  flit_t q      [NPORT][$];
  int    exp_o  [NPORT][$];
  int checks = 0, failures = 0;
  int grant_cycle [NPORT];
  int cycle = 0;

  qos_switch_control #(.NX(4), .NY(4), .X(1), .Y(1)) dut (
    .clk(clk), .rst_n(rst_n), .head_valid_i(head_valid), .head_i(head), .pop_i(pop),
    .out_en_o(out_en), .out_sel_o(out_sel), .in_en_o(in_en), .in_out_o(in_out),
    .conn_o(conn), .grant_o(grant), .grant_high_o(grant_high)
  );

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < NPORT; i++) begin
      head_valid[i] = q[i].size() > 0;
      head[i]       = head_valid[i] ? q[i][0] : '0;
      pop[i]        = in_en[i] && head_valid[i];
    end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  // crossbar / buffer model
  always @(posedge clk) begin
    cycle++;
    for (int i = 0; i < NPORT; i++) begin
      if (in_en[i] && grant_cycle[i] < 0) grant_cycle[i] = cycle;
      if (!in_en[i]) grant_cycle[i] = -1;
      if (pop[i]) begin
        check(exp_o[i].size() > 0, $sformatf("flit from input %0d expected", i));
        if (exp_o[i].size() > 0) begin
          check(int'(in_out[i]) == exp_o[i][0],
                $sformatf("input %0d routed to %0d, expected %0d", i, in_out[i], exp_o[i][0]));
          check(out_en[in_out[i]] && int'(out_sel[in_out[i]]) == i, "output table agrees");
          if (q[i][0].eop) void'(exp_o[i].pop_front());
        end
        void'(q[i].pop_front());
      end
    end
  end

  function automatic flit_t hdr(service_e s, logic p, int tx, int ty, logic eop);
    header_t h;
    h = '{service: s, unused: 3'b0, prio: p, target: {4'(tx), 4'(ty)}};
    return '{eop: eop, data: h};
  endfunction

  task automatic push(int i, flit_t f);
    q[i].push_back(f);
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  int gD, gB;

  initial begin
    for (int i = 0; i < NPORT; i++) grant_cycle[i] = -1;
    rst_n = 0;
    wait_cycles(3);
    rst_n = 1;
    wait_cycles(1);
    // 1. low priority A on W1 to (3,3): North channel 1, held open
    exp_o[W1].push_back(N1);
    push(W1, hdr(SRV_PACKET, PRIO_LOW, 3, 3, 0));
    push(W1, '{eop: 0, data: 16'h0A01});
    wait_cycles(4);
    check(out_en[N1] && out_sel[N1] == W1, "low priority packet on North channel 1");
    // 2. low priority B on S1, same target: must wait, never uses channel 0
    exp_o[S1].push_back(N1);
    push(S1, hdr(SRV_PACKET, PRIO_LOW, 3, 3, 0));
    push(S1, '{eop: 1, data: 16'h0B01});
    wait_cycles(4);
    check(!in_en[S1] && !out_en[N0], "low priority waits instead of taking channel 0");
    // 3. high priority C on E1: takes North channel 0
    exp_o[E1].push_back(N0);
    push(E1, hdr(SRV_PACKET, PRIO_HIGH, 3, 3, 0));
    wait_cycles(4);
    check(out_en[N0] && out_sel[N0] == E1, "high priority packet on North channel 0");
    // 4. high priority D on W0: both North channels busy
    exp_o[W0].push_back(N1);
    push(W0, hdr(SRV_PACKET, PRIO_HIGH, 3, 3, 0));
    push(W0, '{eop: 1, data: 16'h0D01});
    wait_cycles(4);
    check(!in_en[W0], "high priority waits while both channels are busy");
    // 5. finish A: D (high) must win North channel 1 over B (low)
    push(W1, '{eop: 1, data: 16'h0A02});
    wait_cycles(6);
    gD = grant_cycle[W0];
    check(q[W0].size() == 0 && exp_o[W0].size() == 0, "D delivered");
    wait_cycles(6);
    check(q[S1].size() == 0 && exp_o[S1].size() == 0, "B delivered after D");
    // 6. finish C
    push(E1, '{eop: 1, data: 16'h0C01});
    wait_cycles(4);
    check(!out_en[N0] && !out_en[N1], "North channels free again");
    // 7. connection establishment from Local channel 0
    exp_o[L0].push_back(N0);
    push(L0, hdr(SRV_CONNECT, PRIO_HIGH, 3, 3, 1));
    wait_cycles(5);
    check(conn[L0] && out_en[N0] && out_sel[N0] == L0, "circuit held after establishment");
    // 8. high priority E on S0 must use channel 1 now
    exp_o[S0].push_back(N1);
    push(S0, hdr(SRV_PACKET, PRIO_HIGH, 3, 3, 0));
    push(S0, '{eop: 1, data: 16'h0E01});
    wait_cycles(6);
    check(exp_o[S0].size() == 0, "high priority spills to channel 1 beside a circuit");
    // 9. GT packet: header names another target, routers must not route it
    exp_o[L0].push_back(N0);
    push(L0, hdr(SRV_GT, PRIO_HIGH, 0, 0, 0));
    push(L0, '{eop: 0, data: 16'h6701});
    push(L0, '{eop: 1, data: 16'h6702});
    wait_cycles(6);
    check(exp_o[L0].size() == 0 && conn[L0] && out_en[N0], "GT packet carried on the circuit");
    // 10. release
    exp_o[L0].push_back(N0);
    push(L0, hdr(SRV_RELEASE, PRIO_HIGH, 3, 3, 0));
    push(L0, '{eop: 1, data: 16'h0000});
    wait_cycles(6);
    check(!conn[L0] && !out_en[N0], "circuit released");
    // 11. local delivery and southward routing
    exp_o[N0].push_back(L0);
    push(N0, hdr(SRV_PACKET, PRIO_HIGH, 1, 1, 0));
    push(N0, '{eop: 1, data: 16'h1111});
    exp_o[E1].push_back(S1);
    push(E1, hdr(SRV_PACKET, PRIO_LOW, 0, 0, 0));
    push(E1, '{eop: 1, data: 16'h2222});
    wait_cycles(8);
    for (int i = 0; i < NPORT; i++) begin
      check(q[i].size() == 0, $sformatf("queue %0d drained", i));
      check(exp_o[i].size() == 0, $sformatf("all packets of input %0d seen", i));
      check(!out_en[i] && !in_en[i], "all resources free at the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // D (high) must be granted no later than B (low) once A frees the channel
  always @(posedge clk)
    if (rst_n && in_en[S1] && !in_en[W0] && exp_o[W0].size() > 0) begin
      checks++;
      failures++;
      $display("FAIL @%0d: low priority B granted before waiting high priority D", cycle);
    end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
