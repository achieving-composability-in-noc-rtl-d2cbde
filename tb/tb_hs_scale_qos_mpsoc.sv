// tb_hs_scale_qos_mpsoc: end-to-end run of the 4x4 fabric at its default
// parameters with the audio/video use case disturbed by four best-effort
// applications, replayed under the six priority scenarios S1..S6.
//
// Placement (x, y), with y = 0 the bottom row:
//   MJ1 (0,3)  T4 (1,3)  SPLIT (2,3)  JOIN (3,3)
//   AD  (0,2)  T3 (1,2)               MJ3  (3,2)
//   T1  (0,1)  T2 (1,1)  MEM   (2,1)  MJ2  (3,1)
//                        OUT   (2,0)  FIR  (3,0)
// Flows: video SPLIT->MJ1->MJ2->MJ3->JOIN, audio SPLIT->AD->FIR->JOIN, and
// the disturbing flows T1->MEM, T2->MEM, T3->OUT, T4->OUT. The processors
// are replaced by traffic sources driving the network interfaces: video
// and audio flows send a packet every VPER / APER cycles, the disturbing
// flows send back to back. Per scenario the flows are assigned low, high or
// GT service as in the scenario table (S6: the video flows open circuits,
// send GT packets and release the circuits at the end).
// A reference run comes first: the decoder alone in a compact placement
//   MJ1 (0,3) SPLIT (1,3) / MJ2 (0,2) AD (1,2) / MJ3 (0,1) FIR (1,1) /
//   JOIN (1,0), with no disturbing traffic.
// Besides throughput, every run measures the jitter at JOIN: the mean and
// standard deviation of the interval between video packet arrivals.
// Checks: every packet arrives once, at the right node, intact; low
// priority never arrives on Local channel 0. In S1 video and audio, and in
// S6 video, must reach JOIN at the rate SPLIT emits them (in S6 the audio
// flows share the high-priority class with four saturating disturbers and
// are reported, not checked); S5 must deliver fewer video
// packets, with a larger mean latency, than S1, and its arrival intervals
// at JOIN must spread more than in S1 and S6. The run also
// counts each mechanism (high priority grants, packets spilled onto the
// shared channel, low priority deliveries, circuits, GT packets, releases,
// back-pressure on the NI) and fails if one never happened.
module tb_hs_scale_qos_mpsoc;
  import qos_pkg::*;

  localparam int NX = 4, NY = 4, N = NX * NY;
  localparam int NF = 11;
  localparam int WINDOW = 6000;
  localparam int VPER = 60, APER = 120, VLEN = 16, ALEN = 8, TLEN = 32;

  logic              clk = 0;
  logic              rst_n;
  logic              desc_valid   [N];
  logic              desc_ready   [N];
  service_e          desc_service [N];
  logic              desc_prio    [N];
  logic [7:0]        desc_target  [N];
  logic [7:0]        desc_len     [N];
  logic              pay_valid    [N];
  logic [15:0]       pay_data     [N];
  logic              pay_ready    [N];
  logic              conn_open    [N];
  logic              rx_valid     [N];
  flit_t             rx_flit      [N];
  logic              rx_first     [N];
  logic              rx_ch        [N];
  logic              rx_ready     [N];
  logic              conn         [N][NPORT];
  logic              grant        [N];
  logic              grant_high   [N];

  hs_scale_qos_mpsoc dut (
    .clk(clk), .rst_n(rst_n),
    .desc_valid_i(desc_valid), .desc_ready_o(desc_ready), .desc_service_i(desc_service),
    .desc_prio_i(desc_prio), .desc_target_i(desc_target), .desc_len_i(desc_len),
    .pay_valid_i(pay_valid), .pay_data_i(pay_data), .pay_ready_o(pay_ready),
    .conn_open_o(conn_open),
    .rx_valid_o(rx_valid), .rx_flit_o(rx_flit), .rx_first_o(rx_first), .rx_ch_o(rx_ch),
    .rx_ready_i(rx_ready),
    .conn_o(conn), .grant_o(grant), .grant_high_o(grant_high)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic int node(int x, int y);
    return y * NX + x;
  endfunction

  // flow table: 0-3 video, 4-6 audio, 7-10 disturbing
  typedef enum int {M_LOW, M_HIGH, M_GT} mode_e;
  int    f_src [NF], f_dst [NF], f_len [NF], f_per [NF], f_pred [NF];
  int    tokens [NF];
  bit    f_active [NF];   // packets received from the predecessor, not yet forwarded
  mode_e f_mode [NF];
  string f_name [NF];
  int    offered [NF], delivered [NF], in_window [NF];
  longint lat_sum [NF];
  int    cycle = 0;
  logic  stop = 0;
  int    drivers_done = 0;
  logic  counting = 0;

  // mechanism counters
  int n_grant_high = 0, n_spill = 0, n_low = 0, n_gt = 0, n_conn = 0, n_rel = 0;
  int n_stall = 0, n_conn_cycles = 0;

  function automatic logic [15:0] pattern(int f, int seq, int k);
    return 16'((f * 131 + seq * 17 + k * 3) ^ 16'hA5C3);
  endfunction

  task automatic setup_flows(bit optimal);
    // positions
    int MJ1, T4, SPLIT, JOIN, AD, T3, MJ3, T1, T2, MEM, MJ2, OUT, FIR;
    MJ1 = node(0,3); T4 = node(1,3); SPLIT = node(2,3); JOIN = node(3,3);
    AD  = node(0,2); T3 = node(1,2); MJ3 = node(3,2);
    T1  = node(0,1); T2 = node(1,1); MEM = node(2,1); MJ2 = node(3,1);
    OUT = node(2,0); FIR = node(3,0);
    if (optimal) begin
      // decoder alone, compact placement: the two pipelines in columns 0, 1
      MJ1 = node(0,3); SPLIT = node(1,3); MJ2 = node(0,2); AD = node(1,2);
      MJ3 = node(0,1); FIR = node(1,1); JOIN = node(1,0);
    end
    for (int f = 0; f < NF; f++) f_active[f] = !optimal || f < 7;
    f_src = '{SPLIT, MJ1, MJ2, MJ3, SPLIT, AD, FIR, T1, T2, T3, T4};
    f_dst = '{MJ1, MJ2, MJ3, JOIN, AD, FIR, JOIN, MEM, MEM, OUT, OUT};
    f_len = '{VLEN, VLEN, VLEN, VLEN, ALEN, ALEN, ALEN, TLEN, TLEN, TLEN, TLEN};
    f_per = '{VPER, 0, 0, 0, APER, 0, 0, 0, 0, 0, 0};
    f_pred = '{-1, 0, 1, 2, -1, 4, 5, -1, -1, -1, -1};
    f_name = '{"SPLIT>MJ1", "MJ1>MJ2", "MJ2>MJ3", "MJ3>JOIN", "SPLIT>AD", "AD>FIR", "FIR>JOIN",
               "T1>MEM", "T2>MEM", "T3>OUT", "T4>OUT"};
  endtask

  // one packet through node n's network interface
  task automatic send_pkt(int n, service_e s, logic prio, int dst, int len, int f, int seq);
    @(negedge clk);
    desc_valid[n] = 1'b1; desc_service[n] = s; desc_prio[n] = prio;
    desc_target[n] = {4'(dst % NX), 4'(dst / NX)}; desc_len[n] = 8'(len);
    do @(posedge clk); while (!desc_ready[n]);
    @(negedge clk);
    desc_valid[n] = 1'b0;
    for (int k = 0; k < len; k++) begin
      pay_valid[n] = 1'b1;
      pay_data[n]  = (k == 0) ? {8'(f), 8'(seq)} : (k == 1) ? 16'(cycle) : pattern(f, seq, k);
      @(posedge clk);
      while (!pay_ready[n]) begin
        n_stall++;
        @(posedge clk);
      end
      @(negedge clk);
      pay_valid[n] = 1'b0;
    end
  endtask

  task automatic node_driver(int n);
    int fl [$];
    int next_t [NF];
    int seq [NF];
    int best;
    int rt [NF];
    for (int f = 0; f < NF; f++) if (f_src[f] == n && f_active[f]) fl.push_back(f);
    if (fl.size() == 0) begin
      drivers_done++;
      return;
    end
    foreach (fl[i]) begin
      next_t[fl[i]] = cycle + int'($urandom % 20);
      seq[fl[i]] = 0;
      if (f_mode[fl[i]] == M_GT) send_pkt(n, SRV_CONNECT, PRIO_HIGH, f_dst[fl[i]], 0, fl[i], 0);
    end
    while (!stop) begin
      foreach (fl[i])
        rt[fl[i]] = (f_pred[fl[i]] < 0) ? next_t[fl[i]] : (tokens[fl[i]] > 0) ? 0 : 32'h7fffffff;
      best = fl[0];
      foreach (fl[i]) if (rt[fl[i]] < rt[best]) best = fl[i];
      if (rt[best] > cycle) begin
        @(posedge clk);
        continue;
      end
      send_pkt(n, (f_mode[best] == M_GT) ? SRV_GT : SRV_PACKET,
               (f_mode[best] == M_LOW) ? PRIO_LOW : PRIO_HIGH,
               f_dst[best], f_len[best], best, seq[best] % 256);
      if (counting) offered[best]++;
      if (f_pred[best] >= 0) tokens[best]--;
      seq[best]++;
      next_t[best] = (f_per[best] == 0) ? cycle : next_t[best] + f_per[best];
    end
    foreach (fl[i])
      if (f_mode[fl[i]] == M_GT) send_pkt(n, SRV_RELEASE, PRIO_HIGH, f_dst[fl[i]], 0, fl[i], 0);
    drivers_done++;
  endtask

  // receivers
  logic in_pkt [N];
  int   cur_f [N], cur_seq [N], cur_k [N], cur_ts [N];
  logic cur_skip [N], cur_cnt [N];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int n = 0; n < N; n++) begin
      if (rst_n && rx_valid[n] && rx_ready[n]) begin
        flit_t fl;
        fl = rx_flit[n];
        if (rx_first[n]) begin
          header_t h;
          h = header_t'(fl.data);
          check(int'(h.target) == ((n % NX) << 4 | (n / NX)), "packet at its target node");
          cur_skip[n] = (h.service == SRV_CONNECT) || (h.service == SRV_RELEASE);
          if (h.service == SRV_CONNECT) n_conn++;
          if (h.service == SRV_RELEASE) n_rel++;
          if (h.service == SRV_GT) begin
            n_gt++;
            check(rx_ch[n] == 1'b0, "GT packet arrives on channel 0");
          end
          if (h.service == SRV_PACKET && h.prio == PRIO_LOW) begin
            n_low++;
            check(rx_ch[n] == 1'b1, "low priority never on channel 0");
          end
          if (h.service == SRV_PACKET && h.prio == PRIO_HIGH && rx_ch[n]) n_spill++;
          cur_k[n] = 0;
          in_pkt[n] = !fl.eop;
        end else if (!cur_skip[n]) begin
          if (cur_k[n] == 0) begin
            cur_f[n]   = int'(fl.data[15:8]);
            cur_seq[n] = int'(fl.data[7:0]);
            cur_cnt[n] = counting;
            check(cur_f[n] < NF && f_dst[cur_f[n]] == n, "packet belongs to a flow ending here");
          end else if (cur_k[n] == 1) cur_ts[n] = int'(fl.data);
          else check(fl.data == pattern(cur_f[n], cur_seq[n], cur_k[n]), "payload intact");
          cur_k[n]++;
          if (fl.eop && cur_f[n] < NF) begin
            delivered[cur_f[n]]++;
            for (int g = 0; g < NF; g++) if (f_pred[g] == cur_f[n]) tokens[g]++;
            if (counting) begin
              in_window[cur_f[n]]++;
              if (cur_f[n] == 3) begin
                if (last_arr >= 0) begin
                  gap_n++;
                  gap_sum  += real'(cycle - last_arr);
                  gap_sum2 += real'(cycle - last_arr) * real'(cycle - last_arr);
                end
                last_arr = cycle;
              end
              lat_sum[cur_f[n]] += longint'(16'(cycle - cur_ts[n]));
            end
          end
        end
      end
      rx_ready[n] <= ($urandom % 16) != 0;
    end
    for (int n = 0; n < N; n++) begin
      if (grant_high[n]) n_grant_high++;
      for (int p = 0; p < NPORT; p++) if (conn[n][p]) n_conn_cycles++;
    end
  end

  real vlat [7];
  int  vdel [7];
  real jmean [7], jstd [7];
  // inter-arrival times of video packets at JOIN (jitter)
  int  last_arr, gap_n;
  real gap_sum, gap_sum2;

  task automatic run_scenario(int s);
    // per-scenario service of every flow (table of the use case)
    mode_e av;
    av = M_HIGH;
    for (int f = 0; f < NF; f++) begin
      f_mode[f] = (f < 7) ? av : M_LOW;
      offered[f] = 0; delivered[f] = 0; in_window[f] = 0; lat_sum[f] = 0; tokens[f] = 0;
    end
    last_arr = -1; gap_n = 0; gap_sum = 0.0; gap_sum2 = 0.0;
    case (s)
      1: f_mode[10] = M_HIGH;
      2: begin f_mode[9] = M_HIGH; f_mode[10] = M_HIGH; end
      3: begin f_mode[7] = M_HIGH; f_mode[9] = M_HIGH; f_mode[10] = M_HIGH; end
      4, 5: for (int f = 7; f < NF; f++) f_mode[f] = M_HIGH;
      default: ;
    endcase
    if (s == 5) for (int f = 0; f < 4; f++) f_mode[f] = M_GT;
    // reset the fabric between scenarios
    rst_n = 1'b0;
    for (int n = 0; n < N; n++) begin
      desc_valid[n] = 0; pay_valid[n] = 0; in_pkt[n] = 0; cur_skip[n] = 0; cur_k[n] = 0;
      cur_f[n] = NF;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    stop = 1'b0;
    drivers_done = 0;
    for (int n = 0; n < N; n++) begin
      automatic int nn = n;
      fork
        node_driver(nn);
      join_none
    end
    repeat (500) @(posedge clk);       // warm-up, circuits opened
    counting = 1'b1;
    repeat (WINDOW) @(posedge clk);
    counting = 1'b0;
    // let the packets offered in the window drain, then stop the sources
    repeat (1500) @(posedge clk);
    stop = 1'b1;
    while (drivers_done < N) @(posedge clk);
    repeat (2000) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      check(in_window[f] <= offered[f] + 1, "no duplicate deliveries");
    end
    vdel[s] = in_window[3];
    vlat[s] = (in_window[1] > 0) ? real'(lat_sum[1]) / real'(in_window[1]) : 1.0e9;
    jmean[s] = (gap_n > 0) ? gap_sum / gap_n : 0.0;
    jstd[s]  = (gap_n > 1) ? $sqrt((gap_sum2 - gap_sum * gap_sum / gap_n) / (gap_n - 1)) : 0.0;
    $display("%s: video MJ1>MJ2 mean latency %0.1f cycles, %0d video packets at JOIN (%0d emitted by SPLIT), interval at JOIN %0.1f +- %0.1f cycles",
             (s == 6) ? "REF" : $sformatf("S%0d", s + 1), vlat[s], in_window[3], offered[0], jmean[s], jstd[s]);
    $write("    delivered in window:");
    for (int f = 0; f < NF; f++) $write(" %s=%0d", f_name[f], in_window[f]);
    $write("\n");
    if (s == 0 || s == 5 || s == 6) begin
      check(in_window[3] + 3 >= offered[0],
            $sformatf("S%0d: video reaches JOIN at the source rate (%0d of %0d)", s + 1, in_window[3], offered[0]));
      if (s == 0) check(in_window[6] + 3 >= offered[4],
            $sformatf("S%0d: audio reaches JOIN at the source rate (%0d of %0d)", s + 1, in_window[6], offered[4]));
    end
    for (int n = 0; n < N; n++)
      for (int p = 0; p < NPORT; p++) check(!conn[n][p], "no circuit left after the scenario");
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      desc_valid[n] = 0; desc_service[n] = SRV_PACKET; desc_prio[n] = 0; desc_target[n] = 0;
      desc_len[n] = 0; pay_valid[n] = 0; pay_data[n] = 0; rx_ready[n] = 1;
    end
    setup_flows(1'b1);
    run_scenario(6);
    setup_flows(1'b0);
    for (int s = 0; s < 6; s++) run_scenario(s);
    check(jstd[4] > jstd[0], "S5 arrival jitter at JOIN above S1");
    check(jstd[4] > jstd[5], "S5 arrival jitter at JOIN above S6");
    check(vlat[4] > vlat[0], "all-high scenario S5 slows the video against S1");
    check(vdel[4] < vdel[0], "all-high scenario S5 delivers fewer video packets than S1");
    $display("mechanisms: high-priority grants=%0d spilled to channel 1=%0d low-priority packets=%0d circuits=%0d GT packets=%0d releases=%0d NI stalls=%0d circuit cycles=%0d",
             n_grant_high, n_spill, n_low, n_conn, n_gt, n_rel, n_stall, n_conn_cycles);
    check(n_grant_high > 0, "high priority grants happened");
    check(n_spill > 0, "high priority used the shared channel");
    check(n_low > 0, "low priority packets delivered");
    check(n_conn == 4 && n_rel == 4, "four circuits opened and released");
    check(n_gt > 0, "GT packets carried");
    check(n_stall > 0, "back-pressure reached a network interface");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * (WINDOW + 8000)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
