// qos_switch_control: the shared control logic of one router.
//
// It reads the header flit waiting at the head of every idle input buffer,
// computes its output direction with the Hamiltonian routing unit and picks
// the physical output channel:
//   * low-priority packets (P = 1) may use only channel 1;
//   * high-priority packets (P = 0) use channel 0 when it is free, otherwise
//     channel 1 (channel 0 is reserved for high priority, channel 1 shared);
//   * connection establishment packets use only channel 0.
// One request is granted per cycle. High-priority requests that can be
// served win over low-priority ones (fixed priorities); inside a class a
// round-robin pointer of that class rotates over the ten inputs, so grants
// of one class do not disturb the rotation of the other. A granted input keeps its
// output until the flit carrying eop leaves, and the output is then freed
// (wormhole switching). A connection establishment packet is different: when
// its eop leaves, the input-output pair stays allocated and the input turns
// into a circuit. On a circuit every flit is forwarded without routing (the
// header of a GT packet is payload for the routers); the switch control
// only watches packet boundaries, and when a packet whose first flit carries
// the release service has passed, the circuit is torn down.
// Interface: per input the head flit and its valid, and the pop strobe the
// crossbar produced; per output whether it is allocated and to which input;
// per input whether it is allocated and to which output. Allocation is
// registered: a header that is at the head in cycle t can move in cycle t+1.
// The channel rules, the priorities and the circuit behaviour follow the
// paper; the one-grant-per-cycle arbiter, the round-robin order and the way
// a release packet is recognised are this design's choices.
module qos_switch_control
  import qos_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4,
  parameter int unsigned X  = 0,
  parameter int unsigned Y  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              head_valid_i [NPORT],
  input  flit_t             head_i       [NPORT],
  input  logic              pop_i        [NPORT],
  output logic              out_en_o     [NPORT],
  output logic [PORT_W-1:0] out_sel_o    [NPORT],
  output logic              in_en_o      [NPORT],
  output logic [PORT_W-1:0] in_out_o     [NPORT],
  output logic              conn_o       [NPORT],  // input holds a circuit
  output logic              grant_o,               // a header was granted
  output logic              grant_high_o           // ... and it was high priority
);

  typedef enum logic [1:0] {
    IN_IDLE  = 2'd0,   // waiting for a header
    IN_PKT   = 2'd1,   // forwarding a packet-switched packet
    IN_SETUP = 2'd2,   // forwarding a connection establishment packet
    IN_CONN  = 2'd3    // circuit established
  } in_state_e;

  in_state_e         st      [NPORT];
  logic              in_pkt  [NPORT];   // inside a packet on a circuit
  logic              rel     [NPORT];   // current circuit packet is a release
  logic [PORT_W-1:0] in_out  [NPORT];
  logic              out_en  [NPORT];
  logic [PORT_W-1:0] out_sel [NPORT];
  logic [PORT_W-1:0] rr_hi, rr_lo;   // round-robin pointer of each class

  // ------------------------------------------------------------------
  // Per-input request evaluation
  // ------------------------------------------------------------------
  dir_e              dir       [NPORT];
  logic [3:0]        head_srv  [NPORT];   // service field of each head flit
  logic              feasible  [NPORT];
  logic              is_high   [NPORT];
  logic [PORT_W-1:0] want_out  [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_route
    ham_routing #(.NX(NX), .NY(NY)) u_route (
      .cur_x_i (4'(X)),
      .cur_y_i (4'(Y)),
      .target_i(head_i[i].data[7:0]),
      .dir_o   (dir[i])
    );
  end

  logic              is_rel    [NPORT];   // flit on a circuit belongs to a release

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      head_srv[i] = head_i[i].data[15:12];
      is_rel[i]   = in_pkt[i] ? rel[i] : (head_srv[i] == SRV_RELEASE);
    end
  end

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      header_t h;
      logic [PORT_W-1:0] p0, p1;
      h  = header_t'(head_i[i].data);
      p0 = port_index(dir[i], 1'b0);
      p1 = port_index(dir[i], 1'b1);
      feasible[i] = 1'b0;
      want_out[i] = p1;
      is_high[i]  = (h.prio == PRIO_HIGH) || (h.service == SRV_CONNECT);
      if (head_valid_i[i] && st[i] == IN_IDLE) begin
        if (h.service == SRV_CONNECT) begin
          feasible[i] = !out_en[p0];
          want_out[i] = p0;
        end else if (h.prio == PRIO_HIGH) begin
          if (!out_en[p0]) begin
            feasible[i] = 1'b1;
            want_out[i] = p0;
          end else begin
            feasible[i] = !out_en[p1];
            want_out[i] = p1;
          end
        end else begin
          feasible[i] = !out_en[p1];
          want_out[i] = p1;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Arbiter: high priority first, round robin inside a class
  // ------------------------------------------------------------------
  logic              gnt;
  logic [PORT_W-1:0] gnt_idx;
  logic              gnt_high;

  always_comb begin
    int idx;
    gnt      = 1'b0;
    gnt_idx  = '0;
    gnt_high = 1'b0;
    for (int k = 0; k < NPORT; k++) begin
      idx = (int'(rr_hi) + k) % NPORT;
      if (!gnt && feasible[idx] && is_high[idx]) begin
        gnt      = 1'b1;
        gnt_high = 1'b1;
        gnt_idx  = PORT_W'(idx);
      end
    end
    for (int k = 0; k < NPORT; k++) begin
      idx = (int'(rr_lo) + k) % NPORT;
      if (!gnt && feasible[idx]) begin
        gnt     = 1'b1;
        gnt_idx = PORT_W'(idx);
      end
    end
  end

  // ------------------------------------------------------------------
  // State update
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_hi  <= '0;
      rr_lo  <= '0;
      for (int i = 0; i < NPORT; i++) begin
        st[i]      <= IN_IDLE;
        in_pkt[i]  <= 1'b0;
        rel[i]     <= 1'b0;
        in_out[i]  <= '0;
        out_en[i]  <= 1'b0;
        out_sel[i] <= '0;
      end
    end else begin
      // end of packets and circuits
      for (int i = 0; i < NPORT; i++) begin
        if (pop_i[i]) begin
          unique case (st[i])
            IN_PKT: if (head_i[i].eop) begin
              st[i]             <= IN_IDLE;
              out_en[in_out[i]] <= 1'b0;
            end
            IN_SETUP: if (head_i[i].eop) begin
              st[i]     <= IN_CONN;
              in_pkt[i] <= 1'b0;
              rel[i]    <= 1'b0;
            end
            IN_CONN: begin
              if (!in_pkt[i]) rel[i] <= is_rel[i];
              in_pkt[i] <= !head_i[i].eop;
              if (head_i[i].eop && is_rel[i]) begin
                st[i]             <= IN_IDLE;
                out_en[in_out[i]] <= 1'b0;
                rel[i]            <= 1'b0;
              end
            end
            default: ;
          endcase
        end
      end
      // new allocation (never on an output freed in this same cycle, since
      // feasibility was computed from the registered state)
      if (gnt) begin
        st[gnt_idx]            <= (head_srv[gnt_idx] == SRV_CONNECT) ? IN_SETUP : IN_PKT;
        in_out[gnt_idx]        <= want_out[gnt_idx];
        out_en[want_out[gnt_idx]]  <= 1'b1;
        out_sel[want_out[gnt_idx]] <= gnt_idx;
        if (gnt_high) rr_hi <= (gnt_idx == PORT_W'(NPORT-1)) ? '0 : gnt_idx + 1'b1;
        else          rr_lo <= (gnt_idx == PORT_W'(NPORT-1)) ? '0 : gnt_idx + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      out_en_o[i]  = out_en[i];
      out_sel_o[i] = out_sel[i];
      in_en_o[i]   = (st[i] != IN_IDLE);
      in_out_o[i]  = in_out[i];
      conn_o[i]    = (st[i] == IN_CONN);
    end
  end
  assign grant_o      = gnt;
  assign grant_high_o = gnt && gnt_high;

  // A flit may only be popped from an allocated input.
  for (genvar i = 0; i < NPORT; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) pop_i[i] |-> st[i] != IN_IDLE)
      else $error("pop from unallocated input %0d", i);
  end

endmodule
