// tb_qos_crossbar: random allocation tables (a permutation of inputs onto
// outputs, some entries disabled) with random buffer heads and credits; each
// output's flit, tx and each input's pop are compared with values computed
// here from the same table.
module tb_qos_crossbar;
  import qos_pkg::*;

  logic              head_valid [NPORT];
  flit_t             head       [NPORT];
  logic              pop        [NPORT];
  logic              out_en     [NPORT];
  logic [PORT_W-1:0] out_sel    [NPORT];
  logic              in_en      [NPORT];
  logic [PORT_W-1:0] in_out     [NPORT];
  link_t             out        [NPORT];
  logic              credit     [NPORT];
  int checks = 0, failures = 0;

  qos_crossbar dut (.head_valid_i(head_valid), .head_i(head), .pop_o(pop), .out_en_i(out_en),
                    .out_sel_i(out_sel), .in_en_i(in_en), .in_out_i(in_out), .out_o(out),
                    .credit_i(credit));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int perm [NPORT];
    int tmp, j;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < NPORT; i++) perm[i] = i;
      for (int i = NPORT - 1; i > 0; i--) begin
        j = int'($urandom % (i + 1)); tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int i = 0; i < NPORT; i++) begin
        head_valid[i] = 1'($urandom);
        head[i]       = flit_t'($urandom);
        credit[i]     = 1'($urandom);
        in_en[i]      = ($urandom % 4) != 0;
        in_out[i]     = PORT_W'(perm[i]);
        out_en[i]     = 1'b0;
        out_sel[i]    = '0;
      end
      for (int i = 0; i < NPORT; i++)
        if (in_en[i]) begin
          out_en[perm[i]]  = 1'b1;
          out_sel[perm[i]] = PORT_W'(i);
        end
      #1;
      for (int i = 0; i < NPORT; i++) begin
        check(pop[i] == (in_en[i] && head_valid[i] && credit[perm[i]]), "pop");
        if (in_en[i]) begin
          check(out[perm[i]].tx == head_valid[i], "tx follows owner's valid");
          check(out[perm[i]].flit == head[i], "flit routed to allocated output");
        end
      end
      for (int o = 0; o < NPORT; o++)
        if (!out_en[o]) check(!out[o].tx, "unallocated output idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
