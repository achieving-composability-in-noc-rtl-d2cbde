// tb_qos_input_buffer: self-checking test of the router input FIFO.
// Random writes and pops are compared with a queue model; the test also
// checks that credit drops exactly when DEPTH flits are stored, that the
// head is visible one cycle after the write, and that a full buffer ignores
// a flit sent without credit.
module tb_qos_input_buffer;
  import qos_pkg::*;

  localparam int DEPTH = 4;

  logic  clk = 0;
  logic  rst_n;
  logic  tx;
  flit_t flit_in;
  logic  credit;
  logic  head_valid;
  flit_t head;
  logic  pop;

  int checks = 0, failures = 0;
  flit_t model[$];

  qos_input_buffer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .tx_i(tx), .flit_i(flit_in), .credit_o(credit),
    .head_valid_o(head_valid), .head_o(head), .pop_i(pop)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tx = 0; pop = 0; flit_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!head_valid && credit, "empty after reset");
    // fill to full
    for (int k = 0; k < DEPTH; k++) begin
      tx = 1; flit_in = '{eop: k[0], data: 16'(16'hA000 + k)};
      @(posedge clk); #1;
      model.push_back(flit_in);
      check(head_valid, "head visible after first write");
    end
    tx = 0;
    @(negedge clk);
    check(!credit, "no credit when full");
    // try to write without credit: must be dropped
    tx = 1; flit_in = '{eop: 1'b1, data: 16'hDEAD};
    @(posedge clk); #1; tx = 0;
    // drain
    while (model.size() > 0) begin
      @(negedge clk);
      check(head_valid && head == model[0], "in-order head while draining");
      pop = 1;
      @(posedge clk); #1; pop = 0;
      void'(model.pop_front());
    end
    @(negedge clk);
    check(!head_valid, "empty after drain (dropped flit not stored)");
    // random traffic
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      if (model.size() > 0) check(head_valid && head == model[0], "random: head matches model");
      else                  check(!head_valid, "random: empty matches model");
      check(credit == (model.size() < DEPTH), "random: credit matches occupancy");
      tx      = ($urandom % 3) != 0;
      flit_in = '{eop: 1'($urandom), data: 16'($urandom)};
      pop     = head_valid && ($urandom % 2);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (tx && model.size() < DEPTH + (pop ? 1 : 0) && credit) model.push_back(flit_in);
      #1;
    end
    tx = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
