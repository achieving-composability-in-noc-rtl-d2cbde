// qos_input_buffer: input FIFO of one physical channel of a router port.
//
// Each of the ten router inputs (five directions x two physical channels)
// owns one of these. Flits arrive with tx and are written when the buffer
// has room; credit_o tells the upstream sender that a flit may be sent this
// cycle. credit_o depends only on the buffer state, so there is no
// combinational path from tx_i to credit_o. The head flit is presented on
// head_o/head_valid_o and removed by pop_i in the same cycle (first-word
// fall-through); head_o reads as zero while the buffer is empty. A write
// and a pop may happen in the same cycle. The paper
// gives input buffering but no depth; DEPTH = 8 is this design's choice.
// Timing: a flit written at clock edge t is visible at the head after t.
module qos_input_buffer
  import qos_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_i,
  input  flit_t flit_i,
  output logic  credit_o,
  output logic  head_valid_o,
  output flit_t head_o,
  input  logic  pop_i
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t            mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign credit_o     = (count != (AW+1)'(DEPTH));
  assign head_valid_o = (count != '0);
  assign head_o       = head_valid_o ? mem[rd_ptr] : '0;
  assign do_wr        = tx_i && credit_o;
  assign do_rd        = pop_i && head_valid_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= flit_i;
  end

  // A pop must never be requested from an empty buffer.
  assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> head_valid_o)
    else $error("pop from empty input buffer");

endmodule
