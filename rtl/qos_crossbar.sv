// qos_crossbar: the 10x10 crossbar of the router.
//
// Every output physical channel is a multiplexer over the ten input buffer
// heads, steered by the allocation table of the switch control (out_en_i,
// out_sel_i). An output sends when it is allocated and the selected input
// has a flit; the flit leaves the input buffer (pop_o) when the downstream
// buffer also gives credit. The table's inverse view (in_en_i, in_out_i)
// routes each output's credit back to the input that owns it. Purely
// combinational. The 10x10 size is from the paper's router figure; the
// credit-based flow control is this design's choice.
module qos_crossbar
  import qos_pkg::*;
(
  input  logic              head_valid_i [NPORT],
  input  flit_t             head_i       [NPORT],
  output logic              pop_o        [NPORT],
  input  logic              out_en_i     [NPORT],
  input  logic [PORT_W-1:0] out_sel_i    [NPORT],
  input  logic              in_en_i      [NPORT],
  input  logic [PORT_W-1:0] in_out_i     [NPORT],
  output link_t             out_o        [NPORT],
  input  logic              credit_i     [NPORT]
);

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      out_o[o].tx   = out_en_i[o] && head_valid_i[out_sel_i[o]];
      out_o[o].flit = head_i[out_sel_i[o]];
    end
    for (int i = 0; i < NPORT; i++)
      pop_o[i] = in_en_i[i] && head_valid_i[i] && credit_i[in_out_i[i]];
  end

endmodule
