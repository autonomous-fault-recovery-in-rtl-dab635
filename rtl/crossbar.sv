// crossbar: the router's crossbar switch, six buffer heads (five ports and the
// spare buffer) to five output ports. Output o carries the head packet of
// buffer `sel[o]` and `out_valid[o]` is high when `sel_valid[o]` is. Only
// `en` high lets packets through (the crossbar enable of the design).
// Purely combinational.
module crossbar
  import noc_pkg::*;
(
  input  logic                  en,
  input  packet_t               in_pkt    [NBUF],
  input  logic [NPORT-1:0][2:0] sel,
  input  logic [NPORT-1:0]      sel_valid,
  output packet_t               out_pkt   [NPORT],
  output logic [NPORT-1:0]      out_valid
);

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      out_pkt[o] = in_pkt[0];
      for (int b = 0; b < NBUF; b++) if (sel[o] == 3'(b)) out_pkt[o] = in_pkt[b];
      out_valid[o] = en && sel_valid[o];
    end
  end

endmodule
