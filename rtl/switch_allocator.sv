// switch_allocator: switch allocation of the router's normal data path.
//
// Each of the six buffers (five port buffers and the spare) whose head packet
// has been routed requests one output port (`req_port`, a noc_pkg port code).
// For every output port a round-robin arbiter picks one requesting buffer, if
// the output register is free (`out_free`) and the crossbar is enabled
// (`xbar_en`). Several outputs can be granted in the same cycle, to different
// buffers. The winning buffer index goes to the crossbar (`xsel`, `xsel_valid`)
// and the buffer is popped (`buf_rd`). That an arbiter selects an input for
// each output follows the design description; round robin is this design's
// choice. Grants are combinational; the arbiters' pointers move at the clock
// edge.
module switch_allocator
  import noc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  xbar_en,
  input  logic [NBUF-1:0]       req_valid,
  input  port_e                 req_port [NBUF],
  input  logic [NPORT-1:0]      out_free,
  output logic [NBUF-1:0]       buf_rd,
  output logic [NPORT-1:0][2:0] xsel,
  output logic [NPORT-1:0]      xsel_valid
);

  logic [NPORT-1:0][NBUF-1:0] req_o, gnt_o;

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int b = 0; b < NBUF; b++)
        req_o[o][b] = xbar_en && out_free[o] && req_valid[b] && (req_port[b] == port_e'(o));
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_arb
    rr_arbiter #(.N(NBUF)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (req_o[o]),
      .advance  (1'b1),
      .gnt      (gnt_o[o]),
      .gnt_idx  (xsel[o]),
      .gnt_valid(xsel_valid[o])
    );
  end

  always_comb begin
    buf_rd = '0;
    for (int o = 0; o < NPORT; o++) buf_rd |= gnt_o[o];
  end

endmodule
