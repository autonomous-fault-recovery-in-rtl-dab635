// recovery_switch: data path of a router whose routing logic has failed.
//
// A six-input multiplexer looks at one buffer per clock cycle: its select
// counts 000 (Local), 001 (East), 010 (West), 011 (North), 100 (South),
// 101 (Spare) and wraps back to 000. The routing block reads the last three bits
// of the selected head packet, the routing bits written by the neighbour that
// sent it, and a demultiplexer forwards the packet to that output port. A spare
// demultiplexer stands beside the main one and takes over when `use_spare` is
// set by the fault detection block. All this follows the design description.
//
// Choices of this design: the packet is popped only if the target output
// register is free (`out_free`); otherwise it waits for the select to come back
// round. A packet whose routing bits name no output port (101..111) is dropped
// and reported on `bad_rbits`. `main_stuck` models a fault in the main
// demultiplexer (see pkt_demux).
//
// Timing: the select advances every cycle while `en` is high. Pop (`buf_rd`)
// and output load (`out_load`, `out_pkt`) are combinational in the cycle the
// buffer is selected, and take effect at the clock edge.
module recovery_switch
  import noc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [NBUF-1:0]  buf_valid,
  input  packet_t          buf_pkt   [NBUF],
  output logic [NBUF-1:0]  buf_rd,
  input  logic [NPORT-1:0] out_free,
  output logic [NPORT-1:0] out_load,
  output packet_t          out_pkt,
  input  logic             use_spare,
  input  logic             main_stuck,
  output logic             bad_rbits,
  output logic [2:0]       sel
);

  logic             fire;
  logic [NPORT-1:0] load_main, load_spare;
  logic [2:0]       rb;
  logic             tgt_free, go;

  always_ff @(posedge clk) begin
    if (!rst_n)                     sel <= 3'd0;
    else if (en)                    sel <= (sel == 3'(NBUF - 1)) ? 3'd0 : sel + 3'd1;
  end

  // Multiplexer and routing block.
  always_comb begin
    out_pkt   = buf_pkt[0];
    for (int b = 0; b < NBUF; b++) if (sel == 3'(b)) out_pkt = buf_pkt[b];
    rb        = out_pkt.rbits;
    fire      = 1'b0;
    for (int b = 0; b < NBUF; b++) if (sel == 3'(b)) fire = en && buf_valid[b];
    bad_rbits = fire && (rb >= 3'(NPORT));
    tgt_free  = 1'b0;
    for (int p = 0; p < NPORT; p++) if (rb == 3'(p)) tgt_free = out_free[p];
    go        = fire && !bad_rbits && tgt_free;
    buf_rd    = '0;
    for (int b = 0; b < NBUF; b++) if (sel == 3'(b)) buf_rd[b] = go || bad_rbits;
  end

  pkt_demux u_demux_main  (.en(go && !use_spare), .sel(rb), .stuck(main_stuck), .load(load_main));
  pkt_demux u_demux_spare (.en(go &&  use_spare), .sel(rb), .stuck(1'b0),       .load(load_spare));

  assign out_load = load_main | load_spare;

  a_onehot_load: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_load));

endmodule
