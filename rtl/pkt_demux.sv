// pkt_demux: the demultiplexer of the recovery path. Decodes a 3-bit port code
// into a one-hot load strobe for one of the five output ports (Local, East,
// West, North, South). Codes 101..111 select no output. `stuck` models the
// effect of a permanent fault in this demultiplexer: all strobes stay at zero,
// which is the failure the spare demultiplexer is there to cover.
// Purely combinational.
module pkt_demux
  import noc_pkg::*;
(
  input  logic             en,
  input  logic [2:0]       sel,
  input  logic             stuck,
  output logic [NPORT-1:0] load
);

  always_comb begin
    load = '0;
    if (en && !stuck && sel < 3'(NPORT)) load[sel] = 1'b1;
  end

endmodule
