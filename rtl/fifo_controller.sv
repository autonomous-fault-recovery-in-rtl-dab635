// fifo_controller: buffer self-healing controller of one router.
//
// Each of the five input ports (Local, East, West, North, South) normally
// writes into its own buffer. The fault detection block raises FS[b] for a
// buffer b that is broken. A packet arriving on a port whose buffer is faulty
// is written instead into the healthy buffer with the most free slots, chosen
// among the other port buffers and the spare buffer (index 5) by comparing the
// buffers' Free Slots Counters (FSC); a buffer is a candidate only while its
// grant (gnt, "has a free slot") is high. This is the redirection scheme of the
// design description. When no healthy buffer has room, `router_full` tells the
// neighbours to hold their packets until a slot frees up.
//
// Choices of this design: every buffer takes at most one write per cycle; a
// healthy port always has first claim on its own buffer; faulty ports are served
// in port order (Local first), each taking the largest FSC still unclaimed, and
// on equal FSC the spare buffer, then the higher index, wins. A healthy port
// whose own buffer is full waits; it is not redirected.
//
// Caution: once buffers are shared between ports, packets heading in opposite
// directions can fill each other's buffers in two neighbouring routers, and the
// deadlock freedom that X-Y routing has with one buffer per port is lost. In
// simulation of a 4x4 mesh under uniform traffic this appeared once about every
// router had a retired buffer together with several faulty routers.
//
// Interface and timing: purely combinational. `in_ready[p]` says the packet on
// port p is stored at this clock edge; it depends on `in_valid`, which comes
// from the neighbours' output registers, so no combinational loop forms.
module fifo_controller
  import noc_pkg::*;
#(
  parameter int unsigned CNT_W = 3
) (
  input  logic [NPORT-1:0]            in_valid,
  input  packet_t                     in_pkt     [NPORT],
  output logic [NPORT-1:0]            in_ready,
  input  logic [NBUF-1:0]             fs,        // FS_L, FS_E, FS_W, FS_N, FS_S, FS_Spare
  input  logic [NBUF-1:0]             gnt,       // gnt_L .. gntSpare
  input  logic [NBUF-1:0][CNT_W-1:0]  fsc,       // FSC_L .. FSC_Spare
  output logic [NBUF-1:0]             buf_wr_en,
  output packet_t                     buf_wr_pkt [NBUF],
  output logic [NPORT-1:0]            redirected, // packet stored in another buffer
  output logic                        router_full
);

  logic [NBUF-1:0]  claimed;
  logic             found;
  logic [2:0]       best;

  always_comb begin
    found      = 1'b0;
    best       = '0;
    claimed    = '0;
    in_ready   = '0;
    redirected = '0;
    buf_wr_en  = '0;
    for (int b = 0; b < NBUF; b++) buf_wr_pkt[b] = in_pkt[0];

    // Healthy ports into their own buffers.
    for (int p = 0; p < NPORT; p++) begin
      if (!fs[p] && in_valid[p] && gnt[p]) begin
        claimed[p]    = 1'b1;
        in_ready[p]   = 1'b1;
        buf_wr_en[p]  = 1'b1;
        buf_wr_pkt[p] = in_pkt[p];
      end
    end

    // Ports with a faulty buffer: most available healthy buffer.
    for (int p = 0; p < NPORT; p++) begin
      if (fs[p] && in_valid[p]) begin
        found = 1'b0;
        best  = '0;
        for (int b = NBUF - 1; b >= 0; b--) begin
          if (!fs[b] && gnt[b] && !claimed[b]) begin
            if (!found || fsc[b] > fsc[best]) begin
              found = 1'b1;
              best  = 3'(b);
            end
          end
        end
        if (found) begin
          claimed[best]    = 1'b1;
          in_ready[p]      = 1'b1;
          redirected[p]    = 1'b1;
          buf_wr_en[best]  = 1'b1;
          buf_wr_pkt[best] = in_pkt[p];
        end
      end
    end

    router_full = ~|(gnt & ~fs);
  end

endmodule
