// noc_mesh: 2-D mesh Network-on-Chip of self-healing routers (top level).
//
// MESH_X x MESH_Y routers, numbered n = y*MESH_X + x, each with a processing
// element (PE) on its Local port. With the default 4x4 mesh, router 9 sits at
// (1,2) and its neighbours are routers 8 (West), 10 (East), 5 (South) and 13
// (North). Neighbouring routers are joined by a pair of one-packet-wide links
// with valid/ready flow control; ports on the mesh edge are tied off.
//
// Each router's fault notification (`router_faulty`) goes to its four
// neighbours, which from then on write routing bits into every packet they send
// it. The PE-side interface of each node (the network interface) writes the
// routing bits of packets its PE injects, computed at the node's own coordinate,
// so that a faulty router can also forward packets from its own PE.
//
// The mesh, X-Y routing, the per-router self-healing and the neighbour
// notification follow the design description. The 4x4 size is read from its
// router numbering; the link protocol and the PE-side routing-bit stamping are
// this design's choices.
//
// Interface: `pe_in_*` inject packets (valid/ready), `pe_out_*` deliver them;
// `router_err`, `buf_err`, `demux_err` are per-router fault-effect inputs (for a
// fault generator); `xbar_en` enables the crossbars; the status outputs report
// the fault state and the buffer redirections (the `redirected` bits of ports
// on the mesh edge stay zero, as no packet arrives there). Timing: two cycles
// per hop when nothing blocks (see noc_router).
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned N     = MESH_X * MESH_Y
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       xbar_en,
  // processing elements
  input  logic [N-1:0]               pe_in_valid,
  input  packet_t                    pe_in_pkt    [N],
  output logic [N-1:0]               pe_in_ready,
  output logic [N-1:0]               pe_out_valid,
  output packet_t                    pe_out_pkt   [N],
  input  logic [N-1:0]               pe_out_ready,
  // fault effects
  input  logic [N-1:0]               router_err,
  input  logic [N-1:0][NBUF-1:0]     buf_err,
  input  logic [N-1:0]               demux_err,
  // status
  output logic [N-1:0]               router_faulty,
  output logic [N-1:0][NBUF-1:0]     fs,
  output logic [N-1:0]               use_spare_demux,
  output logic [N-1:0]               router_full,
  output logic [N-1:0][NPORT-1:0]    redirected,
  output logic [N-1:0]               bad_rbits
);

  logic [N-1:0][NPORT-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready, r_nbr_faulty;
  packet_t                 r_in_pkt  [N][NPORT];
  packet_t                 r_out_pkt [N][NPORT];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n  = y * MESH_X + x;
      localparam int unsigned nE = y * MESH_X + x + 1;
      localparam int unsigned nW = y * MESH_X + x - 1;
      localparam int unsigned nN = (y + 1) * MESH_X + x;
      localparam int unsigned nS = (y - 1) * MESH_X + x;

      packet_t ni_pkt;

      // Network interface: routing bits of injected packets.
      heal_rbits u_ni (
        .pkt_in (pe_in_pkt[n]),
        .fx     (coord_t'(x)),
        .fy     (coord_t'(y)),
        .stamp  (1'b1),
        .pkt_out(ni_pkt)
      );

      // Local port
      assign r_in_valid[n][P_LOCAL]   = pe_in_valid[n];
      assign r_in_pkt[n][P_LOCAL]     = ni_pkt;
      assign pe_in_ready[n]           = r_in_ready[n][P_LOCAL];
      assign pe_out_valid[n]          = r_out_valid[n][P_LOCAL];
      assign pe_out_pkt[n]            = r_out_pkt[n][P_LOCAL];
      assign r_out_ready[n][P_LOCAL]  = pe_out_ready[n];
      assign r_nbr_faulty[n][P_LOCAL] = 1'b0;

      // East link: from neighbour's West output
      if (x + 1 < MESH_X) begin : g_e
        assign r_in_valid[n][P_EAST]   = r_out_valid[nE][P_WEST];
        assign r_in_pkt[n][P_EAST]     = r_out_pkt[nE][P_WEST];
        assign r_out_ready[n][P_EAST]  = r_in_ready[nE][P_WEST];
        assign r_nbr_faulty[n][P_EAST] = router_faulty[nE];
      end else begin : g_e_edge
        assign r_in_valid[n][P_EAST]   = 1'b0;
        assign r_in_pkt[n][P_EAST]     = '0;
        assign r_out_ready[n][P_EAST]  = 1'b1;
        assign r_nbr_faulty[n][P_EAST] = 1'b0;
      end

      if (x > 0) begin : g_w
        assign r_in_valid[n][P_WEST]   = r_out_valid[nW][P_EAST];
        assign r_in_pkt[n][P_WEST]     = r_out_pkt[nW][P_EAST];
        assign r_out_ready[n][P_WEST]  = r_in_ready[nW][P_EAST];
        assign r_nbr_faulty[n][P_WEST] = router_faulty[nW];
      end else begin : g_w_edge
        assign r_in_valid[n][P_WEST]   = 1'b0;
        assign r_in_pkt[n][P_WEST]     = '0;
        assign r_out_ready[n][P_WEST]  = 1'b1;
        assign r_nbr_faulty[n][P_WEST] = 1'b0;
      end

      if (y + 1 < MESH_Y) begin : g_n
        assign r_in_valid[n][P_NORTH]   = r_out_valid[nN][P_SOUTH];
        assign r_in_pkt[n][P_NORTH]     = r_out_pkt[nN][P_SOUTH];
        assign r_out_ready[n][P_NORTH]  = r_in_ready[nN][P_SOUTH];
        assign r_nbr_faulty[n][P_NORTH] = router_faulty[nN];
      end else begin : g_n_edge
        assign r_in_valid[n][P_NORTH]   = 1'b0;
        assign r_in_pkt[n][P_NORTH]     = '0;
        assign r_out_ready[n][P_NORTH]  = 1'b1;
        assign r_nbr_faulty[n][P_NORTH] = 1'b0;
      end

      if (y > 0) begin : g_s
        assign r_in_valid[n][P_SOUTH]   = r_out_valid[nS][P_NORTH];
        assign r_in_pkt[n][P_SOUTH]     = r_out_pkt[nS][P_NORTH];
        assign r_out_ready[n][P_SOUTH]  = r_in_ready[nS][P_NORTH];
        assign r_nbr_faulty[n][P_SOUTH] = router_faulty[nS];
      end else begin : g_s_edge
        assign r_in_valid[n][P_SOUTH]   = 1'b0;
        assign r_in_pkt[n][P_SOUTH]     = '0;
        assign r_out_ready[n][P_SOUTH]  = 1'b1;
        assign r_nbr_faulty[n][P_SOUTH] = 1'b0;
      end

      noc_router #(.MY_X(x), .MY_Y(y), .DEPTH(DEPTH)) u_router (
        .clk            (clk),
        .rst_n          (rst_n),
        .xbar_en        (xbar_en),
        .in_valid       (r_in_valid[n]),
        .in_pkt         (r_in_pkt[n]),
        .in_ready       (r_in_ready[n]),
        .out_valid      (r_out_valid[n]),
        .out_pkt        (r_out_pkt[n]),
        .out_ready      (r_out_ready[n]),
        .nbr_faulty     (r_nbr_faulty[n]),
        .router_err     (router_err[n]),
        .buf_err        (buf_err[n]),
        .demux_err      (demux_err[n]),
        .router_faulty  (router_faulty[n]),
        .fs             (fs[n]),
        .use_spare_demux(use_spare_demux[n]),
        .router_full    (router_full[n]),
        .redirected     (redirected[n]),
        .bad_rbits      (bad_rbits[n])
      );
    end
  end

endmodule
