// noc_router: self-healing store-and-forward mesh router.
//
// Five bidirectional ports (Local, East, West, North, South; index = port code)
// each feed a packet buffer; a sixth, spare buffer has no port of its own. The
// FIFO controller writes each arriving packet into its port's buffer, or, when
// the fault detection block has marked that buffer faulty, into the healthy
// buffer with the most free slots (often the spare). Packets keep their
// destination, so any buffer can hold any port's traffic.
//
// Normal mode: every buffer head is routed X-Y at this router's coordinate
// (MY_X, MY_Y), the switch allocator grants one buffer per free output and the
// crossbar moves the packet into that port's output register.
//
// Recovery mode: once the router's routing logic is reported faulty, the
// normal path is switched off, the neighbours are notified (`router_faulty`)
// and the recovery switch takes over: it visits the six buffers in turn, one per
// cycle, and sends each head packet out through the port named by its three
// routing bits, which the neighbour that sent it has filled in. The spare
// demultiplexer replaces the main one after a demultiplexer fault.
//
// Toward a neighbour reported faulty (`nbr_faulty[port]`), every packet leaving
// through that port gets its routing bits written (heal_rbits, on the output
// register's output) with that neighbour's coordinate, so the neighbour can
// forward it without routing logic. Packets that were already inside a router
// when it failed carry whatever routing bits they had and may be misrouted.
//
// All of the above follows the design description. Choices of this design:
// one-word packets with valid/ready links (in_ready is the "not full" signal to
// the neighbour), buffers of DEPTH packets, round-robin switch allocation, and
// fault-effect inputs (`router_err`, `buf_err`, `demux_err`) standing for a fault
// generator: a buffer with a fault effect loses what is written into it and a
// faulty buffer's contents are no longer read; a router with a routing fault
// effect forwards nothing on its normal path.
//
// Timing: a packet written into a buffer at edge n can be in the output
// register at edge n+1 and in the next router's buffer at edge n+2, so a hop
// takes two cycles when nothing blocks it. In recovery mode a packet may wait up
// to five more cycles for the multiplexer select to reach its buffer.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X  = 0,
  parameter int unsigned MY_Y  = 0,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             xbar_en,
  // input links
  input  logic [NPORT-1:0] in_valid,
  input  packet_t          in_pkt    [NPORT],
  output logic [NPORT-1:0] in_ready,
  // output links
  output logic [NPORT-1:0] out_valid,
  output packet_t          out_pkt   [NPORT],
  input  logic [NPORT-1:0] out_ready,
  // fault notification from the neighbours (index = port code, bit 0 unused)
  input  logic [NPORT-1:0] nbr_faulty,
  // fault effects
  input  logic             router_err,
  input  logic [NBUF-1:0]  buf_err,
  input  logic             demux_err,
  // status
  output logic             router_faulty,
  output logic [NBUF-1:0]  fs,
  output logic             use_spare_demux,
  output logic             router_full,
  output logic [NPORT-1:0] redirected,
  output logic             bad_rbits
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  // ---------------------------------------------------------------- faults
  fault_detect u_fd (
    .clk            (clk),
    .rst_n          (rst_n),
    .router_err     (router_err),
    .buf_err        (buf_err),
    .demux_err      (demux_err),
    .fs             (fs),
    .router_faulty  (router_faulty),
    .use_spare_demux(use_spare_demux)
  );

  // ---------------------------------------------------------------- buffers
  logic [NBUF-1:0]            buf_wr_en, buf_rd, buf_rvalid, buf_gnt, head_valid;
  packet_t                    buf_wr_pkt [NBUF];
  packet_t                    head_pkt   [NBUF];
  logic [NBUF-1:0][CNT_W-1:0] buf_fsc;

  fifo_controller #(.CNT_W(CNT_W)) u_ctrl (
    .in_valid   (in_valid),
    .in_pkt     (in_pkt),
    .in_ready   (in_ready),
    .fs         (fs),
    .gnt        (buf_gnt),
    .fsc        (buf_fsc),
    .buf_wr_en  (buf_wr_en),
    .buf_wr_pkt (buf_wr_pkt),
    .redirected (redirected),
    .router_full(router_full)
  );

  for (genvar b = 0; b < NBUF; b++) begin : g_buf
    port_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (buf_wr_en[b] && !buf_err[b]),
      .wr_pkt  (buf_wr_pkt[b]),
      .rd_en   (buf_rd[b]),
      .rd_pkt  (head_pkt[b]),
      .rd_valid(buf_rvalid[b]),
      .fsc     (buf_fsc[b]),
      .gnt     (buf_gnt[b])
    );
    assign head_valid[b] = buf_rvalid[b] && !fs[b];
  end

  // ---------------------------------------------------------------- output registers
  logic [NPORT-1:0] out_free, load_norm, load_rec;
  packet_t          norm_pkt [NPORT];
  packet_t          rec_pkt;

  assign out_free = ~out_valid | out_ready;

  // ---------------------------------------------------------------- normal path
  logic             norm_en;
  port_e            head_port [NBUF];
  logic [NBUF-1:0]  sa_rd, rec_rd;
  logic [2:0]       rec_sel;  // multiplexer select, kept for observation
  logic [NPORT-1:0][2:0] xsel;
  logic [NPORT-1:0] xsel_valid;

  assign norm_en = !router_faulty && !router_err;

  for (genvar b = 0; b < NBUF; b++) begin : g_rc
    xy_route u_rc (
      .cur_x   (coord_t'(MY_X)),
      .cur_y   (coord_t'(MY_Y)),
      .dst_x   (head_pkt[b].dst_x),
      .dst_y   (head_pkt[b].dst_y),
      .out_port(head_port[b])
    );
  end

  switch_allocator u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .xbar_en   (xbar_en && norm_en),
    .req_valid (head_valid),
    .req_port  (head_port),
    .out_free  (out_free),
    .buf_rd    (sa_rd),
    .xsel      (xsel),
    .xsel_valid(xsel_valid)
  );

  crossbar u_xbar (
    .en       (xbar_en && norm_en),
    .in_pkt   (head_pkt),
    .sel      (xsel),
    .sel_valid(xsel_valid),
    .out_pkt  (norm_pkt),
    .out_valid(load_norm)
  );

  // ---------------------------------------------------------------- recovery path
  recovery_switch u_rec (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (router_faulty),
    .buf_valid (head_valid),
    .buf_pkt   (head_pkt),
    .buf_rd    (rec_rd),
    .out_free  (out_free),
    .out_load  (load_rec),
    .out_pkt   (rec_pkt),
    .use_spare (use_spare_demux),
    .main_stuck(demux_err),
    .bad_rbits (bad_rbits),
    .sel       (rec_sel)
  );

  assign buf_rd = sa_rd | rec_rd;

  // ---------------------------------------------------------------- output stage
  // Neighbour coordinates per port, for routing-bit stamping.
  localparam coord_t NX [NPORT] = '{coord_t'(MY_X), coord_t'(MY_X + 1), coord_t'(MY_X - 1),
                                    coord_t'(MY_X), coord_t'(MY_X)};
  localparam coord_t NY [NPORT] = '{coord_t'(MY_Y), coord_t'(MY_Y), coord_t'(MY_Y),
                                    coord_t'(MY_Y + 1), coord_t'(MY_Y - 1)};

  packet_t out_reg [NPORT];

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
      end else if (load_norm[o] || load_rec[o]) begin
        out_valid[o] <= 1'b1;
      end else if (out_ready[o]) begin
        out_valid[o] <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      if (load_norm[o]) out_reg[o] <= norm_pkt[o];
      else if (load_rec[o]) out_reg[o] <= rec_pkt;
    end

    // Routing bits are written on the link, so a packet that is already
    // waiting here when the neighbour fails still leaves with valid bits.
    heal_rbits u_hr (
      .pkt_in (out_reg[o]),
      .fx     (NX[o]),
      .fy     (NY[o]),
      .stamp  ((o != 0) && nbr_faulty[o]),
      .pkt_out(out_pkt[o])
    );
  end

  a_one_path: assert property (@(posedge clk) disable iff (!rst_n) !(|load_norm && |load_rec));

endmodule
