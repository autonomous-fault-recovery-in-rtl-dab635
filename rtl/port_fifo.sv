// port_fifo: one packet buffer of the router (a port buffer or the spare buffer)
// with its Free Slots Counter.
//
// A circular buffer of DEPTH whole packets (store-and-forward: a packet is one
// 67-bit word). `fsc` is the Free Slots Counter that the FIFO controller reads to
// pick the most available buffer, and `gnt` is the buffer's grant: it can take
// one more packet. Keeping a free-slot count and answering with a grant follows
// the design description; the depth, the one-write/one-read-per-cycle interface
// and the synchronous active-low reset are this design's choices.
//
// Timing: a write on a clock edge is visible at `rd_pkt` from the next cycle.
// `rd_pkt` is the head packet whenever `rd_valid` is high; `rd_en` pops it at
// the clock edge. A write when full or a read when empty is ignored (the
// assertions flag it). A write and a read in the same cycle leave `fsc` unchanged.
module port_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  packet_t          wr_pkt,
  input  logic             rd_en,
  output packet_t          rd_pkt,
  output logic             rd_valid,
  output logic [CNT_W-1:0] fsc,
  output logic             gnt
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  packet_t          mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] used;

  logic do_wr, do_rd;
  assign do_wr = wr_en && (used < CNT_W'(DEPTH));
  assign do_rd = rd_en && (used != '0);

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_pkt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      used   <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      used <= used + CNT_W'(do_wr) - CNT_W'(do_rd);
    end
  end

  assign rd_pkt   = mem[rd_ptr];
  assign rd_valid = (used != '0);
  assign fsc      = CNT_W'(DEPTH) - used;
  assign gnt      = (fsc != '0);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> gnt);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_valid);

endmodule
