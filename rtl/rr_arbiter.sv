// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants at most one requester per cycle. The search starts one past the last
// requester granted, so every requester is served within N grants. The
// priority pointer moves only when a grant is taken (`advance`). Grant is
// combinational; the pointer updates at the clock edge; synchronous active-low
// reset puts the pointer at requester 0.
module rr_arbiter #(
  parameter int unsigned N = 6,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req,
  input  logic             advance,
  output logic [N-1:0]     gnt,
  output logic [IDX_W-1:0] gnt_idx,
  output logic             gnt_valid
);

  logic [IDX_W-1:0] ptr;

  always_comb begin
    logic [IDX_W-1:0] idx;
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = IDX_W'((int'(ptr) + k) % N);
      if (!gnt_valid && req[idx]) begin
        gnt_valid    = 1'b1;
        gnt_idx      = idx;
        gnt[idx]     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                     ptr <= '0;
    else if (advance && gnt_valid)  ptr <= (gnt_idx == IDX_W'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

endmodule
