// fault_detect: fault detection block of one router.
//
// The design treats permanent faults. This block records each fault indication
// it sees (the router's routing logic, each of the six buffers, the main
// demultiplexer of the recovery path) in a sticky flag that only reset clears:
// once a part is found faulty it stays retired. The flags drive
//   fs[5:0]          the Fault Signals FS_L, FS_E, FS_W, FS_N, FS_S, FS_Spare
//                    to the FIFO controller,
//   router_faulty    the notification sent to all four neighbours, which then
//                    write routing bits into packets they send here, and which
//                    switches this router to its recovery path,
//   use_spare_demux  the switch-over to the spare demultiplexer.
// How a fault is sensed is not specified by the design description; here the
// indications come in on `*_err` inputs (in simulation, from a fault generator).
// Timing: a flag rises one clock edge after its indication; synchronous
// active-low reset.
module fault_detect
  import noc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            router_err,
  input  logic [NBUF-1:0] buf_err,
  input  logic            demux_err,
  output logic [NBUF-1:0] fs,
  output logic            router_faulty,
  output logic            use_spare_demux
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fs              <= '0;
      router_faulty   <= 1'b0;
      use_spare_demux <= 1'b0;
    end else begin
      fs              <= fs | buf_err;
      router_faulty   <= router_faulty | router_err;
      use_spare_demux <= use_spare_demux | demux_err;
    end
  end

endmodule
