// plane_link_tx: serializer of the upper-plane pattern towards the lower plane.
//
// Each phi row of the chip gets one line through the substrate, which
// carries the RATIO (= 4) Z pixels of that row one after the other at
// 160 MHz, so the whole 640-pixel clean pattern crosses to the lower plane
// once per 40 MHz bunch crossing (the document's high-granularity
// connectivity: one column of four pixels multiplexed onto one line).
//
// Timing (clock ck160): on the edge where load is high, data is taken and
// Z pixel 0 appears on the lines; pixels 1..RATIO-1 follow on the next
// edges. load must come once every RATIO edges (fe_chip makes it one fast
// clock after each bunch-clock edge, so the bunch-clock data is stable).
module plane_link_tx #(
  parameter int unsigned LANES = pt_pkg::N_PHI,
  parameter int unsigned RATIO = pt_pkg::SER_RATIO
) (
  input  logic                       ck160,
  input  logic                       rst,
  input  logic                       load,
  input  logic [RATIO-1:0][LANES-1:0] data,   // [z][phi]
  output logic [LANES-1:0]           line
);
  logic [RATIO-2:0][LANES-1:0] pend;   // pixels still to send, next one at [0]

  always_ff @(posedge ck160) begin
    if (rst) begin
      line <= '0;
      pend <= '0;
    end else if (load) begin
      line <= data[0];
      pend <= data[RATIO-1:1];
    end else begin
      line <= pend[0];
      pend <= {{LANES{1'b0}}, pend[RATIO-2:1]};
    end
  end
endmodule
