// plane_link_rx: deserializer of the upper-plane pattern in the lower chip.
//
// Samples each incoming line on every 160 MHz edge and rebuilds the RATIO
// (= 4) Z pixels of every phi row, the inverse of plane_link_tx. On the edge
// where load is high the last pixel of the frame is on the lines; the full
// frame is then copied into the parallel register data, which stays stable
// for a whole bunch crossing and is read by the bunch-clock logic.
//
// Timing: with tx and rx sharing the same load phase and zero wire delay,
// a frame loaded by the transmitter on load edge n is presented on data
// after load edge n+1 (RATIO fast cycles later). RATIO must be 3 or more.
module plane_link_rx #(
  parameter int unsigned LANES = pt_pkg::N_PHI,
  parameter int unsigned RATIO = pt_pkg::SER_RATIO
) (
  input  logic                        ck160,
  input  logic                        rst,
  input  logic                        load,
  input  logic [LANES-1:0]            line,
  output logic [RATIO-1:0][LANES-1:0] data    // [z][phi]
);
  logic [RATIO-2:0][LANES-1:0] sh;   // pixels received so far, newest at top

  always_ff @(posedge ck160) begin
    if (rst) begin
      sh   <= '0;
      data <= '0;
    end else begin
      sh <= {line, sh[RATIO-2:1]};
      if (load) data <= {line, sh};
    end
  end
endmodule
