// event_memory: latency buffer of one pixel.
//
// The pixel's hit bit is written every bunch crossing into a DEPTH x 1 ring
// buffer (256 deep: 6 us of Level-1 latency at 40 MHz, as sized in the
// document). The write and read addresses are shared by all pixels of a chip
// and come from the chip's bunch counter, so the buffer holds only the data
// bits. The read is registered: rd_data holds mem[rd_addr] one clock after
// rd_addr is presented. Reset is not applied to the storage; the chip clears
// it by writing for DEPTH cycles before any read is trusted.
module event_memory #(
  parameter int unsigned DEPTH = pt_pkg::EVT_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_data,
  input  logic [AW-1:0] wr_addr,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_data
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    mem[wr_addr] <= wr_data;
    rd_data      <= mem[rd_addr];
  end
endmodule
