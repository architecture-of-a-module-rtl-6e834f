// lookup_sram: the 512 x 1 lookup memory of one pixel.
//
// The memory is addressed by the 3x3 hit pattern around the pixel (bit 8 the
// pixel itself, bits 7:0 its neighbours) and answers with one bit. The same
// block serves as cluster-rejection table in the upper chip and as
// coincidence table in the lower chip; which pattern addresses it is chosen
// in the pixel. Its contents are written through the chip's serial
// configuration chain: on each rising edge of conf_ck the word shifts by one
// place, conf_sin entering at address 0 and address DEPTH-1 leaving on
// conf_sout, so after DEPTH shifts the first bit sent sits at address DEPTH-1.
//
// Timing: the read is combinational from addr to dout; the pixel registers
// the result. The document gives the size (512 x 1) and the use of the block
// and a transistor-level SRAM; here it is written as a register word so that
// the configuration chain can pass through it, which is this design's choice.
module lookup_sram #(
  parameter int unsigned AW = pt_pkg::LUT_AW
) (
  input  logic          conf_ck,
  input  logic          conf_sin,
  output logic          conf_sout,
  input  logic [AW-1:0] addr,
  output logic          dout
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [DEPTH-1:0] mem;

  always_ff @(posedge conf_ck)
    mem <= {mem[DEPTH-2:0], conf_sin};

  assign conf_sout = mem[DEPTH-1];
  assign dout      = mem[addr];
endmodule
