// zphi_align: electronic Z and phi alignment of the upper-plane pattern.
//
// A track crossing the two planes of a module at a polar angle lands up to
// ~6 pixels (about 11 mm at eta = 2.5) further along Z in the upper plane
// than in the lower one, and mounting tolerances add a small phi offset.
// Instead of building that into the wiring, the lower chip receives the
// patterns of the upper chip facing it and of the next N_SRC-1 chips along Z
// and selects, for each of its own pixels (z, phi), the upper pixel
// (z + zshift, phi + phishift) in that combined strip. Pixels that would come
// from outside the strip (no chip there, or beyond the chip edge in phi) read
// as empty. zshift and phishift are static configuration set per chip.
//
// The Z shift and the use of several upper chips follow the document; the
// ranges (Z shift 0..7, phi shift -3..+3) and the selection as one shifter
// are this design's choices. Purely combinational.
module zphi_align #(
  parameter int unsigned N_PHI = pt_pkg::N_PHI,
  parameter int unsigned N_Z   = pt_pkg::N_Z,
  parameter int unsigned N_SRC = pt_pkg::N_UP_SRC,
  parameter int unsigned ZSH_W = pt_pkg::ZSH_W,
  parameter int unsigned PHS_W = pt_pkg::PHS_W
) (
  input  logic [N_SRC-1:0][N_Z-1:0][N_PHI-1:0] up,        // [chip][z][phi]
  input  logic [ZSH_W-1:0]                     zshift,
  input  logic signed [PHS_W-1:0]              phishift,
  output logic [N_Z-1:0][N_PHI-1:0]            aligned    // [z][phi]
);
  localparam int ZTOT = N_SRC * N_Z;

  logic [ZTOT-1:0][N_PHI-1:0] strip;
  assign strip = up;   // chip 0 supplies Z columns 0..N_Z-1, chip 1 the next, ...

  always_comb begin
    for (int z = 0; z < N_Z; z++) begin
      for (int p = 0; p < N_PHI; p++) begin
        automatic int zs = z + int'(zshift);
        automatic int ps = p + int'(phishift);
        if (zs < ZTOT && ps >= 0 && ps < int'(N_PHI))
          aligned[z][p] = strip[zs][ps];
        else
          aligned[z][p] = 1'b0;
      end
    end
  end
endmodule
