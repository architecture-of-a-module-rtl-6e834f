// tb_zphi_align: self-checking test of the Z/phi alignment selector.
// For every Z shift 0..7 and phi shift -3..+3, random patterns of three
// upper chips are applied and each output pixel (z, phi) is compared with
// upper pixel (z + zshift, phi + phishift) of the 12-column strip, or with 0
// when that pixel lies outside the strip.
module tb_zphi_align;
  localparam int NPHI = 160;
  localparam int NZ   = 4;
  localparam int NSRC = 3;

  logic [NSRC-1:0][NZ-1:0][NPHI-1:0] up;
  logic [2:0] zshift;
  logic signed [2:0] phishift;
  logic [NZ-1:0][NPHI-1:0] aligned;
  int checks = 0, failures = 0;

  zphi_align #(.N_PHI(NPHI), .N_Z(NZ), .N_SRC(NSRC)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int zs = 0; zs < 8; zs++) begin
      for (int ps = -3; ps <= 3; ps++) begin
        for (int rep = 0; rep < 3; rep++) begin
          for (int c = 0; c < NSRC; c++)
            for (int z = 0; z < NZ; z++)
              for (int p = 0; p < NPHI; p++) up[c][z][p] = 1'($urandom);
          zshift   = 3'(zs);
          phishift = 3'(ps);
          #1;
          for (int z = 0; z < NZ; z++)
            for (int p = 0; p < NPHI; p++) begin
              int gz, c, lz, pp;
              logic e;
              gz = z + zs; c = gz / NZ; lz = gz % NZ; pp = p + ps;
              e = (c < NSRC && pp >= 0 && pp < NPHI) ? up[c][lz][pp] : 1'b0;
              checks++;
              if (aligned[z][p] !== e) begin
                failures++;
                if (failures < 10) $display("zs %0d ps %0d z %0d p %0d: got %b exp %b", zs, ps, z, p, aligned[z][p], e);
              end
            end
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
