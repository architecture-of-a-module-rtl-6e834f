// pixel: trigger logic of one 100 um x 2 mm pixel.
//
// The same pixel sits in both planes of the module; master_slave selects its
// role (1 = master, lower plane; 0 = slave, upper plane).
//
// Slave (upper plane), cluster rejection: the discriminated hit is registered
// (hit_q). The lookup memory, addressed by {own hit, 8 neighbour hits},
// flags a pixel that is hit and has more than one hit neighbour
// (cluster_reject_out). A hit survives (clean_pixel_out) only when neither the
// pixel nor any neighbour raised that flag, so every cluster of three or more
// pixels is removed completely while single pixels and pairs pass. The clean
// bit leaves on pixel_up_out for the link to the lower plane.
//
// Master (lower plane), coincidence: pixel_up_in is the upper-plane bit that
// the link and the Z/phi alignment deliver for this pixel; it is registered
// and shared with the neighbours on pixel_up_out. The lookup memory,
// addressed by {own upper bit, 8 neighbour upper bits}, says whether the
// upper-plane pattern is compatible with a high-pT track; trigger_out is that
// answer ANDed with the pixel's own hit, delayed to the same bunch crossing.
// Cluster rejection is not applied in the master, whose lookup memory is
// taken by the coincidence.
//
// Timing (bunch clock ck): hit sampled at edge t; slave clean_pixel_out valid
// after edge t+2. Master: pixel_up_in for that crossing is sampled at edge
// t+4 by construction of the link (see fe_chip), trigger_out valid after
// edge t+5. MASTER_HIT_DLY sets the local delay and must equal that link
// latency.
//
// Configuration: a serial chain clocked by conf_ck_in runs serial_conf_in ->
// mask bit -> 512-bit lookup memory -> serial_conf_out; conf_ck_in is passed
// on to the next pixel as in the document's pixel netlist. A set mask bit
// silences the pixel's hit.
//
// Every hit_q is also written into the pixel's 256-deep event memory at the
// chip's bunch-counter address for Level-1 readout.
//
// The roles, the neighbour buses and the port list follow the document's
// pixel model; the pipeline registers, the mask bit and the order of the
// configuration chain are this design's choices.
module pixel
  import pt_pkg::*;
#(
  parameter int unsigned MASTER_DLY = MASTER_HIT_DLY
) (
  // outputs
  output logic              trigger_out,
  output logic              cluster_reject_out,
  output logic              pixel_up_out,
  output logic              local_hit_out,
  output logic              clean_pixel_out,
  output logic              serial_conf_out,
  output logic              conf_ck_out,
  // inputs
  input  logic              ck,
  input  logic              conf_ck_in,
  input  logic              serial_conf_in,
  input  logic              reset,
  input  logic              master_slave,
  input  logic              pixel_up_in,
  input  logic              local_hit_in,
  input  logic [N_NBR-1:0]  nbr_pixel_up,
  input  logic [N_NBR-1:0]  nbr_local_hit,
  input  logic [N_NBR-1:0]  nbr_cluster_reject,
  // event memory addresses shared by the chip, and its read data
  input  logic [EVT_AW-1:0] evt_wr_addr,
  input  logic [EVT_AW-1:0] evt_rd_addr,
  output logic              evt_rd_data
);
  logic mask;
  logic lut_sin, lut_dout;
  logic [LUT_AW-1:0] lut_addr;

  logic hit_q, hit_d1, rej_q, clean_q, pup_q, trig_q;
  logic [MASTER_DLY-3:0] hit_dl;   // clean_q delayed further in the master

  // ---------------- configuration chain ----------------
  always_ff @(posedge conf_ck_in)
    mask <= serial_conf_in;
  assign lut_sin     = mask;
  assign conf_ck_out = conf_ck_in;

  lookup_sram #(.AW(LUT_AW)) u_lut (
    .conf_ck  (conf_ck_in),
    .conf_sin (lut_sin),
    .conf_sout(serial_conf_out),
    .addr     (lut_addr),
    .dout     (lut_dout)
  );

  assign lut_addr = master_slave ? {pup_q, nbr_pixel_up}
                                 : {hit_q, nbr_local_hit};

  // ---------------- hit pipeline ----------------
  always_ff @(posedge ck) begin
    if (reset) begin
      hit_q   <= 1'b0;
      hit_d1  <= 1'b0;
      rej_q   <= 1'b0;
      clean_q <= 1'b0;
      pup_q   <= 1'b0;
      trig_q  <= 1'b0;
      hit_dl  <= '0;
    end else begin
      hit_q   <= local_hit_in & ~mask;
      hit_d1  <= hit_q;
      rej_q   <= master_slave ? 1'b0 : lut_dout;
      clean_q <= hit_d1 & ~rej_q & ~(|nbr_cluster_reject);
      pup_q   <= pixel_up_in;
      hit_dl  <= {hit_dl[MASTER_DLY-4:0], clean_q};
      trig_q  <= master_slave & lut_dout & hit_dl[MASTER_DLY-3];
    end
  end

  assign local_hit_out      = hit_q;
  assign cluster_reject_out = rej_q;
  assign clean_pixel_out    = clean_q;
  assign pixel_up_out       = master_slave ? pup_q : clean_q;
  assign trigger_out        = trig_q;

  // ---------------- event memory ----------------
  event_memory #(.DEPTH(EVT_DEPTH)) u_evt (
    .clk    (ck),
    .wr_data(hit_q),
    .wr_addr(evt_wr_addr),
    .rd_addr(evt_rd_addr),
    .rd_data(evt_rd_data)
  );

endmodule
