// fe_chip: front-end chip of the pT module (640 pixels, 160 phi x 4 Z).
//
// The same chip is used in both planes; master_slave selects its role.
//  * Slave (upper plane): every pixel registers its hit and runs cluster
//    rejection with its 8 neighbours; the surviving (clean) pattern is sent
//    to the lower plane by plane_link_tx, one line per phi row carrying the
//    4 Z pixels of the row at 160 MHz.
//  * Master (lower plane): N_SRC plane_link_rx receivers take the lines of
//    the upper chip facing this one and of the next chips along Z;
//    zphi_align picks for each pixel the upper pixel facing it (configured
//    Z and phi shift); every pixel then matches its own hit against the 3x3
//    upper pattern around it. trigger_encoder turns the 640 match bits into
//    the chip's 15-bit trigger word.
//  * Both: each pixel keeps its hits in a 256-deep event memory; on a
//    Level-1 accept readout_logic sends the addresses of the hit pixels of
//    the crossing l1_latency clocks back.
//
// Pixel (z, phi) has index z*N_PHI + phi in every flattened vector, and its
// neighbour buses are wired in the order of the document's pixel netlist:
// [7:5] column z-1 rows phi-1..phi+1, [4] phi-1, [3] phi+1, [2:0] column z+1.
// Neighbours beyond the chip edge read as empty. The configuration chain runs
// from conf_sin through pixels 0..639 to conf_sout, each pixel taking 513
// bits (mask, then its 512-bit lookup memory; the last bit sent for a pixel
// is its mask).
//
// Clocks: ck is the 40 MHz bunch clock and ck160 the 160 MHz link clock, with
// every ck rising edge on a ck160 rising edge. The link loads one ck160 cycle
// after each ck edge, so that it reads bunch-clock data that is stable.
// Latencies (ck cycles, hit sampled at edge t): slave clean pattern after
// t+2; on the lines from t+2 1/4; in the master receiver after t+3 1/4;
// in the master pixels' pixel_up register after t+4; trigger bit after t+5;
// trig_word after t+6. A hit sampled at edge t is read out by an l1a sampled
// at edge t + l1_latency (3 <= l1_latency <= 255 for correct data).
// Reset is synchronous and active high in both clock domains.
//
// The structure (pixel array, neighbour buses, master/slave roles,
// 4:1 multiplexed inter-plane lines, Z/phi alignment, 10+5 bit trigger word,
// 256-bit event memories) follows the document; the pipeline, the link
// framing, the read-out format and the static configuration pins for the
// shifts and the latency are this design's choices.
module fe_chip #(
  parameter int unsigned N_PHI = pt_pkg::N_PHI,
  parameter int unsigned N_Z   = pt_pkg::N_Z,
  parameter int unsigned N_SRC = pt_pkg::N_UP_SRC
) (
  input  logic                         ck,
  input  logic                         ck160,
  input  logic                         rst,
  input  logic                         master_slave,
  // serial configuration
  input  logic                         conf_ck,
  input  logic                         conf_sin,
  output logic                         conf_sout,
  // static configuration
  input  logic [pt_pkg::ZSH_W-1:0]             zshift,
  input  logic signed [pt_pkg::PHS_W-1:0]      phishift,
  input  logic [pt_pkg::EVT_AW-1:0]            l1_latency,
  // discriminated hits from the sensor, [z][phi]
  input  logic [N_Z-1:0][N_PHI-1:0]    local_hit,
  // inter-plane lines
  output logic [N_PHI-1:0]             up_tx,
  input  logic [N_SRC-1:0][N_PHI-1:0]  up_rx,
  // trigger path
  output pt_pkg::trig_word_t                   trig_word,
  // Level-1 read-out
  input  logic                         l1a,
  output logic                         ro_valid,
  output pt_pkg::ro_word_t                     ro_word,
  output logic                         ro_busy,
  output logic                         l1_lost,
  // per-pixel observation of the trigger primitives, [z][phi]
  output logic [N_Z-1:0][N_PHI-1:0]    pix_clean,
  output logic [N_Z-1:0][N_PHI-1:0]    pix_trig
);
  localparam int unsigned NP  = N_PHI * N_Z;
  localparam int unsigned EAW = pt_pkg::EVT_AW;

  // ---------------- link phase: load one ck160 cycle after each ck edge ----
  logic bx_tog, bx_tog_seen, load;

  always_ff @(posedge ck)
    if (rst) bx_tog <= 1'b0;
    else     bx_tog <= ~bx_tog;

  always_ff @(posedge ck160)
    if (rst) bx_tog_seen <= 1'b0;
    else     bx_tog_seen <= bx_tog;

  assign load = bx_tog ^ bx_tog_seen;

  // ---------------- event memory addressing ----------------
  logic [pt_pkg::EVT_AW-1:0] wr_cnt, rd_addr;

  always_ff @(posedge ck)
    if (rst) wr_cnt <= '0;
    else     wr_cnt <= wr_cnt + 1'b1;

  assign rd_addr = wr_cnt - l1_latency + EAW'(2);

  // ---------------- pixel array ----------------
  logic [N_Z+1:0][N_PHI+1:0] hit_pad, rej_pad, pup_pad;   // zero border
  logic [N_Z-1:0][N_PHI-1:0] hit_o, rej_o, pup_o, pup_in, evt_o;
  logic [NP:0] conf_d, conf_c;

  assign conf_d[0]  = conf_sin;
  assign conf_c[0]  = conf_ck;
  assign conf_sout  = conf_d[NP];

  always_comb begin
    hit_pad = '0;
    rej_pad = '0;
    pup_pad = '0;
    for (int z = 0; z < int'(N_Z); z++)
      for (int p = 0; p < int'(N_PHI); p++) begin
        hit_pad[z+1][p+1] = hit_o[z][p];
        rej_pad[z+1][p+1] = rej_o[z][p];
        pup_pad[z+1][p+1] = pup_o[z][p];
      end
  end

  for (genvar z = 0; z < N_Z; z++) begin : g_z
    for (genvar p = 0; p < N_PHI; p++) begin : g_phi
      localparam int unsigned IDX = z * N_PHI + p;
      logic [pt_pkg::N_NBR-1:0] nb_hit, nb_rej, nb_pup;

      // padded coordinates of the pixel are (z+1, p+1)
      assign nb_hit = {hit_pad[z][p], hit_pad[z][p+1], hit_pad[z][p+2],
                       hit_pad[z+1][p], hit_pad[z+1][p+2],
                       hit_pad[z+2][p], hit_pad[z+2][p+1], hit_pad[z+2][p+2]};
      assign nb_rej = {rej_pad[z][p], rej_pad[z][p+1], rej_pad[z][p+2],
                       rej_pad[z+1][p], rej_pad[z+1][p+2],
                       rej_pad[z+2][p], rej_pad[z+2][p+1], rej_pad[z+2][p+2]};
      assign nb_pup = {pup_pad[z][p], pup_pad[z][p+1], pup_pad[z][p+2],
                       pup_pad[z+1][p], pup_pad[z+1][p+2],
                       pup_pad[z+2][p], pup_pad[z+2][p+1], pup_pad[z+2][p+2]};

      pixel u_pix (
        .trigger_out       (pix_trig[z][p]),
        .cluster_reject_out(rej_o[z][p]),
        .pixel_up_out      (pup_o[z][p]),
        .local_hit_out     (hit_o[z][p]),
        .clean_pixel_out   (pix_clean[z][p]),
        .serial_conf_out   (conf_d[IDX+1]),
        .conf_ck_out       (conf_c[IDX+1]),
        .ck                (ck),
        .conf_ck_in        (conf_c[IDX]),
        .serial_conf_in    (conf_d[IDX]),
        .reset             (rst),
        .master_slave      (master_slave),
        .pixel_up_in       (pup_in[z][p]),
        .local_hit_in      (local_hit[z][p]),
        .nbr_pixel_up      (nb_pup),
        .nbr_local_hit     (nb_hit),
        .nbr_cluster_reject(nb_rej),
        .evt_wr_addr       (wr_cnt),
        .evt_rd_addr       (rd_addr),
        .evt_rd_data       (evt_o[z][p])
      );
    end
  end

  // ---------------- inter-plane link ----------------
  plane_link_tx #(.LANES(N_PHI), .RATIO(N_Z)) u_tx (
    .ck160(ck160), .rst(rst), .load(load), .data(pup_o), .line(up_tx)
  );

  logic [N_SRC-1:0][N_Z-1:0][N_PHI-1:0] up_pat;

  for (genvar s = 0; s < N_SRC; s++) begin : g_rx
    plane_link_rx #(.LANES(N_PHI), .RATIO(N_Z)) u_rx (
      .ck160(ck160), .rst(rst), .load(load), .line(up_rx[s]), .data(up_pat[s])
    );
  end

  zphi_align #(.N_PHI(N_PHI), .N_Z(N_Z), .N_SRC(N_SRC)) u_align (
    .up(up_pat), .zshift(zshift), .phishift(phishift), .aligned(pup_in)
  );

  // ---------------- trigger word and read-out ----------------
  trigger_encoder #(.N(NP)) u_trig (
    .ck(ck), .rst(rst), .trig(pix_trig), .word(trig_word)
  );

  readout_logic #(.N(NP)) u_ro (
    .ck(ck), .rst(rst), .l1a(l1a), .evt_bits(evt_o),
    .ro_valid(ro_valid), .ro_word(ro_word), .busy(ro_busy), .l1_lost(l1_lost)
  );

endmodule
