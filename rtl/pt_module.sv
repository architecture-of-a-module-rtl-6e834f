// pt_module: a pT-discriminating tracker module (two stacked sensor planes).
//
// Each plane carries N_ROWS rows of N_ZCH front-end chips (3 x 6 = 18 chips
// per side). A high-pT track crosses the two planes at nearly the same phi,
// a low-pT one is bent away; pairing hits of the two planes therefore
// selects high-pT tracks right on the module, which is what the trigger
// needs.
//  * Upper plane: slave chips remove large clusters and send their clean
//    pattern down, 160 lines per chip, 4 Z pixels per line at 160 MHz.
//  * Lower plane: master chip k of a row listens to upper chips k, k+1 and
//    k+2 of the same row (fewer at the end of the row, where no chip is),
//    aligns the pattern in Z and phi, matches it pixel by pixel against its
//    own hits and sends a 15-bit trigger word each bunch crossing.
//  * The trigger frame for the opto-link is an 8-bit header (the low bits
//    of the bunch counter) followed by the words of the N_ROWS*N_ZCH master
//    chips, chip (row r, position k) at word r*N_ZCH + k.
//  * Every chip of both planes keeps its hits for Level-1 read-out; each
//    chip has its own read-out port and configuration chain.
//
// The chip counts, the master/slave split, the 4:1 multiplexed link with
// 3/2/1 upper chips per lower chip, the 15-bit word and the 8-bit module
// overhead follow the document; the frame layout, the header contents and
// static per-chip alignment pins are this design's choices. The optical
// link itself is outside the module: the frame leaves on trig_frame.
//
// Clocks and timing as in fe_chip: ck 40 MHz, ck160 160 MHz edge-aligned.
// trig_frame is registered: a hit pair sampled at edge t appears in it
// after edge t+7. Chips index as [row*N_ZCH + k]; hits as [chip][z][phi].
module pt_module #(
  parameter int unsigned N_ROWS = 3,
  parameter int unsigned N_ZCH  = 6,
  parameter int unsigned N_PHI  = pt_pkg::N_PHI,
  parameter int unsigned N_Z    = pt_pkg::N_Z
) (
  input  logic                                        ck,
  input  logic                                        ck160,
  input  logic                                        rst,
  // configuration
  input  logic                                        conf_ck,
  input  logic [N_ROWS*N_ZCH-1:0]                     conf_sin_up,
  input  logic [N_ROWS*N_ZCH-1:0]                     conf_sin_lo,
  output logic [N_ROWS*N_ZCH-1:0]                     conf_sout_up,
  output logic [N_ROWS*N_ZCH-1:0]                     conf_sout_lo,
  input  logic [N_ROWS*N_ZCH-1:0][pt_pkg::ZSH_W-1:0]  zshift,
  input  logic [N_ROWS*N_ZCH-1:0][pt_pkg::PHS_W-1:0]  phishift,
  input  logic [pt_pkg::EVT_AW-1:0]                   l1_latency,
  // sensor hits
  input  logic [N_ROWS*N_ZCH-1:0][N_Z-1:0][N_PHI-1:0] hit_up,
  input  logic [N_ROWS*N_ZCH-1:0][N_Z-1:0][N_PHI-1:0] hit_lo,
  // trigger frame to the opto-link
  output logic [pt_pkg::FRAME_HDR_W-1:0]              trig_hdr,
  output pt_pkg::trig_word_t [N_ROWS*N_ZCH-1:0]       trig_frame,
  // Level-1 read-out, upper chips then lower chips
  input  logic                                        l1a,
  output logic [2*N_ROWS*N_ZCH-1:0]                   ro_valid,
  output pt_pkg::ro_word_t [2*N_ROWS*N_ZCH-1:0]       ro_word,
  output logic [2*N_ROWS*N_ZCH-1:0]                   ro_busy,
  output logic [2*N_ROWS*N_ZCH-1:0]                   l1_lost
);
  localparam int unsigned NCH  = N_ROWS * N_ZCH;
  localparam int unsigned NSRC = pt_pkg::N_UP_SRC;

  logic [NCH-1:0][N_PHI-1:0]            lines;     // upper chip -> substrate
  pt_pkg::trig_word_t [NCH-1:0]         words;
  logic [pt_pkg::FRAME_HDR_W-1:0]       bx_cnt;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    for (genvar k = 0; k < N_ZCH; k++) begin : g_chip
      localparam int unsigned C = r * N_ZCH + k;
      logic [NSRC-1:0][N_PHI-1:0] rx_lines;
      logic [N_PHI-1:0]           lo_tx_unused;

      for (genvar s = 0; s < NSRC; s++) begin : g_src
        if (k + s < N_ZCH) begin : g_conn
          assign rx_lines[s] = lines[C + s];
        end else begin : g_none
          assign rx_lines[s] = '0;
        end
      end

      fe_chip #(.N_PHI(N_PHI), .N_Z(N_Z), .N_SRC(NSRC)) u_up (
        .ck(ck), .ck160(ck160), .rst(rst), .master_slave(1'b0),
        .conf_ck(conf_ck), .conf_sin(conf_sin_up[C]), .conf_sout(conf_sout_up[C]),
        .zshift('0), .phishift('0), .l1_latency(l1_latency),
        .local_hit(hit_up[C]),
        .up_tx(lines[C]), .up_rx('0),
        .trig_word(),
        .l1a(l1a), .ro_valid(ro_valid[C]), .ro_word(ro_word[C]),
        .ro_busy(ro_busy[C]), .l1_lost(l1_lost[C]),
        .pix_clean(), .pix_trig()
      );

      fe_chip #(.N_PHI(N_PHI), .N_Z(N_Z), .N_SRC(NSRC)) u_lo (
        .ck(ck), .ck160(ck160), .rst(rst), .master_slave(1'b1),
        .conf_ck(conf_ck), .conf_sin(conf_sin_lo[C]), .conf_sout(conf_sout_lo[C]),
        .zshift(zshift[C]), .phishift(phishift[C]), .l1_latency(l1_latency),
        .local_hit(hit_lo[C]),
        .up_tx(lo_tx_unused), .up_rx(rx_lines),
        .trig_word(words[C]),
        .l1a(l1a), .ro_valid(ro_valid[NCH+C]), .ro_word(ro_word[NCH+C]),
        .ro_busy(ro_busy[NCH+C]), .l1_lost(l1_lost[NCH+C]),
        .pix_clean(), .pix_trig()
      );
    end
  end

  // trigger frame: header and chip words registered together
  always_ff @(posedge ck) begin
    if (rst) begin
      bx_cnt     <= '0;
      trig_hdr   <= '0;
      trig_frame <= '0;
    end else begin
      bx_cnt     <= bx_cnt + 1'b1;
      trig_hdr   <= bx_cnt;
      trig_frame <= words;
    end
  end
endmodule
