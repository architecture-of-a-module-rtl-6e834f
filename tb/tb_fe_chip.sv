// tb_fe_chip: end-to-end test of the front-end chip in both roles.
// Three slave chips (upper plane, Z positions k, k+1, k+2) feed one master
// chip (lower plane) through the 160 MHz lines, as in a module. The chips
// are reduced to 16 phi rows to keep the configuration chains short; the
// logic per pixel is unchanged. All chips are configured through their
// serial chains (cluster table in the slaves, coincidence table in the
// master, one master pixel masked). Random tracks, clusters and noise are
// then applied and compared every bunch clock with a reference model:
//  * slave clean pattern two clocks after the hits (cluster rejection),
//  * master per-pixel trigger five clocks after the hits, after Z and phi
//    alignment across the three upper chips,
//  * master trigger word one clock later,
//  * Level-1 read-out of a slave and of the master chip.
// Two alignment settings are run. The test fails if a mechanism (cluster
// rejection, coincidence, a match through a neighbouring upper chip, masked
// pixel, read-out, lost Level-1 accept) never happened.
module tb_fe_chip;
  import pt_pkg::*;

  localparam int NPHI = 16;
  localparam int NZ   = 4;
  localparam int NS   = 3;
  localparam int NP   = NPHI * NZ;
  localparam int LAT  = 20;
  localparam int NCYC = 3000;
  localparam int MASKED = 21;   // master pixel index with its mask bit set

  logic ck = 1'b0, ck160 = 1'b0, rst = 1'b1, conf_ck = 1'b0, l1a = 1'b0;
  logic [NS:0] sin = '0, sout;
  logic [ZSH_W-1:0] zshift = '0;
  logic signed [PHS_W-1:0] phishift = '0;
  logic [NS:0][NZ-1:0][NPHI-1:0] hit = '0;   // [NS] is the master
  logic [NS:0][NPHI-1:0] tx;
  trig_word_t tw [NS+1];
  logic [NS:0] ro_valid, ro_busy, l1_lost;
  ro_word_t ro_word [NS+1];
  logic [NS:0][NZ-1:0][NPHI-1:0] clean, ptrig;

  for (genvar c = 0; c <= NS; c++) begin : g_chip
    logic [NS-1:0][NPHI-1:0] rx;
    assign rx = (c == NS) ? tx[NS-1:0] : '0;
    fe_chip #(.N_PHI(NPHI), .N_Z(NZ), .N_SRC(NS)) u_chip (
      .ck(ck), .ck160(ck160), .rst(rst), .master_slave(c == NS),
      .conf_ck(conf_ck), .conf_sin(sin[c]), .conf_sout(sout[c]),
      .zshift(zshift), .phishift(phishift), .l1_latency(8'(LAT)),
      .local_hit(hit[c]), .up_tx(tx[c]), .up_rx(rx),
      .trig_word(tw[c]), .l1a(l1a), .ro_valid(ro_valid[c]), .ro_word(ro_word[c]),
      .ro_busy(ro_busy[c]), .l1_lost(l1_lost[c]),
      .pix_clean(clean[c]), .pix_trig(ptrig[c]));
  end

  // clocks: ck (period 40) rises on every fourth ck160 (period 10) rising edge
  int tog = 0;
  always begin
    #5;
    ck160 = ~ck160;
    tog++;
    if (tog % 4 == 1) ck = ~ck;
  end

  int checks = 0, failures = 0;
  int prev_cnt = 0, prev_lo = 0;
  logic have_prev = 1'b0;
  int n_rej = 0, n_coinc = 0, n_xchip = 0, n_masked = 0, n_ro = 0, n_lost = 0;

  task automatic check(input string what, input int got, input int exp, input int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %0d exp %0d", n, what, got, exp);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef logic [NZ-1:0][NPHI-1:0] pat_t;

  function automatic logic at(input pat_t h, input int z, input int p);
    return (z >= 0 && z < NZ && p >= 0 && p < NPHI) ? h[z][p] : 1'b0;
  endfunction

  // cluster rejection: a pixel survives unless it, or a neighbour, is hit
  // with two or more hit neighbours
  function automatic pat_t clean_of(input pat_t h);
    pat_t big, r;
    for (int z = 0; z < NZ; z++)
      for (int p = 0; p < NPHI; p++) begin
        int cnt;
        cnt = 0;
        for (int dz = -1; dz <= 1; dz++)
          for (int dp = -1; dp <= 1; dp++)
            if (dz != 0 || dp != 0) cnt += int'(at(h, z + dz, p + dp));
        big[z][p] = h[z][p] && cnt >= 2;
      end
    for (int z = 0; z < NZ; z++)
      for (int p = 0; p < NPHI; p++) begin
        logic k;
        k = h[z][p];
        for (int dz = -1; dz <= 1; dz++)
          for (int dp = -1; dp <= 1; dp++)
            if (at(big, z + dz, p + dp)) k = 1'b0;
        r[z][p] = k;
      end
    return r;
  endfunction

  pat_t SH [NS][NCYC+10];
  pat_t MH [NCYC+10];
  int   ZS [NCYC+10], PS [NCYC+10];

  // expected master trigger pattern for hits of crossing t
  function automatic pat_t trig_of(input int t, output int xchip);
    pat_t al, r;
    pat_t cl [NS];
    xchip = 0;
    for (int c = 0; c < NS; c++) cl[c] = clean_of(SH[c][t]);
    for (int z = 0; z < NZ; z++)
      for (int p = 0; p < NPHI; p++) begin
        int gz, pp;
        gz = z + ZS[t]; pp = p + PS[t];
        al[z][p] = (gz / NZ < NS && pp >= 0 && pp < NPHI) ? cl[gz / NZ][gz % NZ][pp] : 1'b0;
      end
    for (int z = 0; z < NZ; z++)
      for (int p = 0; p < NPHI; p++) begin
        logic any;
        any = 1'b0;
        for (int dz = -1; dz <= 1; dz++)
          for (int dp = -1; dp <= 1; dp++)
            any |= at(al, z + dz, p + dp);
        r[z][p] = MH[t][z][p] && any && (z * NPHI + p != MASKED);
        if (r[z][p] && (z + ZS[t]) / NZ > 0) xchip++;
      end
    return r;
  endfunction

  // ---------------- configuration ----------------
  task automatic configure();
    for (int pix = NP - 1; pix >= 0; pix--)
      for (int i = LUT_DEPTH; i >= 0; i--) begin
        logic [LUT_AW-1:0] a;
        a = LUT_AW'(i - 1);
        for (int c = 0; c < NS; c++) sin[c] = (i == 0) ? 1'b0 : lut_cluster_default(a);
        sin[NS] = (i == 0) ? (pix == MASKED) : lut_coinc_default(a);
        #1 conf_ck = 1'b1;
        #1 conf_ck = 1'b0;
      end
  endtask

  // ---------------- read-out monitor ----------------
  int ro_exp [NS+1][$];
  always begin
    @(posedge ck);
    #1;
    for (int c = 0; c <= NS; c++)
      if (!rst && ro_valid[c] && (c == 0 || c == NS)) begin
        int e, g;
        e = (ro_exp[c].size() > 0) ? ro_exp[c].pop_front() : -9999;
        g = ro_word[c].trailer ? -1 : int'(ro_word[c].addr);
        check($sformatf("readout chip %0d", c), g, e, 0);
        if (ro_word[c].trailer) n_ro++;
      end
  end

  // ---------------- stimulus ----------------
  initial begin
    configure();
    @(negedge ck); @(negedge ck);
    rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge ck);
      // alignment setting: two phases
      zshift   = (n < NCYC / 2) ? 3'd5 : 3'd0;
      phishift = (n < NCYC / 2) ? -3'sd2 : 3'sd1;
      hit = '0;
      // tracks: an upper hit and the lower hit facing it
      for (int k = 0; k < 2; k++) begin
        int gz, p, lz, lp;
        gz = int'($urandom % (NS * NZ)); p = int'($urandom % NPHI);
        lz = gz - int'(zshift); lp = p - int'(phishift) + int'($urandom % 3) - 1;
        hit[gz / NZ][gz % NZ][p] = 1'b1;
        if (lz >= 0 && lz < NZ && lp >= 0 && lp < NPHI) hit[NS][lz][lp] = 1'b1;
      end
      // a wide cluster in one of the upper chips now and then
      if ($urandom % 4 == 0) begin
        int c, z, p;
        c = int'($urandom % NS); z = int'($urandom % NZ); p = int'($urandom % (NPHI - 2));
        hit[c][z][p] = 1'b1; hit[c][z][p+1] = 1'b1; hit[c][z][p+2] = 1'b1;
      end
      // noise in the master, and hits on the masked pixel
      hit[NS][$urandom % NZ][$urandom % NPHI] = 1'b1;
      if ($urandom % 8 == 0) hit[NS][MASKED / NPHI][MASKED % NPHI] = 1'b1;
      // level-1 accept every 60 crossings, twice in a row every 600
      l1a = (n > LAT + 10) && ((n % 60 == 0) || (n % 600 == 1));
      @(posedge ck);
      // record what the chips sampled at this edge
      for (int c = 0; c < NS; c++) SH[c][n] = hit[c];
      MH[n] = hit[NS];
      ZS[n] = int'(zshift);
      PS[n] = int'(phishift);
      if (l1a && !ro_busy[0]) begin
        for (int c = 0; c <= NS; c += NS) begin
          pat_t h;
          h = (c == NS) ? MH[n - LAT] : SH[c][n - LAT];
          for (int i = 0; i < NP; i++)
            if (h[i / NPHI][i % NPHI] && !(c == NS && i == MASKED)) ro_exp[c].push_back(i);
          ro_exp[c].push_back(-1);
        end
      end
      #1;
      n_lost += int'(l1_lost[NS]);
      // slave clean pattern: crossing n-2
      if (n >= 2)
        for (int c = 0; c < NS; c++) begin
          pat_t e;
          e = clean_of(SH[c][n-2]);
          check("slave clean", int'(clean[c] != e), 0, n);
          for (int i = 0; i < NP; i++) n_rej += int'(SH[c][n-2][i/NPHI][i%NPHI] && !e[i/NPHI][i%NPHI]);
        end
      // master pixel triggers: crossing n-5, away from the alignment change
      if (n >= 8 && !(n >= NCYC / 2 && n < NCYC / 2 + 8)) begin
        int xc, cnt, lo;
        pat_t e;
        e = trig_of(n - 5, xc);
        check("master trig", int'(ptrig[NS] != e), 0, n);
        for (int i = 0; i < NP; i++) n_coinc += int'(e[i/NPHI][i%NPHI]);
        n_xchip += xc;
        n_masked += int'(MH[n-5][MASKED/NPHI][MASKED%NPHI]);
        // trigger word: encoding of the expected pattern of one clock earlier
        if (have_prev) begin
          check("word valid", int'(tw[NS].valid), int'(prev_cnt > 0), n);
          check("word count", int'(tw[NS].count), (prev_cnt > 15) ? 15 : prev_cnt, n);
          if (prev_cnt > 0) check("word addr", int'(tw[NS].addr), prev_lo, n);
        end
        check("slave word", int'(tw[0].valid), 0, n);
        cnt = 0; lo = -1;
        for (int i = 0; i < NP; i++) if (e[i/NPHI][i%NPHI]) begin cnt++; if (lo < 0) lo = i; end
        prev_cnt = cnt; prev_lo = lo; have_prev = 1'b1;
      end else begin
        have_prev = 1'b0;
      end
    end
    l1a = 1'b0;
    repeat (100) @(posedge ck);
    checks++;
    if (n_rej == 0 || n_coinc == 0 || n_xchip == 0 || n_masked == 0 || n_ro == 0 || n_lost == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("rejected=%0d coincidences=%0d cross-chip=%0d masked=%0d events=%0d lost=%0d",
             n_rej, n_coinc, n_xchip, n_masked, n_ro, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
