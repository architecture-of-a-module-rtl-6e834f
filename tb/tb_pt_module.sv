// tb_pt_module: end-to-end test of the pT module at reduced size.
// Two rows of six chip pairs, each chip cut down to 16 phi rows (the per-pixel
// logic and the 4 Z columns are unchanged), so that the whole module can be
// configured through its 48 serial chains and run for thousands of bunch
// crossings. Every chip has its own Z and phi alignment setting. Random
// track pairs (upper hit, lower hit facing it after the shift), wide
// clusters and noise are applied; each bunch clock the 12 trigger words in
// the opto-link frame are compared with a reference model of the whole
// chain (cluster rejection in the upper chip, 160 MHz transfer, Z/phi
// alignment over up to three upper chips, 3x3 coincidence, encoding), and
// the frame header must count crossings. Level-1 read-out of one upper and
// one lower chip is compared with the injected hits. The test fails if any
// of these never happened: cluster rejection, coincidence, a match through
// the next or second-next upper chip, a lower chip at the end of a row,
// a masked pixel, a read-out event, a lost Level-1 accept.
module tb_pt_module;
  import pt_pkg::*;

  localparam int NR   = 2;
  localparam int NZC  = 6;
  localparam int NCH  = NR * NZC;
  localparam int NPHI = 16;
  localparam int NZ   = 4;
  localparam int NS   = 3;
  localparam int NP   = NPHI * NZ;
  localparam int LAT  = 24;
  localparam int NCYC = 2000;
  localparam int MASKED = 37;            // pixel masked in every lower chip
  localparam int RO_UP = 1, RO_LO = NCH + 4;

  logic ck = 1'b0, ck160 = 1'b0, rst = 1'b1, conf_ck = 1'b0, l1a = 1'b0;
  logic [NCH-1:0] sin_up = '0, sin_lo = '0, sout_up, sout_lo;
  logic [NCH-1:0][ZSH_W-1:0] zshift;
  logic [NCH-1:0][PHS_W-1:0] phishift;
  logic [NCH-1:0][NZ-1:0][NPHI-1:0] hit_up = '0, hit_lo = '0;
  logic [FRAME_HDR_W-1:0] trig_hdr;
  trig_word_t [NCH-1:0] trig_frame;
  logic [2*NCH-1:0] ro_valid, ro_busy, l1_lost;
  ro_word_t [2*NCH-1:0] ro_word;

  pt_module #(.N_ROWS(NR), .N_ZCH(NZC), .N_PHI(NPHI), .N_Z(NZ)) dut (
    .ck(ck), .ck160(ck160), .rst(rst), .conf_ck(conf_ck),
    .conf_sin_up(sin_up), .conf_sin_lo(sin_lo),
    .conf_sout_up(sout_up), .conf_sout_lo(sout_lo),
    .zshift(zshift), .phishift(phishift), .l1_latency(8'(LAT)),
    .hit_up(hit_up), .hit_lo(hit_lo), .trig_hdr(trig_hdr), .trig_frame(trig_frame),
    .l1a(l1a), .ro_valid(ro_valid), .ro_word(ro_word), .ro_busy(ro_busy), .l1_lost(l1_lost));

  int tog = 0;
  always begin
    #5;
    ck160 = ~ck160;
    tog++;
    if (tog % 4 == 1) ck = ~ck;
  end

  int checks = 0, failures = 0;
  int n_rej = 0, n_coinc = 0, n_x1 = 0, n_x2 = 0, n_end = 0, n_masked = 0, n_ro = 0, n_lost = 0;

  task automatic check(input string what, input int got, input int exp, input int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %0d exp %0d", n, what, got, exp);
    end
  endtask

  initial begin
    #200_000_000;
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

  pat_t UP [NCYC+10][NCH];
  pat_t LO [NCYC+10][NCH];
  int   ZSH [NCH], PSH [NCH];

  // expected trigger word of lower chip ch for crossing t
  function automatic trig_word_t word_of(input int t, input int ch, output int xs);
    pat_t al, r;
    int k, cnt, lo;
    trig_word_t w;
    k = ch % NZC;
    xs = 0;
    for (int z = 0; z < NZ; z++)
      for (int p = 0; p < NPHI; p++) begin
        int gz, pp, src;
        gz = z + ZSH[ch]; pp = p + PSH[ch]; src = gz / NZ;
        al[z][p] = 1'b0;
        if (src < NS && k + src < NZC && pp >= 0 && pp < NPHI) begin
          pat_t cl;
          cl = clean_of(UP[t][ch + src]);
          al[z][p] = cl[gz % NZ][pp];
        end
      end
    cnt = 0; lo = -1;
    for (int z = 0; z < NZ; z++)
      for (int p = 0; p < NPHI; p++) begin
        logic any;
        any = 1'b0;
        for (int dz = -1; dz <= 1; dz++)
          for (int dp = -1; dp <= 1; dp++)
            any |= at(al, z + dz, p + dp);
        r[z][p] = LO[t][ch][z][p] && any && (z * NPHI + p != MASKED);
        if (r[z][p]) begin
          cnt++;
          if (lo < 0) lo = z * NPHI + p;
          xs |= 1 << ((z + ZSH[ch]) / NZ);
        end
      end
    w.valid = cnt > 0;
    w.count = 4'((cnt > 15) ? 15 : cnt);
    w.addr  = (cnt > 0) ? PIX_AW'(lo) : '0;
    return w;
  endfunction

  // ---------------- configuration ----------------
  task automatic configure();
    for (int pix = NP - 1; pix >= 0; pix--)
      for (int i = LUT_DEPTH; i >= 0; i--) begin
        logic [LUT_AW-1:0] a;
        a = LUT_AW'(i - 1);
        sin_up = {NCH{(i == 0) ? 1'b0 : lut_cluster_default(a)}};
        sin_lo = {NCH{(i == 0) ? (pix == MASKED) : lut_coinc_default(a)}};
        #1 conf_ck = 1'b1;
        #1 conf_ck = 1'b0;
      end
  endtask

  // ---------------- read-out monitor ----------------
  int ro_exp [2][$];
  always begin
    @(posedge ck);
    #1;
    for (int j = 0; j < 2; j++) begin
      int c;
      c = (j == 0) ? RO_UP : RO_LO;
      if (!rst && ro_valid[c]) begin
        int e, g;
        e = (ro_exp[j].size() > 0) ? ro_exp[j].pop_front() : -9999;
        g = ro_word[c].trailer ? -1 : int'(ro_word[c].addr);
        check("readout", g, e, 0);
        if (ro_word[c].trailer) n_ro++;
      end
    end
  end

  // ---------------- stimulus and checking ----------------
  logic ro_idle [2] = '{1'b1, 1'b1};
  int   ro_left [2] = '{0, 0};
  logic [FRAME_HDR_W-1:0] last_hdr;

  initial begin
    for (int c = 0; c < NCH; c++) begin
      ZSH[c] = (c * 3) % 8;                // 0..7, every source chip used
      PSH[c] = (c % 7) - 3;                // -3..+3
      zshift[c]   = ZSH_W'(ZSH[c]);
      phishift[c] = PHS_W'(PSH[c]);
    end
    configure();
    @(negedge ck); @(negedge ck);
    rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge ck);
      hit_up = '0;
      hit_lo = '0;
      for (int k = 0; k < 6; k++) begin
        int ch, gz, p, lz, lp, src;
        ch = int'($urandom % NCH);
        lz = int'($urandom % NZ);
        lp = int'($urandom % NPHI);
        gz = lz + ZSH[ch]; p = lp + PSH[ch] + int'($urandom % 3) - 1;
        src = gz / NZ;
        hit_lo[ch][lz][lp] = 1'b1;
        if ((ch % NZC) + src < NZC && p >= 0 && p < NPHI) hit_up[ch + src][gz % NZ][p] = 1'b1;
      end
      if ($urandom % 3 == 0) begin
        int c, z, p;
        c = int'($urandom % NCH); z = int'($urandom % NZ); p = int'($urandom % (NPHI - 2));
        hit_up[c][z][p] = 1'b1; hit_up[c][z][p+1] = 1'b1; hit_up[c][z][p+2] = 1'b1;
      end
      if ($urandom % 8 == 0) hit_lo[$urandom % NCH][MASKED / NPHI][MASKED % NPHI] = 1'b1;
      for (int c = 0; c < NCH; c++) hit_up[c][$urandom % NZ][$urandom % NPHI] = 1'b1;
      l1a = (n > LAT + 10) && ((n % 50 == 0) || (n % 500 == 2));
      @(posedge ck);
      for (int c = 0; c < NCH; c++) begin UP[n][c] = hit_up[c]; LO[n][c] = hit_lo[c]; end
      for (int j = 0; j < 2; j++) begin
        if (l1a && ro_idle[j]) begin
          pat_t h;
          h = (j == 0) ? UP[n - LAT][RO_UP] : LO[n - LAT][RO_LO - NCH];
          ro_left[j] = 1;
          for (int i = 0; i < NP; i++)
            if (h[i / NPHI][i % NPHI] && !(j == 1 && i == MASKED)) begin
              ro_exp[j].push_back(i);
              ro_left[j]++;
            end
          ro_exp[j].push_back(-1);
          ro_idle[j] = 1'b0;
        end else if (!ro_idle[j]) begin
          ro_left[j]--;
          if (ro_left[j] == 0) ro_idle[j] = 1'b1;
        end
      end
      #1;
      n_lost += int'(l1_lost[RO_UP]);
      if (n > 0) check("frame header", int'(trig_hdr), int'(FRAME_HDR_W'(last_hdr + 1'b1)), n);
      last_hdr = trig_hdr;
      for (int c = 0; c < NCH; c++)
        if (n >= 2) begin
          pat_t e;
          e = clean_of(UP[n-2][c]);
          for (int i = 0; i < NP; i++) n_rej += int'(UP[n-2][c][i/NPHI][i%NPHI] && !e[i/NPHI][i%NPHI]);
        end
      if (n >= 9)
        for (int c = 0; c < NCH; c++) begin
          int xs;
          trig_word_t e;
          e = word_of(n - 7, c, xs);
          check($sformatf("frame word %0d", c), int'(trig_frame[c]), int'(e), n);
          n_coinc += int'(e.count);
          n_x1 += int'(xs[1]);
          n_x2 += int'(xs[2]);
          if (c % NZC == NZC - 1) n_end += int'(e.valid);
          n_masked += int'(LO[n-7][c][MASKED/NPHI][MASKED%NPHI]);
        end
    end
    l1a = 1'b0;
    repeat (100) @(posedge ck);
    checks++;
    if (n_rej == 0 || n_coinc == 0 || n_x1 == 0 || n_x2 == 0 || n_end == 0 || n_masked == 0 ||
        n_ro == 0 || n_lost == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("rejected=%0d stubs=%0d via-next-chip=%0d via-second-next=%0d end-of-row=%0d masked=%0d events=%0d lost=%0d",
             n_rej, n_coinc, n_x1, n_x2, n_end, n_masked, n_ro, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
