// tb_pixel: self-checking test of the pixel trigger logic in both roles.
// A slave pixel is loaded with the cluster-rejection table and a master
// pixel with the coincidence table through their configuration chains.
// Random hits and neighbour buses are then applied every bunch clock, and
// the outputs are compared cycle by cycle with a reference computed from the
// sampled inputs: slave reject one clock and clean two clocks after the hit,
// master trigger five clocks after the hit (upper bit one clock earlier),
// event memory read-back LAT crossings later. Finally the slave is
// reconfigured with its mask bit set and must stop seeing hits.
module tb_pixel;
  import pt_pkg::*;

  localparam int NCYC = 3000;
  localparam int LAT  = 40;

  logic ck = 1'b0, conf_ck = 1'b0, reset = 1'b1;
  logic s_sin = 1'b0, m_sin = 1'b0;
  logic s_hit = 1'b0, m_hit = 1'b0, m_pup = 1'b0;
  logic [7:0] s_nlh = '0, s_nrj = '0, m_npu = '0;
  logic [EVT_AW-1:0] wa = '0, ra = '0;

  logic s_trig, s_rej, s_pupo, s_lho, s_clean, s_sout, s_cko, s_evt;
  logic m_trig, m_rej, m_pupo, m_lho, m_clean, m_sout, m_cko, m_evt;

  pixel u_slave (
    .trigger_out(s_trig), .cluster_reject_out(s_rej), .pixel_up_out(s_pupo),
    .local_hit_out(s_lho), .clean_pixel_out(s_clean), .serial_conf_out(s_sout),
    .conf_ck_out(s_cko), .ck(ck), .conf_ck_in(conf_ck), .serial_conf_in(s_sin),
    .reset(reset), .master_slave(1'b0), .pixel_up_in(1'b0), .local_hit_in(s_hit),
    .nbr_pixel_up(8'h00), .nbr_local_hit(s_nlh), .nbr_cluster_reject(s_nrj),
    .evt_wr_addr(wa), .evt_rd_addr(ra), .evt_rd_data(s_evt));

  pixel u_master (
    .trigger_out(m_trig), .cluster_reject_out(m_rej), .pixel_up_out(m_pupo),
    .local_hit_out(m_lho), .clean_pixel_out(m_clean), .serial_conf_out(m_sout),
    .conf_ck_out(m_cko), .ck(ck), .conf_ck_in(conf_ck), .serial_conf_in(m_sin),
    .reset(reset), .master_slave(1'b1), .pixel_up_in(m_pup), .local_hit_in(m_hit),
    .nbr_pixel_up(m_npu), .nbr_local_hit(8'h00), .nbr_cluster_reject(8'h00),
    .evt_wr_addr(wa), .evt_rd_addr(ra), .evt_rd_data(m_evt));

  int checks = 0, failures = 0;

  // sampled input history, index = clock edge number
  logic SH [NCYC+8], MH [NCYC+8], PU [NCYC+8];
  logic [7:0] NL [NCYC+8], NR [NCYC+8], NPU [NCYC+8];

  function automatic int popc(input logic [7:0] v);
    int c = 0;
    for (int i = 0; i < 8; i++) c += int'(v[i]);
    return c;
  endfunction

  task automatic check(input string what, input logic got, input logic exp, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %b exp %b", n, what, got, exp);
    end
  endtask

  // serial configuration: lookup bits from address 511 down to 0, then mask
  task automatic configure(input logic s_mask, input logic m_mask);
    for (int i = LUT_DEPTH; i >= 0; i--) begin
      logic [LUT_AW-1:0] a;
      a = LUT_AW'(i - 1);
      s_sin = (i == 0) ? s_mask : lut_cluster_default(a);
      m_sin = (i == 0) ? m_mask : lut_coinc_default(a);
      #2 conf_ck = 1'b1;
      #2 conf_ck = 1'b0;
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rej = 0, n_clean = 0, n_trig = 0;

  initial begin
    configure(1'b0, 1'b0);
    repeat (2) begin #5 ck = 1'b1; #5 ck = 1'b0; end
    reset = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      // drive inputs for edge n
      s_hit = ($urandom % 3) == 0;
      m_hit = ($urandom % 3) == 0;
      m_pup = ($urandom % 6) == 0;
      s_nlh = 8'($urandom) & 8'($urandom);
      s_nrj = 8'($urandom) & 8'($urandom) & 8'($urandom);
      m_npu = 8'($urandom) & 8'($urandom) & 8'($urandom) & 8'($urandom);
      wa    = EVT_AW'(n);
      ra    = EVT_AW'(n - LAT);
      SH[n] = s_hit; MH[n] = m_hit; PU[n] = m_pup;
      NL[n] = s_nlh; NR[n] = s_nrj; NPU[n] = m_npu;
      #5 ck = 1'b1;
      #1;
      // slave
      check("s_hit", s_lho, SH[n], n);
      if (n >= 1) begin
        logic er;
        er = SH[n-1] && popc(NL[n]) >= 2;
        check("s_rej", s_rej, er, n);
        n_rej += int'(er);
      end
      if (n >= 2) begin
        logic ec;
        ec = SH[n-2] && !(SH[n-2] && popc(NL[n-1]) >= 2) && NR[n] == 0;
        check("s_clean", s_clean, ec, n);
        check("s_up", s_pupo, ec, n);
        n_clean += int'(ec);
      end
      check("s_trig", s_trig, 1'b0, n);
      // master
      check("m_up", m_pupo, PU[n], n);
      check("m_rej", m_rej, 1'b0, n);
      if (n >= 5) begin
        logic et;
        et = MH[n-5] && (PU[n-1] || NPU[n] != 0);
        check("m_trig", m_trig, et, n);
        n_trig += int'(et);
      end
      // event memories
      if (n > LAT) begin
        check("s_evt", s_evt, SH[n-LAT-1], n);
        check("m_evt", m_evt, MH[n-LAT-1], n);
      end
      #4 ck = 1'b0;
    end
    checks++;
    if (n_rej == 0 || n_clean == 0 || n_trig == 0) begin
      failures++;
      $display("a mechanism never happened: rej=%0d clean=%0d trig=%0d", n_rej, n_clean, n_trig);
    end
    // mask the slave pixel: hits must disappear
    configure(1'b1, 1'b0);
    s_hit = 1'b1;
    repeat (3) begin #5 ck = 1'b1; #1 check("masked", s_lho, 1'b0, 0); #4 ck = 1'b0; end
    $display("rejects=%0d clean=%0d triggers=%0d", n_rej, n_clean, n_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
