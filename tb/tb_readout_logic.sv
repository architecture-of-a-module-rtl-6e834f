// tb_readout_logic: self-checking test of the Level-1 read-out.
// Random sparse events are offered with l1a at random spacing. Each accepted
// event must come out as the addresses of its hit pixels in increasing
// order, one per clock starting one clock after the l1a, then a trailer with
// the event number; an l1a during read-out must be dropped with l1_lost.
module tb_readout_logic;
  import pt_pkg::*;
  localparam int N = 640;

  logic ck = 1'b0, rst = 1'b1, l1a = 1'b0;
  logic [N-1:0] evt_bits = '0;
  logic ro_valid, busy, l1_lost;
  ro_word_t ro_word;
  int checks = 0, failures = 0;

  readout_logic #(.N(N)) dut (.*);

  int exp_q [$];       // expected words: addr, or -1-evt for a trailer
  int evno = 0, n_lost = 0, exp_lost = 0, n_evt = 0;
  logic busy_model = 1'b0;
  int remaining = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 ck = 1'b1; #5 ck = 1'b0;
    rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      logic lost_now;
      evt_bits = '0;
      for (int i = 0; i < int'($urandom % 6); i++) evt_bits[$urandom % N] = 1'b1;
      l1a = ($urandom % 6) == 0;
      lost_now = 1'b0;
      // reference: accept when idle
      if (l1a && !busy_model) begin
        int k;
        k = 0;
        for (int i = 0; i < N; i++) if (evt_bits[i]) begin exp_q.push_back(i); k++; end
        exp_q.push_back(-1 - (evno % 1024));
        evno++; n_evt++;
        busy_model = 1'b1;
        remaining = k + 1;
      end else if (l1a && busy_model) begin
        lost_now = 1'b1;
        exp_lost++;
      end
      #5 ck = 1'b1;
      #1;
      checks++;
      if (l1_lost !== lost_now) failures++;
      n_lost += int'(l1_lost);
      if (ro_valid) begin
        int e, g;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : -9999;
        g = ro_word.trailer ? -1 - int'(ro_word.addr) : int'(ro_word.addr);
        checks++;
        if (g != e) begin
          failures++;
          if (failures < 10) $display("n %0d: got %0d exp %0d", n, g, e);
        end
        remaining--;
        if (remaining == 0) busy_model = 1'b0;
      end
      #4 ck = 1'b0;
    end
    checks++;
    if (n_lost != exp_lost || exp_lost == 0 || exp_q.size() > 40) begin
      failures++;
      $display("lost %0d exp %0d left %0d", n_lost, exp_lost, exp_q.size());
    end
    $display("events=%0d lost=%0d", n_evt, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
