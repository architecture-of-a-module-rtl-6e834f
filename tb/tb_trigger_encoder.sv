// tb_trigger_encoder: self-checking test of the 15-bit chip trigger word.
// Applies random 640-bit trigger vectors of varied density (empty, single,
// few, many) and checks one clock later the valid flag, the address of the
// lowest set bit and the saturating count, against a reference loop.
module tb_trigger_encoder;
  import pt_pkg::*;
  localparam int N = 640;

  logic ck = 1'b0, rst = 1'b1;
  logic [N-1:0] trig = '0;
  trig_word_t word;
  int checks = 0, failures = 0;

  trigger_encoder #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 ck = 1'b1; #5 ck = 1'b0;
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      int k, cnt, lo;
      trig = '0;
      k = (n % 4 == 0) ? 0 : (n % 4 == 1) ? 1 : (n % 4 == 2) ? int'($urandom % 8) : int'($urandom % 40);
      for (int i = 0; i < k; i++) trig[$urandom % N] = 1'b1;
      cnt = 0; lo = -1;
      for (int i = 0; i < N; i++) if (trig[i]) begin cnt++; if (lo < 0) lo = i; end
      #5 ck = 1'b1;
      #1;
      checks++;
      if (word.valid !== (cnt > 0) || word.count !== 4'((cnt > 15) ? 15 : cnt) ||
          (cnt > 0 && word.addr !== PIX_AW'(lo))) begin
        failures++;
        if (failures < 10) $display("n %0d: got v=%b c=%0d a=%0d exp cnt=%0d lo=%0d", n, word.valid, word.count, word.addr, cnt, lo);
      end
      #4 ck = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
