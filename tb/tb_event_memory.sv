// tb_event_memory: self-checking test of the 256 x 1 pixel latency buffer.
// Writes a random bit every clock at a running address (as the chip's bunch
// counter does) and reads, one clock later, the entry written LAT clocks
// earlier, comparing with a model of the written history. Also checks that
// an entry survives exactly one full turn of the ring (256 crossings).
module tb_event_memory;
  localparam int DEPTH = 256;
  localparam int AW    = 8;

  logic clk = 1'b0, wr_data = 1'b0, rd_data;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic hist [int];
  int checks = 0, failures = 0;
  int lat;

  event_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3 * DEPTH; t++) begin
      lat = (t < 2 * DEPTH) ? 37 + (t % 200) : DEPTH - 1;
      wr_data = 1'($urandom);
      wr_addr = AW'(t);
      rd_addr = AW'(t - lat);
      hist[t] = wr_data;
      @(posedge clk);
      #1;
      if (t - lat >= 0) begin
        checks++;
        if (rd_data !== hist[t - lat]) begin
          failures++;
          if (failures < 10) $display("t=%0d lat=%0d got %b exp %b", t, lat, rd_data, hist[t-lat]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
