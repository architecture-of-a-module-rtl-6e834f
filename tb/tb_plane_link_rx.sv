// tb_plane_link_rx: self-checking test of the inter-plane deserializer.
// Drives the lines with the four Z pixels of random frames, one per 160 MHz
// edge, with load on the edge that carries the last pixel; after that edge
// the parallel output must show the whole frame and hold it for the next
// three edges, while the next frame arrives.
module tb_plane_link_rx;
  localparam int LANES = 16;
  localparam int RATIO = 4;
  localparam int NFR   = 200;

  logic ck160 = 1'b0, rst = 1'b1, load = 1'b0;
  logic [LANES-1:0] line = '0;
  logic [RATIO-1:0][LANES-1:0] data, fr, prev;
  int checks = 0, failures = 0;

  plane_link_rx #(.LANES(LANES), .RATIO(RATIO)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) begin #5 ck160 = 1'b1; #5 ck160 = 1'b0; end
    rst = 1'b0;
    prev = '0;
    for (int f = 0; f < NFR; f++) begin
      for (int z = 0; z < RATIO; z++) fr[z] = LANES'($urandom);
      for (int ph = 0; ph < RATIO; ph++) begin
        line = fr[ph];
        load = (ph == RATIO - 1);
        #5 ck160 = 1'b1;
        #1;
        if (f > 0 || ph == RATIO - 1) begin
          checks++;
          if (data !== ((ph == RATIO - 1) ? fr : prev)) begin
            failures++;
            if (failures < 10) $display("frame %0d phase %0d: got %h", f, ph, data);
          end
        end
        #4 ck160 = 1'b0;
      end
      prev = fr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
