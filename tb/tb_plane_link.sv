// tb_plane_link: self-checking test of the inter-plane serializer.
// Every fourth 160 MHz edge a new random 4 x LANES frame is loaded; the
// lines must then carry Z pixel 0, 1, 2, 3 of each row on that edge and the
// three following ones (one frame per bunch crossing, no gap).
module tb_plane_link;
  localparam int LANES = 16;
  localparam int RATIO = 4;
  localparam int NFR   = 200;

  logic ck160 = 1'b0, rst = 1'b1, load = 1'b0;
  logic [RATIO-1:0][LANES-1:0] data = '0, cur;
  logic [LANES-1:0] line;
  int checks = 0, failures = 0;

  plane_link_tx #(.LANES(LANES), .RATIO(RATIO)) dut (.*);

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
    for (int f = 0; f < NFR; f++) begin
      for (int ph = 0; ph < RATIO; ph++) begin
        load = (ph == 0);
        if (ph == 0) begin
          for (int z = 0; z < RATIO; z++) data[z] = LANES'($urandom);
          cur = data;
        end else begin
          data = LANES'($urandom);   // must be ignored between loads
        end
        #5 ck160 = 1'b1;
        #1;
        checks++;
        if (line !== cur[ph]) begin
          failures++;
          if (failures < 10) $display("frame %0d phase %0d: got %h exp %h", f, ph, line, cur[ph]);
        end
        #4 ck160 = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
