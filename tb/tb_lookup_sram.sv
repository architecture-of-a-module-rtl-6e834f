// tb_lookup_sram: self-checking test of the 512 x 1 pixel lookup memory.
// Shifts a random 512-bit image in through the configuration chain, reads
// back every address (the first bit sent must sit at the top address),
// then checks that the chain passes the image out on conf_sout in order.
module tb_lookup_sram;
  localparam int AW = 9;
  localparam int D  = 1 << AW;

  logic conf_ck = 1'b0, conf_sin = 1'b0, conf_sout, dout;
  logic [AW-1:0] addr = '0;
  logic img [D];
  int checks = 0, failures = 0;

  lookup_sram #(.AW(AW)) dut (.*);

  task automatic shift(input logic b);
    conf_sin = b;
    #5 conf_ck = 1'b1;
    #5 conf_ck = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) img[i] = 1'($urandom);
    for (int i = 0; i < D; i++) shift(img[i]);
    // first bit sent ends at address D-1
    for (int a = 0; a < D; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (dout !== img[D-1-a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %b exp %b", a, dout, img[D-1-a]);
      end
    end
    // chain output: the image leaves in the order it entered
    for (int i = 0; i < D; i++) begin
      checks++;
      if (conf_sout !== img[i]) failures++;
      shift(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
