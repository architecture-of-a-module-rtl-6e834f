// trigger_encoder: the chip's synchronous trigger word.
//
// Every bunch crossing the lower (master) chip sends 10+5 bits of trigger
// information to the opto-link. Here the 10 bits are the address of the
// lowest-numbered pixel that found a coincidence (640 pixels need 10 bits)
// and the 5 bits are a valid flag and the number of such pixels, saturating
// at 15. The document gives the word size; the split of the 5 extra bits is
// this design's choice.
//
// Timing: trig is sampled on each rising edge of ck; word is registered and
// valid one cycle later. Synchronous active-high reset.
module trigger_encoder
  import pt_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  logic         ck,
  input  logic         rst,
  input  logic [N-1:0] trig,
  output trig_word_t   word
);
  trig_word_t nxt;

  always_comb begin
    int unsigned cnt;
    nxt = '0;
    cnt = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (trig[i]) begin
        nxt.addr = PIX_AW'(i);
        cnt++;
      end
    end
    nxt.valid = (cnt != 0);
    nxt.count = (cnt > 15) ? 4'd15 : 4'(cnt);
  end

  always_ff @(posedge ck) begin
    if (rst) word <= '0;
    else     word <= nxt;
  end
endmodule
