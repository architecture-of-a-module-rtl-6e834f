// readout_logic: Level-1 read-out of one chip.
//
// When l1a is seen while idle, the chip's N event-memory bits of the
// selected crossing (evt_bits) are captured. The block then sends one word
// per hit pixel, lowest address first, one per clock, and closes the event
// with a trailer word holding the low bits of the event counter. An event
// without hits is a trailer alone. An l1a that arrives while an event is
// still being sent is dropped and reported by a one-cycle l1_lost pulse.
//
// The document names the read-out logic and gives its area only; this
// sparse address read-out is the simplest one that delivers the triggered
// event, and is this design's choice.
//
// Timing: l1a sampled at edge u -> capture at u; the first word is valid
// after edge u+1. An event with k hits occupies k+1 cycles.
module readout_logic
  import pt_pkg::*;
#(
  parameter int unsigned N = N_PIX
) (
  input  logic         ck,
  input  logic         rst,
  input  logic         l1a,
  input  logic [N-1:0] evt_bits,
  output logic         ro_valid,
  output ro_word_t     ro_word,
  output logic         busy,
  output logic         l1_lost
);
  logic [N-1:0]      pend;
  logic [PIX_AW-1:0] evt_cnt;
  logic [PIX_AW-1:0] first;
  logic              any;

  always_comb begin
    first = '0;
    any   = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (pend[i]) begin
        first = PIX_AW'(i);
        any   = 1'b1;
      end
    end
  end

  always_ff @(posedge ck) begin
    if (rst) begin
      pend     <= '0;
      busy     <= 1'b0;
      evt_cnt  <= '0;
      ro_valid <= 1'b0;
      ro_word  <= '0;
      l1_lost  <= 1'b0;
    end else begin
      ro_valid <= 1'b0;
      l1_lost  <= 1'b0;
      if (busy) begin
        l1_lost  <= l1a;
        ro_valid <= 1'b1;
        if (any) begin
          ro_word      <= '{trailer: 1'b0, addr: first};
          pend[first]  <= 1'b0;
        end else begin
          ro_word <= '{trailer: 1'b1, addr: evt_cnt};
          evt_cnt <= evt_cnt + 1'b1;
          busy    <= 1'b0;
        end
      end else if (l1a) begin
        pend <= evt_bits;
        busy <= 1'b1;
      end
    end
  end
endmodule
