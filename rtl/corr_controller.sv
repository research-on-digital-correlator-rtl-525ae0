// Read sequencer of the correlator.
//
// A correlation "cycle" k computes the LANES lags 8k..8k+7 (in the reference
// configuration) in one pass over the stored words: beat a (a = 0 ..
// N_WORDS-1-k) reads word a+k of the leading sequence together with word a of
// the sliding sequence, so the sliding sequence stands 8k samples to the
// right; word a-1 of the sliding sequence, held in register C, supplies the
// remaining slide of 0..7 samples. Leading words 0..k-1 would only meet the
// zero extension of the sliding sequence and are skipped, so cycle k takes
// N_WORDS-k beats and all N_WORDS cycles of one direction take
// N_WORDS*(N_WORDS+1)/2 beats. The pass is made twice: first with X leading
// and Y sliding right (tau >= 0), then with the two roles swapped, which is Y
// sliding left (tau <= 0). Both directions together take
// N_WORDS*(N_WORDS+1) clocks, one beat per clock with no gaps.
//
// `start` (ignored while busy) begins the schedule in the next clock. While
// `rd_en` is high the outputs describe the beat issued this clock: read
// addresses for the leading and the sliding RAM, the direction, the cycle
// index `blk`, `first`/`last` beat of the cycle and `final` on the very last
// beat. `busy` falls after the final beat. The beat order and the two passes
// follow the source design; the interface is this implementation's.
module corr_controller
  import corr_pkg::*;
#(
  parameter int unsigned N_WORDS = corr_pkg::CORR_N_WORDS,
  localparam int unsigned AW     = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       rd_en,
  output logic [AW-1:0] addr_lead,    // word a+k of the leading sequence
  output logic [AW-1:0] addr_slide,   // word a of the sliding sequence
  output slide_dir_e dir,
  output logic [AW-1:0] blk,          // cycle index k
  output logic       first,
  output logic       last,
  output logic       final_beat
);

  logic [AW-1:0] a, k;
  slide_dir_e    d;
  logic          run;

  logic last_c, last_blk_c;
  assign last_c     = (32'(a) + 32'(k) == N_WORDS - 1);
  assign last_blk_c = (32'(k) == N_WORDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      a   <= '0;
      k   <= '0;
      d   <= SLIDE_RIGHT;
    end else if (!run) begin
      if (start) begin
        run <= 1'b1;
        a   <= '0;
        k   <= '0;
        d   <= SLIDE_RIGHT;
      end
    end else if (last_c) begin
      a <= '0;
      if (!last_blk_c) begin
        k <= k + 1'b1;
      end else if (d == SLIDE_RIGHT) begin
        k <= '0;
        d <= SLIDE_LEFT;
      end else begin
        run <= 1'b0;
      end
    end else begin
      a <= a + 1'b1;
    end
  end

  assign busy       = run;
  assign rd_en      = run;
  assign addr_lead  = a + k;
  assign addr_slide = a;
  assign dir        = d;
  assign blk        = k;
  assign first      = run && (a == '0);
  assign last       = run && last_c;
  assign final_beat = run && last_c && last_blk_c && (d == SLIDE_LEFT);

endmodule
