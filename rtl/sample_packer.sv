// Acquisition packer: gathers the samples of the two simultaneously sampled
// channels X and Y and writes them, eight to a word, into the two sequence
// RAMs.
//
// After `start`, every clock with `smp_valid` takes one X and one Y sample.
// Samples are placed in sampling order: the n-th sample of a word goes to
// lane n, bits [n*SAMPLE_W +: SAMPLE_W], so word a holds samples 8a..8a+7.
// When a word is full it is written (one-clock `we`, registered outputs) to
// address a, and the address advances. After N_WORDS words the packer stops
// accepting samples, drops `busy` and pulses `done` in the clock of the last
// write. Samples offered while not busy are ignored.
//
// Packing eight samples per address in sampling order and writing during
// acquisition follow the source design; the lane-to-bit order, the handshake
// and the done pulse are this implementation's choices.
module sample_packer
  import corr_pkg::*;
#(
  parameter int unsigned LANES    = corr_pkg::CORR_LANES,
  parameter int unsigned SAMPLE_W = corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned N_WORDS  = corr_pkg::CORR_N_WORDS,
  localparam int unsigned AW      = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,      // begin a new acquisition at address 0
  input  logic                               smp_valid,  // one X and one Y sample this clock
  input  logic signed [SAMPLE_W-1:0]         smp_x,
  input  logic signed [SAMPLE_W-1:0]         smp_y,
  output logic                               we,         // write both RAMs this clock
  output logic [AW-1:0]                      waddr,
  output logic [LANES-1:0][SAMPLE_W-1:0]     wdata_x,
  output logic [LANES-1:0][SAMPLE_W-1:0]     wdata_y,
  output logic                               busy,       // acquisition in progress
  output logic                               done        // one-clock pulse with the last write
);

  logic [LANES-1:0][SAMPLE_W-1:0] buf_x, buf_y;   // partly filled words
  logic [$clog2(LANES)-1:0]       lane;
  logic [AW-1:0]                  word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_x   <= '0;
      buf_y   <= '0;
      lane    <= '0;
      word    <= '0;
      we      <= 1'b0;
      waddr   <= '0;
      wdata_x <= '0;
      wdata_y <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        lane <= '0;
        word <= '0;
      end else if (busy && smp_valid) begin
        buf_x[lane] <= smp_x;
        buf_y[lane] <= smp_y;
        if (lane == $clog2(LANES)'(LANES - 1)) begin
          lane    <= '0;
          we      <= 1'b1;
          waddr   <= word;
          for (int i = 0; i < LANES - 1; i++) begin
            wdata_x[i] <= buf_x[i];
            wdata_y[i] <= buf_y[i];
          end
          wdata_x[LANES-1] <= smp_x;
          wdata_y[LANES-1] <= smp_y;
          if (word == AW'(N_WORDS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            word <= word + 1'b1;
          end
        end else begin
          lane <= lane + 1'b1;
        end
      end
    end
  end

endmodule
