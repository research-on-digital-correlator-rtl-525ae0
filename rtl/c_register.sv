// Register array C: LANES samples holding the word of the sliding sequence
// that was read in the previous clock of the current correlation cycle.
//
// Together with the word read now, C gives each multiplier group the samples
// that have slid in from the previous word (for the first word of a cycle
// these are the zero extension y[-1]..y[-LANES]). `q` is the value used by
// the beat in the current clock. At the clock edge `clear` empties C (start
// of a new cycle); otherwise `load` stores the current word `d`. Both zero
// start-up and clearing at each cycle follow the source design; the control
// pins and the priority of `clear` over `load` are this implementation's.
module c_register
  import corr_pkg::*;
#(
  parameter int unsigned LANES    = corr_pkg::CORR_LANES,
  parameter int unsigned SAMPLE_W = corr_pkg::CORR_SAMPLE_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           load,
  input  logic [LANES-1:0][SAMPLE_W-1:0] d,
  output logic [LANES-1:0][SAMPLE_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (load)  q <= d;
  end

endmodule
