// Sequence RAM: N_WORDS words of LANES samples each (1000 x 96 bits in the
// reference configuration), one per sequence (RAM1 holds X, RAM2 holds Y).
//
// Simple dual-port memory: one synchronous write port used by the
// acquisition packer and one synchronous read port used by the correlation
// datapath. A read issued with `re` in one clock presents the word on `rq`
// in the next clock; `rq` holds its value while `re` is low. The one-word
// wide organisation follows the source design; the one-clock read latency is
// the usual FPGA block-RAM behaviour and is this implementation's choice.
// Contents are not reset.
module seq_ram
  import corr_pkg::*;
#(
  parameter int unsigned LANES    = corr_pkg::CORR_LANES,
  parameter int unsigned SAMPLE_W = corr_pkg::CORR_SAMPLE_W,
  parameter int unsigned N_WORDS  = corr_pkg::CORR_N_WORDS,
  localparam int unsigned AW      = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [AW-1:0]                  waddr,
  input  logic [LANES-1:0][SAMPLE_W-1:0] wdata,
  input  logic                           re,
  input  logic [AW-1:0]                  raddr,
  output logic [LANES-1:0][SAMPLE_W-1:0] rq
);

  logic [LANES*SAMPLE_W-1:0] mem [N_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rq <= mem[raddr];
  end

endmodule
