// swl_sampler: decides which writes to a region are sampled.
//
// Each write is sampled with probability NUM_SAMPLES / 2^POP_W, the sampling rate of the
// document (900 / 2^20 = 0.086 %), so that on average NUM_SAMPLES writes out of every
// population of 2^POP_W writes are sampled. The decision compares the low POP_W bits of a
// 32-bit LFSR with NUM_SAMPLES; the LFSR advances 32 shifts per write so every write sees a
// number that shares no bits with the previous one.
// Interface: `wr` is high for one cycle per write; `sample` is combinational and valid in
// that same cycle (it is low when `wr` is low).
module swl_sampler
  import swl_pkg::*;
#(
  parameter int unsigned   P_POP_W       = POP_W,
  parameter int unsigned   P_NUM_SAMPLES = NUM_SAMPLES,
  parameter logic [31:0]   SEED          = 32'h1ACE_B00C
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr,
  output logic sample
);

  logic [31:0] rnd;

  swl_lfsr #(.W(32), .SEED(SEED), .STEPS(32)) u_lfsr (
    .clk, .rst_n, .en(wr), .value(rnd)
  );

  assign sample = wr && (rnd[P_POP_W-1:0] < P_POP_W'(P_NUM_SAMPLES));

endmodule
