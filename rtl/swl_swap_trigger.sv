// swl_swap_trigger: the swap count of a region and its queue of owed swaps.
//
// The swap count counts completed samples. Each time it reaches SWAP_THR (6 in the document)
// it is reduced by SWAP_THR and a batch of `batch` swaps is added to the number of swaps
// still to perform (`pending`). The swap engine takes one swap at a time and pulses
// `swap_done`; `pending` then drops by one. Up to three samples can complete on one write,
// so the counter has one bit more than the three the document lists (it can hold up to
// SWAP_THR + 2). `pending` saturates at its maximum.
// Interface: `comp_valid`/`comp_n` come from the sample buffer; `fire` pulses in the cycle
// after the completion that released a batch.
module swl_swap_trigger
  import swl_pkg::*;
#(
  parameter int unsigned P_SWAP_THR = SWAP_THR,
  parameter int unsigned P_BATCH_W  = BATCH_W,
  localparam int unsigned SC_W = $clog2(P_SWAP_THR + 3)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 comp_valid,
  input  logic [1:0]           comp_n,
  input  logic [P_BATCH_W-1:0] batch,
  input  logic                 swap_done,
  output logic [P_BATCH_W-1:0] pending,
  output logic [SC_W-1:0]      swap_count,
  output logic                 fire
);

  logic [SC_W-1:0]      sc_sum;
  logic                 reach;
  logic [P_BATCH_W:0]   pend_sum;

  assign sc_sum   = swap_count + (comp_valid ? SC_W'(comp_n) : SC_W'(0));
  assign reach    = (sc_sum >= SC_W'(P_SWAP_THR));
  assign pend_sum = {1'b0, pending} + (reach ? {1'b0, batch} : '0)
                  - ((swap_done && pending != '0) ? (P_BATCH_W+1)'(1) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      swap_count <= '0;
      pending    <= '0;
      fire       <= 1'b0;
    end else begin
      swap_count <= reach ? (sc_sum - SC_W'(P_SWAP_THR)) : sc_sum;
      pending    <= pend_sum[P_BATCH_W] ? '1 : pend_sum[P_BATCH_W-1:0];
      fire       <= reach;
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) swap_count < SC_W'(P_SWAP_THR));

endmodule
