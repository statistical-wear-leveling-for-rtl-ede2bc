// swl_sample_buffer: the SWL sample buffer, a small fully associative FIFO of sampled writes.
//
// Every entry holds the block address (tag) of a sampled write and its distance: the number
// of writes to the region seen since it was sampled without the block being written again.
// Every write to the region is compared with all entries in parallel:
//   * an entry whose tag matches has been overwritten: the sample completes with its distance;
//   * otherwise its distance is incremented, and an entry whose distance reaches CUTOFF
//     completes with distance CUTOFF (its overwrite rate is below 1/CUTOFF);
//   * when a sampled write finds the buffer full, the oldest entry is removed and completes
//     with its current distance (a conservative, shorter distance).
// A completed sample contributes max(distance - EPSILON, 1) to the region's total distance.
// Entries are kept in age order, oldest at index 0; removal of a matched entry closes the
// gap. A tag is held by at most one entry, because any write to it completes the old entry.
// At most one entry can match, at most one (the oldest) can reach CUTOFF and at most one can
// be pushed out by overflow, so up to three samples complete on one write.
// The new sample enters with distance 0 after the comparison, so the write that inserts it
// is not counted in its own distance.
// Subtracting EPSILON also from samples pushed out by overflow is this design's choice; the
// document states the subtraction for completed samples and "add the sample's current
// distance" for overflow.
// Interface: `wr` marks a write with block address `tag`; `sample` (only with `wr`) inserts
// it. The completion results `comp_valid`, `comp_n` (1..3) and `comp_sum` (sum of adjusted
// distances) are registered and appear in the cycle after the write. The event outputs mark
// which kinds of completion happened on that write.
module swl_sample_buffer
  import swl_pkg::*;
#(
  parameter int unsigned DEPTH   = BUF_DEPTH,
  parameter int unsigned P_TAG_W = TAG_W,
  parameter int unsigned P_CUTOFF  = CUTOFF,
  parameter int unsigned P_EPSILON = EPSILON,
  localparam int unsigned DIST_W = $clog2(P_CUTOFF + 1),
  localparam int unsigned SUM_W  = DIST_W + 2,
  localparam int unsigned OCC_W  = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr,
  input  logic [P_TAG_W-1:0] tag,
  input  logic               sample,
  output logic               comp_valid,
  output logic [1:0]         comp_n,
  output logic [SUM_W-1:0]   comp_sum,
  output logic               ev_overwrite,
  output logic               ev_cutoff,
  output logic               ev_overflow,
  output logic [OCC_W-1:0]   occupancy
);

  logic [DEPTH-1:0]               valid_q;
  logic [DEPTH-1:0][P_TAG_W-1:0]  tag_q;
  logic [DEPTH-1:0][DIST_W-1:0]   dist_q;

  // next state
  logic [DEPTH-1:0]               valid_d;
  logic [DEPTH-1:0][P_TAG_W-1:0]  tag_d;
  logic [DEPTH-1:0][DIST_W-1:0]   dist_d;

  logic               hit_any, cut_any, ovf;
  logic [1:0]         n_done;
  logic [SUM_W-1:0]   sum_done;
  logic [OCC_W-1:0]   kept;

  function automatic logic [DIST_W-1:0] adj(logic [DIST_W-1:0] d);
    return (d > DIST_W'(P_EPSILON)) ? (d - DIST_W'(P_EPSILON)) : DIST_W'(1);
  endfunction

  always_comb begin
    logic [DIST_W-1:0] inc;
    inc      = '0;
    valid_d  = '0;
    tag_d    = tag_q;
    dist_d   = dist_q;
    hit_any  = 1'b0;
    cut_any  = 1'b0;
    ovf      = 1'b0;
    n_done   = '0;
    sum_done = '0;
    kept     = '0;
    if (wr) begin
      // compare, increment and compact the surviving entries towards index 0
      for (int i = 0; i < DEPTH; i++) begin
        inc = dist_q[i] + DIST_W'(1);
        if (valid_q[i]) begin
          if (tag_q[i] == tag) begin
            hit_any  = 1'b1;
            n_done   = n_done + 2'd1;
            sum_done = sum_done + SUM_W'(adj(dist_q[i]));
          end else if (inc >= DIST_W'(P_CUTOFF)) begin
            cut_any  = 1'b1;
            n_done   = n_done + 2'd1;
            sum_done = sum_done + SUM_W'(adj(DIST_W'(P_CUTOFF)));
          end else begin
            valid_d[kept] = 1'b1;
            tag_d[kept]   = tag_q[i];
            dist_d[kept]  = inc;
            kept          = kept + OCC_W'(1);
          end
        end
      end
      if (sample) begin
        if (kept == OCC_W'(DEPTH)) begin
          // full: the oldest entry leaves with its current distance
          ovf      = 1'b1;
          n_done   = n_done + 2'd1;
          sum_done = sum_done + SUM_W'(adj(dist_d[0]));
          for (int i = 0; i < DEPTH - 1; i++) begin
            tag_d[i]  = tag_d[i+1];
            dist_d[i] = dist_d[i+1];
          end
          kept = kept - OCC_W'(1);
        end
        valid_d[kept] = 1'b1;
        tag_d[kept]   = tag;
        dist_d[kept]  = '0;
      end
    end else begin
      valid_d = valid_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      tag_q        <= '0;
      dist_q       <= '0;
      comp_valid   <= 1'b0;
      comp_n       <= '0;
      comp_sum     <= '0;
      ev_overwrite <= 1'b0;
      ev_cutoff    <= 1'b0;
      ev_overflow  <= 1'b0;
    end else begin
      valid_q      <= valid_d;
      tag_q        <= tag_d;
      dist_q       <= dist_d;
      comp_valid   <= wr && (n_done != 2'd0);
      comp_n       <= n_done;
      comp_sum     <= sum_done;
      ev_overwrite <= hit_any;
      ev_cutoff    <= cut_any;
      ev_overflow  <= ovf;
    end
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < DEPTH; i++) occupancy = occupancy + OCC_W'(valid_q[i]);
  end

  // Entries stay packed: a free slot is never followed by a used one.
  for (genvar i = 1; i < DEPTH; i++) begin : g_packed
    a_packed: assert property (@(posedge clk) disable iff (!rst_n) valid_q[i] |-> valid_q[i-1]);
  end

endmodule
