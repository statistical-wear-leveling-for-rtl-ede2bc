// swl_rate_estimator: per-region overwrite-rate estimate and swap batch size.
//
// The region keeps a population counter of its writes, a total distance and a sample count.
// Each completed sample adds its adjusted distance to the total and its count to the sample
// count. When 2^POP_W writes have been counted (one population), the pair is frozen and the
// counters restart. sampleOverwriteRate = sample count / total distance, and the document
// triggers one swap per sampleSwapThreshold completed samples, where
//   sampleSwapThreshold = numSamples / numFrames / sampleOverwriteRate.
// Because that number is normally a fraction, swaps are issued in batches every SWAP_THR
// completed samples (6 in the document), and the batch size is
//   batch = ceil(SWAP_THR * numFrames * count / (numSamples * total)),
// computed here with a serial divider after each population and used for the whole next
// population. Rounding up is this design's choice (it never swaps less than the estimate
// calls for); with the document's example sampleSwapThreshold of 0.86 it gives 7 swaps per
// 6 samples, as the document's example does.
// A population with no completed sample (or before the first population ends) uses the
// batch size of the lowest rate the estimator can report, 1/(CUTOFF-EPSILON); this default
// is this design's choice.
// A completion arrives one cycle after its write, so the completion of the population's
// last write is counted in the next population.
// Interface: `wr` pulses per write to the region, `comp_*` come from the sample buffer.
// `epoch_end` pulses on the write that ends a population; `batch` is updated POP + W + 1
// cycles later (`batch_update` pulses then). `last_count`/`last_total` hold the frozen pair.
module swl_rate_estimator
  import swl_pkg::*;
#(
  parameter int unsigned P_POP_W       = POP_W,
  parameter int unsigned P_NUM_SAMPLES = NUM_SAMPLES,
  parameter int unsigned FRAMES_W      = FRAME_W + $clog2(BANKS_PER_REGION), // log2 numFrames of the region
  parameter int unsigned P_SWAP_THR    = SWAP_THR,
  parameter int unsigned P_CUTOFF      = CUTOFF,
  parameter int unsigned P_EPSILON     = EPSILON,
  parameter int unsigned P_BATCH_W     = BATCH_W,
  localparam int unsigned DIST_W = $clog2(P_CUTOFF + 1),
  localparam int unsigned SUM_W  = DIST_W + 2,
  localparam int unsigned CNT_W  = P_POP_W + 2,
  localparam int unsigned TOT_W  = CNT_W + DIST_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,
  input  logic                 comp_valid,
  input  logic [1:0]           comp_n,
  input  logic [SUM_W-1:0]     comp_sum,
  output logic                 epoch_end,
  output logic                 batch_update,
  output logic [P_BATCH_W-1:0] batch,
  output logic [CNT_W-1:0]     last_count,
  output logic [TOT_W-1:0]     last_total
);

  localparam int unsigned THR_W = $clog2(P_SWAP_THR + 1);
  localparam int unsigned NS_W  = $clog2(P_NUM_SAMPLES + 1);
  localparam int unsigned NUM_W = CNT_W + FRAMES_W + THR_W;
  localparam int unsigned DEN_W = TOT_W + NS_W;
  localparam int unsigned DW    = ((NUM_W > DEN_W) ? NUM_W : DEN_W) + 1;

  // batch size used when no sample completed: rate = 1/(CUTOFF-EPSILON)
  localparam longint unsigned DEF_NUM = longint'(P_SWAP_THR) << FRAMES_W;
  localparam longint unsigned DEF_DEN = longint'(P_NUM_SAMPLES) * (longint'(P_CUTOFF) - longint'(P_EPSILON));
  localparam logic [P_BATCH_W-1:0] BATCH_DEFAULT = P_BATCH_W'((DEF_NUM + DEF_DEN - 1) / DEF_DEN);

  logic [P_POP_W-1:0] pop_q;
  logic [CNT_W-1:0]   count_q;
  logic [TOT_W-1:0]   total_q;
  logic               div_start, div_busy, div_done;
  logic [DW-1:0]      div_num, div_den, div_quo, div_rem;

  logic [CNT_W-1:0]   count_nx;
  logic [TOT_W-1:0]   total_nx;

  assign count_nx  = count_q + (comp_valid ? CNT_W'(comp_n) : CNT_W'(0));
  assign total_nx  = total_q + (comp_valid ? TOT_W'(comp_sum) : TOT_W'(0));
  assign epoch_end = wr && (pop_q == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pop_q      <= '0;
      count_q    <= '0;
      total_q    <= '0;
      last_count <= '0;
      last_total <= '0;
      div_start  <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (wr) pop_q <= pop_q + P_POP_W'(1);
      if (epoch_end) begin
        last_count <= count_nx;
        last_total <= total_nx;
        count_q    <= '0;
        total_q    <= '0;
        div_start  <= (count_nx != '0);
      end else begin
        count_q <= count_nx;
        total_q <= total_nx;
      end
    end
  end

  // ceil(a / b) = floor((a + b - 1) / b)
  assign div_num = DW'(P_SWAP_THR) * (DW'(last_count) << FRAMES_W) + div_den - DW'(1);
  assign div_den = DW'(P_NUM_SAMPLES) * DW'(last_total);

  swl_divider #(.W(DW)) u_div (
    .clk, .rst_n,
    .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      batch        <= BATCH_DEFAULT;
      batch_update <= 1'b0;
    end else begin
      batch_update <= 1'b0;
      if (div_done) begin
        // saturate into the batch register
        batch        <= (div_quo > DW'({P_BATCH_W{1'b1}})) ? '1 : P_BATCH_W'(div_quo);
        batch_update <= 1'b1;
      end else if (div_start == 1'b0 && epoch_end && count_nx == '0) begin
        batch        <= BATCH_DEFAULT;
        batch_update <= 1'b1;
      end
    end
  end

endmodule
