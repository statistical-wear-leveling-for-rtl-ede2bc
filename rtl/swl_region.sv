// swl_region: statistical wear leveling for one region of NBANKS banks that share one
// sample buffer (four 512-Mb banks, 2 Gb per chip, in the main configuration).
//
// Every write accepted by the region goes to the sampler, which picks about NUM_SAMPLES of
// every 2^POP_W writes, and to the sample buffer, which measures each sample's overwrite
// distance. Completed samples feed the rate estimator (total distance and sample count over a
// population of 2^POP_W writes) and the swap count. Every SWAP_THR completed samples a batch
// of swaps is owed; its size comes from the previous population's estimate, so the region
// swaps in proportion to its estimated overwrite rate instead of its write rate.
// Although the statistics are shared, each block only ever moves inside its own bank, so
// every bank has its own pointer and keys (swl_bank_remap). The owed swaps are handed to the
// banks in turn, round robin, which is this design's choice; over one generation every bank
// then receives the 2^FRAME_W swaps of a full sweep.
// While swaps are owed or one is in progress the region reports `busy`, and the chip nacks
// all host requests. A swap only starts when no host read of the region is outstanding.
// Interface: `req_valid` (already cleared by the chip when it nacks) with `req_we`,
// `req_tag` (full block address, used for sampling), `req_bank`, `req_frame` (block index
// inside the bank) and `req_wdata`; `req_accept` is high when the addressed bank takes the
// request in that cycle. Read data returns on `rsp_valid`/`rsp_data`. The bank array ports
// carry physical frame numbers. The `ev_*` outputs pulse once per event, for monitoring.
module swl_region
  import swl_pkg::*;
#(
  parameter int unsigned NBANKS        = BANKS_PER_REGION,
  parameter int unsigned P_FRAME_W     = FRAME_W,
  parameter int unsigned P_ROW_BLK_W   = ROW_BLK_W,
  parameter int unsigned P_TAG_W       = TAG_W,
  parameter int unsigned P_DATA_W      = DATA_W,
  parameter int unsigned P_POP_W       = POP_W,
  parameter int unsigned P_NUM_SAMPLES = NUM_SAMPLES,
  parameter int unsigned P_DEPTH       = BUF_DEPTH,
  parameter int unsigned P_CUTOFF      = CUTOFF,
  parameter int unsigned P_EPSILON     = EPSILON,
  parameter int unsigned P_SWAP_THR    = SWAP_THR,
  parameter int unsigned P_BATCH_W     = BATCH_W,
  parameter logic [31:0] SEED          = 32'h1ACE_B00C,
  localparam int unsigned B_W = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // host side
  input  logic                              req_valid,
  input  logic                              req_we,
  input  logic [P_TAG_W-1:0]                req_tag,
  input  logic [B_W-1:0]                    req_bank,
  input  logic [P_FRAME_W-1:0]              req_frame,
  input  logic [P_DATA_W-1:0]               req_wdata,
  output logic                              req_accept,
  output logic                              rsp_valid,
  output logic [P_DATA_W-1:0]               rsp_data,
  output logic                              busy,
  // bank array ports
  output logic [NBANKS-1:0]                 mem_valid,
  output logic [NBANKS-1:0]                 mem_we,
  output logic [NBANKS-1:0][P_FRAME_W-1:0]  mem_frame,
  output logic [NBANKS-1:0][P_DATA_W-1:0]   mem_wdata,
  input  logic [NBANKS-1:0]                 mem_ready,
  input  logic [NBANKS-1:0]                 mem_rvalid,
  input  logic [NBANKS-1:0][P_DATA_W-1:0]   mem_rdata,
  // monitoring
  output logic                              ev_sample,
  output logic                              ev_overwrite,
  output logic                              ev_cutoff,
  output logic                              ev_overflow,
  output logic                              ev_epoch,
  output logic                              ev_batch,
  output logic                              ev_swap,
  output logic                              ev_skip,
  output logic                              ev_wrap,
  output logic [P_BATCH_W-1:0]              batch,
  output logic [P_BATCH_W-1:0]              pending
);

  localparam int unsigned DIST_W = $clog2(P_CUTOFF + 1);
  localparam int unsigned SUM_W  = DIST_W + 2;
  localparam int unsigned FRAMES_W = P_FRAME_W + ((NBANKS > 1) ? $clog2(NBANKS) : 0);

  logic wr, sample;
  logic comp_valid;
  logic [1:0] comp_n;
  logic [SUM_W-1:0] comp_sum;
  logic [$clog2(P_DEPTH+1)-1:0] occupancy;

  // ---------------- host access ----------------
  logic [NBANKS-1:0][P_FRAME_W-1:0] lookup_frame, frame_a, frame_b, ptr, key_old, key_new;
  logic [NBANKS-1:0] skip, advance, wrapped;

  assign req_accept = req_valid && !busy && mem_ready[req_bank];
  assign wr         = req_accept && req_we;

  // ---------------- statistics ----------------
  swl_sampler #(.P_POP_W(P_POP_W), .P_NUM_SAMPLES(P_NUM_SAMPLES), .SEED(SEED)) u_sampler (
    .clk, .rst_n, .wr, .sample
  );

  swl_sample_buffer #(.DEPTH(P_DEPTH), .P_TAG_W(P_TAG_W), .P_CUTOFF(P_CUTOFF), .P_EPSILON(P_EPSILON)) u_buf (
    .clk, .rst_n, .wr, .tag(req_tag), .sample,
    .comp_valid, .comp_n, .comp_sum,
    .ev_overwrite, .ev_cutoff, .ev_overflow, .occupancy
  );

  logic batch_update;
  logic [P_POP_W+1:0] last_count;
  logic [P_POP_W+1+DIST_W:0] last_total;

  swl_rate_estimator #(
    .P_POP_W(P_POP_W), .P_NUM_SAMPLES(P_NUM_SAMPLES), .FRAMES_W(FRAMES_W),
    .P_SWAP_THR(P_SWAP_THR), .P_CUTOFF(P_CUTOFF), .P_EPSILON(P_EPSILON), .P_BATCH_W(P_BATCH_W)
  ) u_est (
    .clk, .rst_n, .wr, .comp_valid, .comp_n, .comp_sum,
    .epoch_end(ev_epoch), .batch_update, .batch, .last_count, .last_total
  );

  logic eng_done;
  logic [$clog2(P_SWAP_THR + 3)-1:0] swap_count;

  swl_swap_trigger #(.P_SWAP_THR(P_SWAP_THR), .P_BATCH_W(P_BATCH_W)) u_trig (
    .clk, .rst_n, .comp_valid, .comp_n, .batch,
    .swap_done(eng_done), .pending, .swap_count, .fire(ev_batch)
  );

  // ---------------- per-bank mapping ----------------
  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    swl_bank_remap #(
      .P_FRAME_W(P_FRAME_W), .P_ROW_BLK_W(P_ROW_BLK_W), .SEED(SEED ^ (32'h9E37_79B9 * (b + 1)))
    ) u_remap (
      .clk, .rst_n,
      .lookup_addr(req_frame), .lookup_frame(lookup_frame[b]),
      .ptr(ptr[b]), .frame_a(frame_a[b]), .frame_b(frame_b[b]), .skip(skip[b]),
      .advance(advance[b]), .wrapped(wrapped[b]),
      .key_old(key_old[b]), .key_new(key_new[b])
    );
  end

  // ---------------- swapping ----------------
  logic [B_W-1:0] rr_q, eng_bank;
  logic eng_busy, eng_start, eng_adv, eng_skipped;
  logic eng_mem_valid, eng_mem_we;
  logic [P_FRAME_W-1:0] eng_mem_frame;
  logic [P_DATA_W-1:0]  eng_mem_wdata;
  logic [7:0] outstanding_q;  // host reads in flight

  assign eng_start = (pending != '0) && !eng_busy && (outstanding_q == '0);
  assign busy      = (pending != '0) || eng_busy;

  swl_swap_engine #(.P_FRAME_W(P_FRAME_W), .P_DATA_W(P_DATA_W), .NBANKS(NBANKS)) u_eng (
    .clk, .rst_n,
    .start(eng_start), .start_bank(rr_q), .busy(eng_busy), .bank(eng_bank),
    .frame_a(frame_a[eng_bank]), .frame_b(frame_b[eng_bank]), .skip(skip[eng_bank]),
    .advance(eng_adv), .done(eng_done), .skipped(eng_skipped),
    .mem_valid(eng_mem_valid), .mem_we(eng_mem_we), .mem_frame(eng_mem_frame),
    .mem_wdata(eng_mem_wdata), .mem_ready(mem_ready[eng_bank]),
    .mem_rvalid(mem_rvalid[eng_bank]), .mem_rdata(mem_rdata[eng_bank])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q          <= '0;
      outstanding_q <= '0;
    end else begin
      if (eng_done) rr_q <= (rr_q == B_W'(NBANKS - 1)) ? '0 : rr_q + B_W'(1);
      outstanding_q <= outstanding_q + 8'(req_accept && !req_we) - 8'(rsp_valid);
    end
  end

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      advance[b] = eng_adv && (eng_bank == B_W'(b));
      if (eng_busy && eng_bank == B_W'(b)) begin
        mem_valid[b] = eng_mem_valid;
        mem_we[b]    = eng_mem_we;
        mem_frame[b] = eng_mem_frame;
        mem_wdata[b] = eng_mem_wdata;
      end else begin
        mem_valid[b] = req_valid && !busy && (req_bank == B_W'(b));
        mem_we[b]    = req_we;
        mem_frame[b] = lookup_frame[b];
        mem_wdata[b] = req_wdata;
      end
    end
  end

  // host read data: while the engine is idle every returning read is the host's
  always_comb begin
    rsp_valid = 1'b0;
    rsp_data  = '0;
    for (int b = 0; b < NBANKS; b++) begin
      if (mem_rvalid[b] && !(eng_busy && eng_bank == B_W'(b))) begin
        rsp_valid = 1'b1;
        rsp_data  = rsp_data | mem_rdata[b];
      end
    end
  end

  assign ev_sample = sample;
  assign ev_swap   = eng_done && !eng_skipped;
  assign ev_skip   = eng_skipped;
  assign ev_wrap   = |wrapped;

  a_one_rsp: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(mem_rvalid & ~(eng_busy ? (NBANKS'(1) << eng_bank) : '0)));
  a_no_host_during_swap: assert property (@(posedge clk) disable iff (!rst_n) eng_busy |-> !req_accept);

endmodule
