// swl_chip: statistical wear-leveling logic of one PCM chip (the design's top level).
//
// The main configuration is an 8-Gb chip with 16 internal banks of 512 Mb; each bank holds
// 2^20 blocks of 512 bits (every 512-byte memory block contributes 512 bits per chip). Four
// banks (2 Gb) share one sample buffer and its logic (swl_region), so the chip has four
// regions. All mapping, counting and swapping happens on the chip, so it also covers
// accesses that bypass the memory controller, such as DMA.
// Host protocol: the memory controller sends requests speculatively. A request that arrives
// while any region of the chip owes or performs a swap is refused with `req_nack` in the
// same cycle and must be resent later; otherwise it is taken when `req_accept` is high (the
// addressed bank is ready), or held by the sender while neither is high. Read data returns
// on `rsp_valid`/`rsp_data`. Nacking during a swap follows the document; the accept/hold
// handshake and chip-wide (rather than per-region) nacking are this design's choices.
// Address: `req_addr` is the block address the sample buffers store. Its low FRAME_W bits
// are the block within a bank, the next two bits the bank within a region and the next two
// the region; higher bits select the chip's place in the system and are only compared.
// This bit assignment is this design's choice.
// Bank array ports: one request/ready port per bank with in-order read data (see
// swl_swap_engine), carrying physical frame numbers. The arrays themselves are outside.
// Monitoring: `ev_*` are per-region event pulses, `busy` per-region swap activity.
module swl_chip
  import swl_pkg::*;
#(
  parameter int unsigned NREGIONS      = REGIONS,
  parameter int unsigned NBANKS_REGION = BANKS_PER_REGION,
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
  localparam int unsigned NB  = NREGIONS * NBANKS_REGION,
  localparam int unsigned BW  = (NBANKS_REGION > 1) ? $clog2(NBANKS_REGION) : 1,
  localparam int unsigned RW  = (NREGIONS > 1) ? $clog2(NREGIONS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host side
  input  logic                          req_valid,
  input  logic                          req_we,
  input  logic [P_TAG_W-1:0]            req_addr,
  input  logic [P_DATA_W-1:0]           req_wdata,
  output logic                          req_accept,
  output logic                          req_nack,
  output logic                          rsp_valid,
  output logic [P_DATA_W-1:0]           rsp_data,
  // bank array ports
  output logic [NB-1:0]                 mem_valid,
  output logic [NB-1:0]                 mem_we,
  output logic [NB-1:0][P_FRAME_W-1:0]  mem_frame,
  output logic [NB-1:0][P_DATA_W-1:0]   mem_wdata,
  input  logic [NB-1:0]                 mem_ready,
  input  logic [NB-1:0]                 mem_rvalid,
  input  logic [NB-1:0][P_DATA_W-1:0]   mem_rdata,
  // monitoring
  output logic [NREGIONS-1:0]           busy,
  output logic [NREGIONS-1:0]           ev_sample,
  output logic [NREGIONS-1:0]           ev_overwrite,
  output logic [NREGIONS-1:0]           ev_cutoff,
  output logic [NREGIONS-1:0]           ev_overflow,
  output logic [NREGIONS-1:0]           ev_epoch,
  output logic [NREGIONS-1:0]           ev_batch,
  output logic [NREGIONS-1:0]           ev_swap,
  output logic [NREGIONS-1:0]           ev_skip,
  output logic [NREGIONS-1:0]           ev_wrap,
  output logic [NREGIONS-1:0][P_BATCH_W-1:0] batch,
  output logic [NREGIONS-1:0][P_BATCH_W-1:0] pending
);

  logic [P_FRAME_W-1:0] frame;
  logic [BW-1:0]        bank;
  logic [RW-1:0]        region;

  assign frame  = req_addr[P_FRAME_W-1:0];
  assign bank   = (NBANKS_REGION > 1) ? BW'(req_addr >> P_FRAME_W) : '0;
  assign region = (NREGIONS > 1) ? RW'(req_addr >> (P_FRAME_W + ((NBANKS_REGION > 1) ? BW : 0))) : '0;

  logic any_busy;
  assign any_busy = |busy;
  assign req_nack = req_valid && any_busy;

  logic [NREGIONS-1:0]                r_accept, r_rsp_valid;
  logic [NREGIONS-1:0][P_DATA_W-1:0]  r_rsp_data;

  for (genvar r = 0; r < NREGIONS; r++) begin : g_region
    localparam int unsigned LO = r * NBANKS_REGION;
    swl_region #(
      .NBANKS(NBANKS_REGION), .P_FRAME_W(P_FRAME_W), .P_ROW_BLK_W(P_ROW_BLK_W),
      .P_TAG_W(P_TAG_W), .P_DATA_W(P_DATA_W), .P_POP_W(P_POP_W),
      .P_NUM_SAMPLES(P_NUM_SAMPLES), .P_DEPTH(P_DEPTH), .P_CUTOFF(P_CUTOFF),
      .P_EPSILON(P_EPSILON), .P_SWAP_THR(P_SWAP_THR), .P_BATCH_W(P_BATCH_W),
      .SEED(32'h1ACE_B00C ^ (32'h0101_0101 * (r + 1)))
    ) u_region (
      .clk, .rst_n,
      .req_valid(req_valid && !any_busy && (region == RW'(r))),
      .req_we, .req_tag(req_addr), .req_bank(bank), .req_frame(frame), .req_wdata,
      .req_accept(r_accept[r]), .rsp_valid(r_rsp_valid[r]), .rsp_data(r_rsp_data[r]),
      .busy(busy[r]),
      .mem_valid(mem_valid[LO +: NBANKS_REGION]), .mem_we(mem_we[LO +: NBANKS_REGION]),
      .mem_frame(mem_frame[LO +: NBANKS_REGION]), .mem_wdata(mem_wdata[LO +: NBANKS_REGION]),
      .mem_ready(mem_ready[LO +: NBANKS_REGION]), .mem_rvalid(mem_rvalid[LO +: NBANKS_REGION]),
      .mem_rdata(mem_rdata[LO +: NBANKS_REGION]),
      .ev_sample(ev_sample[r]), .ev_overwrite(ev_overwrite[r]), .ev_cutoff(ev_cutoff[r]),
      .ev_overflow(ev_overflow[r]), .ev_epoch(ev_epoch[r]), .ev_batch(ev_batch[r]),
      .ev_swap(ev_swap[r]), .ev_skip(ev_skip[r]), .ev_wrap(ev_wrap[r]),
      .batch(batch[r]), .pending(pending[r])
    );
  end

  assign req_accept = |r_accept;

  always_comb begin
    rsp_valid = |r_rsp_valid;
    rsp_data  = '0;
    for (int r = 0; r < NREGIONS; r++) rsp_data = rsp_data | r_rsp_data[r];
  end

  a_accept_xor_nack: assert property (@(posedge clk) disable iff (!rst_n) !(req_accept && req_nack));
  a_one_rsp: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(r_rsp_valid));

endmodule
