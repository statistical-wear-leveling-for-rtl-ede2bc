// tb_swl_chip_full: the chip at its full default configuration (16 banks of 2^20 blocks of
// 512 bits, 13-entry buffers, cut-off 4000, error 200, 900 samples per population of 2^20
// writes) taken through one complete population of region 0.
//
// The host writes 2^20 + 4096 blocks of region 0, spread over 2^16 blocks of its four banks
// (their overwrite distance is far above the cut-off, as in ordinary programs) with one hot
// block rewritten every 1000 writes, and reads back a block every 64 writes. Checks: every
// read returns the last data written although blocks are being swapped; the population ends
// exactly after 2^20 writes; the batch size computed at its end equals
// ceil(6 * 2^22 * count / (900 * total)) from the frozen count and total; swaps were
// performed; and the number of sampled writes is near 900.
module tb_swl_chip_full;
  import swl_pkg::*;
  localparam int NB = REGIONS * BANKS_PER_REGION;
  localparam int FW = FRAME_W;

  logic clk = 0, rst_n = 1;
  logic req_valid = 0, req_we = 0;
  logic [TAG_W-1:0] req_addr = '0;
  logic [DATA_W-1:0] req_wdata = '0;
  logic req_accept, req_nack, rsp_valid;
  logic [DATA_W-1:0] rsp_data;
  logic [NB-1:0] mem_valid, mem_we, mem_ready, mem_rvalid;
  logic [NB-1:0][FW-1:0] mem_frame;
  logic [NB-1:0][DATA_W-1:0] mem_wdata, mem_rdata;
  logic [REGIONS-1:0] busy, ev_sample, ev_overwrite, ev_cutoff, ev_overflow, ev_epoch, ev_batch,
                      ev_swap, ev_skip, ev_wrap;
  logic [REGIONS-1:0][BATCH_W-1:0] batch, pending;
  int unsigned max_wear [NB];
  longint unsigned bank_writes [NB];
  int checks = 0, failures = 0;

  swl_chip dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_mem
    pcm_bank_model #(.FRAME_W(FW), .DATA_W(DATA_W), .RD_LAT(1), .WR_LAT(1), .BANK_ID(b)) u_mem (
      .clk, .valid(mem_valid[b]), .we(mem_we[b]), .frame(mem_frame[b]), .wdata(mem_wdata[b]),
      .ready(mem_ready[b]), .rvalid(mem_rvalid[b]), .rdata(mem_rdata[b]),
      .max_wear(max_wear[b]), .writes(bank_writes[b]));
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sample, n_ow, n_cut, n_ovf, n_epoch, n_batch, n_swap, n_skip;
  longint unsigned host_writes = 0, epoch_at = 0;
  always @(posedge clk) if (rst_n) begin
    n_sample += ev_sample[0];
    n_ow     += ev_overwrite[0];
    n_cut    += ev_cutoff[0];
    n_ovf    += ev_overflow[0];
    n_batch  += ev_batch[0];
    n_swap   += ev_swap[0];
    n_skip   += ev_skip[0];
    if (ev_epoch[0]) begin n_epoch++; epoch_at = host_writes + 1; end
    if (req_accept && req_we) host_writes++;
  end

  localparam int AW = FW + 2;   // blocks of region 0
  logic [DATA_W-1:0] ref_mem [logic [AW-1:0]];
  logic [DATA_W-1:0] exp_q [$];

  function automatic logic [DATA_W-1:0] init_word(int unsigned bank, logic [FW-1:0] f);
    logic [DATA_W-1:0] w;
    for (int i = 0; i < DATA_W; i += 32) w[i +: 32] = (bank << 24) ^ 32'(f) ^ (32'(i) << 16) ^ 32'hA5A5_0000;
    return w;
  endfunction

  always @(posedge clk) if (rst_n && rsp_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected read"); end
    else if (rsp_data !== exp_q.pop_front()) begin failures++; if (failures < 10) $display("%0t bad read", $time); end
  end

  task automatic access(bit we, logic [AW-1:0] a, logic [DATA_W-1:0] d);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = TAG_W'(a); req_wdata = d;
    forever begin
      #1;
      if (req_accept) break;
      @(negedge clk);
    end
    if (we) ref_mem[a] = d;
    else exp_q.push_back(ref_mem.exists(a) ? ref_mem[a] : init_word(int'(a >> FW), FW'(a)));
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  // spread blocks: 2^14 per bank, bank in the top bits
  function automatic logic [AW-1:0] spread(int unsigned i);
    return {2'(i), FW'((i >> 2) & 32'h3FFF) << 3};
  endfunction

  initial begin
    longint unsigned c, t, n, d;
    logic [AW-1:0] hot;
    hot = {2'd1, FW'(20'h0_1234)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << POP_W) + 4096; i++) begin
      logic [DATA_W-1:0] w;
      w = {16{$urandom}};
      if (i % 1000 == 999) access(1, hot, w);
      else access(1, spread(i), w);
      if (i % 64 == 0) access(0, (i % 128 == 0) ? hot : spread(i - 4), '0);
    end
    repeat (200) @(posedge clk);
    c = dut.g_region[0].u_region.u_est.last_count;
    t = dut.g_region[0].u_region.u_est.last_total;
    n = longint'(SWAP_THR) * c << (FRAME_W + 2);
    d = longint'(NUM_SAMPLES) * t;
    checks += 6;
    if (n_epoch != 1 || epoch_at != (1 << POP_W)) begin failures++; $display("population end at %0d", epoch_at); end
    if (c == 0 || batch[0] != BATCH_W'((n + d - 1) / d)) begin failures++; $display("batch %0d for %0d/%0d", batch[0], c, t); end
    if (n_sample < 800 || n_sample > 1050) begin failures++; $display("samples %0d", n_sample); end
    if (n_swap == 0) begin failures++; $display("no swaps"); end
    if (n_ow == 0 || n_cut == 0) begin failures++; $display("completion kinds missing"); end
    if (exp_q.size() != 0) begin failures++; $display("reads lost"); end
    $display("writes %0d, samples %0d, completions: overwrite %0d cut-off %0d overflow %0d",
             host_writes, n_sample, n_ow, n_cut, n_ovf);
    $display("population count %0d total distance %0d -> batch %0d; batches %0d swaps %0d skips %0d",
             c, t, batch[0], n_batch, n_swap, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
