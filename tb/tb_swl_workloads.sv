// tb_swl_workloads: the chip at its default configuration under synthetic write streams
// with the average overwrite distances measured for six commercial and scientific
// programs (apache 14,800; OLTP 17,005; SPECjbb 17,100; radix 16,047; FFT 10,300;
// FMM about 19,900 writes), and under the worst case, one block rewritten continuously.
//
// Program streams: the host writes D distinct blocks of region 0 round after round, each
// round in a new random order, so a block's overwrite distance varies around D. For each
// stream the chip is reset, one full population of 2^20 writes sets the estimate, and the
// swap steps issued during the next 2^17 writes are counted. Checks per stream: the batch
// computed at the population's end is 8 (the estimate saturates near 1/3800, because all
// these distances lie beyond the cut-off of 4000), and swap steps per write fall between
// 0.08 % and 0.16 % (the published SWL overheads for these programs are 0.11-0.13 %).
// Worst case: batch 27,963 (= ceil(6 * 2^22 / 900)) and 3 to 5 swap steps per write (400 %
// published; only about 30 samples complete in the 2^15 measured writes, hence the range).
// The bank model answers in one cycle; write data is not checked here (see tb_swl_chip).
module tb_swl_workloads;
  import swl_pkg::*;
  localparam int NB = REGIONS * BANKS_PER_REGION;
  localparam int FW = FRAME_W;
  localparam int MEAS = 1 << 17;

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
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned steps = 0, moves = 0;
  always @(posedge clk) if (rst_n) begin
    steps += ev_swap[0] + ev_skip[0];
    moves += ev_swap[0];
  end

  task automatic write(logic [FW+1:0] a);
    @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = TAG_W'(a);
    forever begin
      #1;
      if (req_accept) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  // block k of a stream, spread over the four banks of region 0
  function automatic logic [FW+1:0] blk(int unsigned k);
    return {2'(k), FW'((k >> 2) * 37)};
  endfunction

  // one program stream of n writes over d blocks, round after round in random order
  int unsigned perm [$];
  int unsigned pos;
  task automatic stream(int unsigned d, int unsigned n);
    for (int unsigned i = 0; i < n; i++) begin
      if (pos == perm.size()) begin
        perm.shuffle();
        pos = 0;
      end
      write(blk(perm[pos]));
      pos++;
    end
  endtask

  task automatic run_program(string name, int unsigned d);
    longint unsigned s0, m0;
    real ovh;
    do_reset();
    perm.delete();
    for (int unsigned k = 0; k < d; k++) perm.push_back(k);
    pos = d;
    stream(d, 1 << POP_W);
    s0 = steps; m0 = moves;
    stream(d, MEAS);
    ovh = 100.0 * real'(steps - s0) / real'(MEAS);
    $display("%-8s distance %0d: batch %0d, swap steps per write %.3f %% (%0d block moves)",
             name, d, batch[0], ovh, moves - m0);
    checks += 2;
    if (batch[0] != 8) begin failures++; $display("  batch should be 8"); end
    if (ovh < 0.08 || ovh > 0.16) begin failures++; $display("  overhead out of range"); end
  endtask

  initial begin
    longint unsigned s0;
    real ovh;
    @(negedge clk);
    run_program("apache", 14800);
    run_program("OLTP",   17005);
    run_program("specjbb", 17100);
    run_program("radix",  16047);
    run_program("FFT",    10300);
    run_program("FMM",    19900);
    // worst case: one block, over and over
    do_reset();
    for (int i = 0; i < (1 << POP_W); i++) write(blk(5));
    s0 = steps;
    for (int i = 0; i < (MEAS >> 2); i++) write(blk(5));
    ovh = 100.0 * real'(steps - s0) / real'(MEAS >> 2);
    $display("worst case: batch %0d, swap steps per write %.1f %%", batch[0], ovh);
    checks += 2;
    if (batch[0] != 27963) begin failures++; $display("  batch should be 27963"); end
    if (ovh < 300.0 || ovh > 500.0) begin failures++; $display("  overhead out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
