// tb_swl_chip: end-to-end test of the wear-leveling chip logic at reduced sizes.
//
// Sixteen behavioural bank models (64 blocks each) sit behind the chip. A host model plays
// the memory controller: it sends requests speculatively, resends any request the chip
// nacks, and holds a request the chip neither accepts nor nacks. It keeps a reference copy
// of every block, so every read checks that the remapping and the block swaps never lose or
// misplace data. The run has three phases:
//   1. common case: random reads and writes over the whole chip (few overwrites);
//   2. worst case: one block is written over and over, which raises the estimated overwrite
//      rate, enlarges the swap batches and makes the blocks move (wear is spread);
//   3. read-back of every block of the chip.
// Every mechanism is counted and must occur: sampling, completion by overwrite, by
// cut-off and by buffer overflow, population end, batch release, block swap, skipped swap
// step, key renewal at pointer wrap, nack, and a batch size that grows under the attack.
// Sampling is raised to 256 of every 1024 writes and the cut-off lowered to 64 so that all
// of this happens within a few tens of thousands of cycles.
module tb_swl_chip;
  localparam int NR = 4, NBR = 4, NB = NR * NBR, FW = 6, RB = 2, TW = 43, DW = 64;
  localparam int POP = 10, NS = 256, DEPTH = 13, CUT = 64, EPS = 4, THR = 6, BW = 32;
  localparam int AW = FW + 4;                 // address bits that select a block of the chip
  localparam logic [TW-1:0] HIGH = TW'(43'h2A5) << AW;  // fixed upper address bits
  localparam int ATTACK = 12000;

  logic clk = 0, rst_n = 1;
  logic req_valid = 0, req_we = 0;
  logic [TW-1:0] req_addr = '0;
  logic [DW-1:0] req_wdata = '0;
  logic req_accept, req_nack, rsp_valid;
  logic [DW-1:0] rsp_data;
  logic [NB-1:0] mem_valid, mem_we, mem_ready, mem_rvalid;
  logic [NB-1:0][FW-1:0] mem_frame;
  logic [NB-1:0][DW-1:0] mem_wdata, mem_rdata;
  logic [NR-1:0] busy, ev_sample, ev_overwrite, ev_cutoff, ev_overflow, ev_epoch, ev_batch,
                 ev_swap, ev_skip, ev_wrap;
  logic [NR-1:0][BW-1:0] batch, pending;
  int unsigned max_wear [NB];
  longint unsigned bank_writes [NB];
  int checks = 0, failures = 0;

  swl_chip #(
    .NREGIONS(NR), .NBANKS_REGION(NBR), .P_FRAME_W(FW), .P_ROW_BLK_W(RB), .P_TAG_W(TW),
    .P_DATA_W(DW), .P_POP_W(POP), .P_NUM_SAMPLES(NS), .P_DEPTH(DEPTH), .P_CUTOFF(CUT),
    .P_EPSILON(EPS), .P_SWAP_THR(THR), .P_BATCH_W(BW)
  ) dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_mem
    pcm_bank_model #(.FRAME_W(FW), .DATA_W(DW), .RD_LAT(2), .WR_LAT(3), .BANK_ID(b)) u_mem (
      .clk, .valid(mem_valid[b]), .we(mem_we[b]), .frame(mem_frame[b]), .wdata(mem_wdata[b]),
      .ready(mem_ready[b]), .rvalid(mem_rvalid[b]), .rdata(mem_rdata[b]),
      .max_wear(max_wear[b]), .writes(bank_writes[b]));
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  localparam int unsigned WATCHDOG = 2_000_000;
  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int n_sample, n_ow, n_cut, n_ovf, n_epoch, n_batch, n_swap, n_skip, n_wrap, n_nack, n_busy_cycles;
  always @(posedge clk) if (rst_n) begin
    n_sample += $countones(ev_sample);
    n_ow     += $countones(ev_overwrite);
    n_cut    += $countones(ev_cutoff);
    n_ovf    += $countones(ev_overflow);
    n_epoch  += $countones(ev_epoch);
    n_batch  += $countones(ev_batch);
    n_swap   += $countones(ev_swap);
    n_skip   += $countones(ev_skip);
    n_wrap   += $countones(ev_wrap);
    n_nack   += (req_valid && req_nack);
    n_busy_cycles += (busy != 0);
  end

  // ---------------- reference and read checking ----------------
  logic [DW-1:0] ref_mem [logic [AW-1:0]];
  logic [DW-1:0] exp_q [$];

  function automatic logic [DW-1:0] init_word(int unsigned bank, logic [FW-1:0] f);
    logic [DW-1:0] w;
    for (int i = 0; i < DW; i += 32) w[i +: 32] = (bank << 24) ^ 32'(f) ^ (32'(i) << 16) ^ 32'hA5A5_0000;
    return w;
  endfunction

  function automatic logic [DW-1:0] ref_read(logic [AW-1:0] a);
    // at reset every block sits in the frame of its own number
    return ref_mem.exists(a) ? ref_mem[a] : init_word(int'(a >> FW), FW'(a));
  endfunction

  int n_reads = 0;
  always @(posedge clk) if (rst_n && rsp_valid) begin
    logic [DW-1:0] e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected read data"); end
    else begin
      e = exp_q.pop_front();
      if (rsp_data !== e) begin
        failures++;
        if (failures < 10) $display("%0t read data %h expected %h", $time, rsp_data, e);
      end
    end
    n_reads++;
  end

  // one request, resent until accepted
  task automatic access(bit we, logic [AW-1:0] a, logic [DW-1:0] d);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = HIGH | TW'(a); req_wdata = d;
    forever begin
      #1;
      if (req_accept) break;
      @(negedge clk);
    end
    if (we) ref_mem[a] = d;
    else exp_q.push_back(ref_read(a));
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  int unsigned common_batch;
  initial begin
    logic [AW-1:0] target;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: common case
    for (int i = 0; i < 6000; i++)
      access($urandom_range(2) != 0, AW'($urandom), {$urandom, $urandom});
    common_batch = batch[1];
    // phase 2: worst case, region 1 bank 2, one block overwritten again and again
    target = AW'((1 << (FW + 2)) | (2 << FW) | 13);
    for (int i = 0; i < ATTACK; i++) begin
      access(1, target, {$urandom, $urandom});
      if (i % 64 == 0) access(0, target, '0);
    end
    // phase 3: read every block back
    for (int a = 0; a < (1 << AW); a++) access(0, AW'(a), '0);
    repeat (50) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d reads never returned", exp_q.size()); end

    $display("samples %0d overwrites %0d cutoffs %0d overflows %0d populations %0d batches %0d",
             n_sample, n_ow, n_cut, n_ovf, n_epoch, n_batch);
    $display("swaps %0d skips %0d wraps %0d nacks %0d busy cycles %0d reads %0d",
             n_swap, n_skip, n_wrap, n_nack, n_busy_cycles, n_reads);
    $display("batch size: common case %0d, after attack %0d; max frame wear in attacked bank %0d of %0d writes",
             common_batch, batch[1], max_wear[6], ATTACK);
    checks += 11;
    if (n_sample == 0) begin failures++; $display("no sample"); end
    if (n_ow == 0)     begin failures++; $display("no overwrite completion"); end
    if (n_cut == 0)    begin failures++; $display("no cut-off completion"); end
    if (n_ovf == 0)    begin failures++; $display("no overflow"); end
    if (n_epoch == 0)  begin failures++; $display("no population end"); end
    if (n_batch == 0)  begin failures++; $display("no batch"); end
    if (n_swap == 0)   begin failures++; $display("no swap"); end
    if (n_skip == 0)   begin failures++; $display("no skipped step"); end
    if (n_wrap == 0)   begin failures++; $display("no key renewal"); end
    if (n_nack == 0)   begin failures++; $display("no nack"); end
    if (!(batch[1] > common_batch)) begin failures++; $display("batch did not grow under attack"); end
    // wear is spread: the attacked block must have moved between frames several times
    checks++;
    if (max_wear[6] > ATTACK / 2) begin failures++; $display("wear not spread"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
