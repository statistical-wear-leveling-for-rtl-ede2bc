// tb_swl_region: one region of two banks driven directly (no chip around it).
//
// Checks, against a reference copy of all blocks, that reads always return the last data
// written while blocks are being swapped; that no request is taken while the region is
// busy; that `busy` rises when swaps are owed; and that the number of swaps performed equals
// the number of batches released times their size once the region drains. The stimulus
// alternates between spread writes and bursts of overwrites of one block.
module tb_swl_region;
  localparam int NBK = 2, FW = 5, RB = 1, TW = 43, DW = 32;
  localparam int POP = 9, NS = 128, DEPTH = 13, CUT = 48, EPS = 4, THR = 6, BW = 32;
  localparam int AW = FW + 1;

  logic clk = 0, rst_n = 1;
  logic req_valid = 0, req_we = 0;
  logic [TW-1:0] req_tag = '0;
  logic [0:0] req_bank = '0;
  logic [FW-1:0] req_frame = '0;
  logic [DW-1:0] req_wdata = '0;
  logic req_accept, rsp_valid, busy;
  logic [DW-1:0] rsp_data;
  logic [NBK-1:0] mem_valid, mem_we, mem_ready, mem_rvalid;
  logic [NBK-1:0][FW-1:0] mem_frame;
  logic [NBK-1:0][DW-1:0] mem_wdata, mem_rdata;
  logic ev_sample, ev_overwrite, ev_cutoff, ev_overflow, ev_epoch, ev_batch, ev_swap, ev_skip, ev_wrap;
  logic [BW-1:0] batch, pending;
  int unsigned max_wear [NBK];
  longint unsigned bank_writes [NBK];
  int checks = 0, failures = 0;

  swl_region #(.NBANKS(NBK), .P_FRAME_W(FW), .P_ROW_BLK_W(RB), .P_TAG_W(TW), .P_DATA_W(DW),
    .P_POP_W(POP), .P_NUM_SAMPLES(NS), .P_DEPTH(DEPTH), .P_CUTOFF(CUT), .P_EPSILON(EPS),
    .P_SWAP_THR(THR), .P_BATCH_W(BW)) dut (.*);

  for (genvar b = 0; b < NBK; b++) begin : g_mem
    pcm_bank_model #(.FRAME_W(FW), .DATA_W(DW), .RD_LAT(1), .WR_LAT(2), .BANK_ID(b)) u_mem (
      .clk, .valid(mem_valid[b]), .we(mem_we[b]), .frame(mem_frame[b]), .wdata(mem_wdata[b]),
      .ready(mem_ready[b]), .rvalid(mem_rvalid[b]), .rdata(mem_rdata[b]),
      .max_wear(max_wear[b]), .writes(bank_writes[b]));
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint owed = 0, done_swaps = 0;
  int n_busy_accept = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_batch) owed += batch;
    if (ev_swap || ev_skip) done_swaps++;
    if (busy && req_accept) n_busy_accept++;
  end

  logic [DW-1:0] ref_mem [logic [AW-1:0]];
  logic [DW-1:0] exp_q [$];

  function automatic logic [DW-1:0] init_word(int unsigned bank, logic [FW-1:0] f);
    return (bank << 24) ^ 32'(f) ^ 32'hA5A5_0000;
  endfunction

  always @(posedge clk) if (rst_n && rsp_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected read"); end
    else if (rsp_data !== exp_q.pop_front()) begin failures++; if (failures < 10) $display("%0t bad read data", $time); end
  end

  task automatic access(bit we, logic [AW-1:0] a, logic [DW-1:0] d);
    @(negedge clk);
    req_valid = 1; req_we = we; req_tag = TW'(a) | (TW'(1) << 40);
    req_bank = a[FW]; req_frame = a[FW-1:0]; req_wdata = d;
    forever begin
      #1;
      if (req_accept) break;
      @(negedge clk);
    end
    if (we) ref_mem[a] = d;
    else exp_q.push_back(ref_mem.exists(a) ? ref_mem[a] : init_word(a[FW], a[FW-1:0]));
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  initial begin
    bit saw_busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      logic [AW-1:0] hot;
      hot = AW'($urandom);
      for (int i = 0; i < 1500; i++) begin
        if (r % 2 == 1 && $urandom_range(1) == 0) access(1, hot, $urandom);
        else access($urandom_range(1), AW'($urandom), $urandom);
        saw_busy |= busy;
      end
    end
    for (int a = 0; a < (1 << AW); a++) access(0, AW'(a), '0);
    // let the owed swaps drain
    while (busy) @(posedge clk);
    repeat (20) @(posedge clk);
    checks += 4;
    if (exp_q.size() != 0) begin failures++; $display("reads lost"); end
    if (n_busy_accept != 0) begin failures++; $display("request taken while busy"); end
    if (!saw_busy) begin failures++; $display("never busy"); end
    if (owed != done_swaps || owed == 0) begin failures++; $display("owed %0d performed %0d", owed, done_swaps); end
    $display("swap steps owed %0d performed %0d, final batch %0d", owed, done_swaps, batch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
