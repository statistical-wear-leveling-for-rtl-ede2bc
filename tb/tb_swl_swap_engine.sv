// tb_swl_swap_engine: connects the swap engine to the behavioural bank model and checks
// that a swap exchanges the two frames' blocks with two reads and two writes, that a skip
// step touches no frame, which bank is reported, and the number of cycles each takes.
module tb_swl_swap_engine;
  localparam int FW = 8, DW = 64, NB = 4, RL = 3, WL = 4;
  logic clk = 0, rst_n = 1, start = 0, skip = 0;
  logic [1:0] start_bank = 0, bank;
  logic [FW-1:0] frame_a = 0, frame_b = 0;
  logic busy, advance, done, skipped;
  logic mem_valid, mem_we, mem_ready, mem_rvalid;
  logic [FW-1:0] mem_frame;
  logic [DW-1:0] mem_wdata, mem_rdata;
  int unsigned max_wear;
  longint unsigned writes;
  int checks = 0, failures = 0;

  swl_swap_engine #(.P_FRAME_W(FW), .P_DATA_W(DW), .NBANKS(NB)) dut (
    .clk, .rst_n, .start, .start_bank, .busy, .bank, .frame_a, .frame_b, .skip,
    .advance, .done, .skipped, .mem_valid, .mem_we, .mem_frame, .mem_wdata,
    .mem_ready, .mem_rvalid, .mem_rdata);

  pcm_bank_model #(.FRAME_W(FW), .DATA_W(DW), .RD_LAT(RL), .WR_LAT(WL), .BANK_ID(1)) mem (
    .clk, .valid(mem_valid), .we(mem_we), .frame(mem_frame), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata), .max_wear, .writes);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] content [1 << FW];

  task automatic swap(logic [FW-1:0] a, logic [FW-1:0] b, bit s, logic [1:0] bk);
    int cyc = 0;
    longint unsigned w0 = writes;
    logic [DW-1:0] t;
    repeat (WL + 2) @(negedge clk);   // let the bank finish the previous write
    frame_a = a; frame_b = b; skip = s; start = 1; start_bank = bk;
    @(negedge clk);
    start = 0;
    checks++; if (!busy || bank != bk) begin failures++; $display("not busy / wrong bank"); end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (skipped != s) begin failures++; $display("skipped flag %0d", skipped); end
    if (!s) begin
      t = content[a]; content[a] = content[b]; content[b] = t;
    end
    @(negedge clk);
    checks++;
    if (writes - w0 != (s ? 0 : 2)) begin failures++; $display("writes %0d", writes - w0); end
    // cycles: skip = 1; swap = read A (1 + RL+1) + read B (1 + RL+1) + write A (1 + WL) + write B (1)
    checks++;
    if (cyc != (s ? 1 : 2 * (RL + 2) + WL + 2)) begin failures++; $display("swap took %0d cycles", cyc); end
  endtask

  task automatic verify();
    for (int f = 0; f < (1 << FW); f++) begin
      logic [DW-1:0] got;
      got = mem.store.exists(FW'(f)) ? mem.store[FW'(f)] : mem.init_word(1, FW'(f));
      checks++;
      if (got !== content[f]) begin failures++; if (failures < 10) $display("frame %0d wrong: %h vs %h", f, got[31:0], content[f][31:0]); end
    end
  endtask

  initial begin
    for (int f = 0; f < (1 << FW); f++) content[f] = mem.init_word(1, FW'(f));
    repeat (2) @(posedge clk);
    rst_n = 1;
    swap(3, 200, 0, 2);
    swap(7, 9, 1, 1);
    for (int i = 0; i < 200; i++) swap(FW'($urandom), FW'($urandom), ($urandom_range(3) == 0), 2'($urandom));
    verify();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
