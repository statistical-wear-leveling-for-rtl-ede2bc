// tb_swl_swap_trigger: random completions (0..3 per cycle), batch sizes and swap-done pulses
// against a reference count: a batch is owed each time SWAP_THR completions accumulate.
module tb_swl_swap_trigger;
  localparam int THR = 6, BW = 32;
  logic clk = 0, rst_n = 1, comp_valid = 0, swap_done = 0;
  logic [1:0] comp_n = 0;
  logic [BW-1:0] batch = 7, pending;
  logic [$clog2(THR + 3)-1:0] swap_count;
  logic fire;
  int checks = 0, failures = 0, fires = 0;

  swl_swap_trigger #(.P_SWAP_THR(THR), .P_BATCH_W(BW)) dut (
    .clk, .rst_n, .comp_valid, .comp_n, .batch, .swap_done, .pending, .swap_count, .fire);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_pend = 0;
    int ref_cnt = 0;
    bit ref_fire;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      comp_valid = ($urandom_range(3) == 0);
      comp_n = 2'($urandom_range(3, 1));
      swap_done = ($urandom_range(2) == 0);
      if (i % 1000 == 0) batch = BW'($urandom_range(30, 1));
      ref_fire = 0;
      if (comp_valid) ref_cnt += comp_n;
      if (ref_cnt >= THR) begin ref_cnt -= THR; ref_pend += batch; ref_fire = 1; end
      if (swap_done && pending != 0) ref_pend -= 1;
      @(negedge clk);
      comp_valid = 0; swap_done = 0;
      checks++;
      if (pending != ref_pend || swap_count != ref_cnt || fire != ref_fire) begin
        failures++;
        if (failures < 10) $display("cycle %0d: pending %0d/%0d count %0d/%0d fire %0d/%0d",
                                    i, pending, ref_pend, swap_count, ref_cnt, fire, ref_fire);
      end
      fires += fire;
    end
    checks++; if (fires == 0) failures++;
    $display("batches %0d", fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
