// tb_swl_rate_estimator: feeds populations of 2^8 writes with random completions and checks
// the frozen sample count and total distance, the batch size
// ceil(SWAP_THR * numFrames * count / (numSamples * total)) worked out here with 64-bit
// arithmetic, the default batch for a population without completions, and the latency
// from the population's last write to the batch update.
module tb_swl_rate_estimator;
  localparam int POP = 8, NS = 900, FW = 22, THR = 6, CUT = 4000, EPS = 200, BW = 32;
  localparam int DIST_W = $clog2(CUT + 1), SUM_W = DIST_W + 2;

  logic clk = 0, rst_n = 1, wr = 0, comp_valid = 0;
  logic [1:0] comp_n = 0;
  logic [SUM_W-1:0] comp_sum = 0;
  logic epoch_end, batch_update;
  logic [BW-1:0] batch;
  logic [POP+1:0] last_count;
  logic [POP+1+DIST_W:0] last_total;
  int checks = 0, failures = 0;

  swl_rate_estimator #(.P_POP_W(POP), .P_NUM_SAMPLES(NS), .FRAMES_W(FW), .P_SWAP_THR(THR),
    .P_CUTOFF(CUT), .P_EPSILON(EPS), .P_BATCH_W(BW)) dut (
    .clk, .rst_n, .wr, .comp_valid, .comp_n, .comp_sum,
    .epoch_end, .batch_update, .batch, .last_count, .last_total);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned expect_batch(longint unsigned c, longint unsigned t);
    longint unsigned n, d;
    if (c == 0) begin n = longint'(THR) << FW; d = longint'(NS) * (CUT - EPS); end
    else begin n = longint'(THR) * c << FW; d = longint'(NS) * t; end
    return (n + d - 1) / d;
  endfunction

  initial begin
    checks++;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (batch !== BW'(expect_batch(0, 0))) begin failures++; $display("reset batch %0d", batch); end
    for (int e = 0; e < 40; e++) begin
      longint unsigned c, t;
      int lat;
      int mode;
      c = 0; t = 0;
      mode = e % 4;   // 0: no completions, 1: common case, 2: worst case (distance 1), 3: mixed
      for (int w = 0; w < (1 << POP); w++) begin
        bit comp;
        int n, s;
        comp = (mode != 0) && ($urandom_range(9) == 0);
        n = $urandom_range(3, 1);
        s = 0;
        for (int k = 0; k < n; k++)
          s += (mode == 1) ? (CUT - EPS) : (mode == 2) ? 1 : $urandom_range(CUT - EPS, 1);
        @(negedge clk);
        wr = 1;
        // a completion arriving with the population's last write already belongs to the next
        comp_valid = comp && (w != (1 << POP) - 1);
        comp_n = 2'(n); comp_sum = SUM_W'(s);
        if (comp_valid) begin c += n; t += s; end
        if (w == (1 << POP) - 1) begin
          #1;
          checks++; if (!epoch_end) begin failures++; $display("epoch_end missing"); end
        end
      end
      @(negedge clk);
      wr = 0; comp_valid = 0;
      checks++;
      if (last_count != c || last_total != t) begin
        failures++; $display("epoch %0d: count %0d/%0d total %0d/%0d", e, last_count, c, last_total, t);
      end
      lat = 1;
      while (!batch_update && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (batch !== BW'(expect_batch(c, t))) begin
        failures++; $display("epoch %0d: batch %0d expected %0d", e, batch, expect_batch(c, t));
      end
      checks++;
      if (c != 0 && lat != $bits(dut.div_num) + 3) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
