// tb_swl_sampler: runs one full population of 2^20 writes at the default sampling rate
// (900 / 2^20) and checks that the number of sampled writes lies within three standard
// deviations of 900, that nothing is sampled without a write, and that gaps between writes
// do not change the decisions (the LFSR only advances on writes).
module tb_swl_sampler;
  logic clk = 0, rst_n = 1, wr = 0;
  logic sample;
  int checks = 0, failures = 0;
  int unsigned nsamp = 0;

  swl_sampler dut (.clk, .rst_n, .wr, .sample);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << 20); i++) begin
      @(negedge clk);
      wr = 1;
      #1;
      if (sample) nsamp++;
      if ((i % 4096) == 0) begin
        // an idle cycle: no sample may be reported
        @(negedge clk);
        wr = 0;
        #1;
        checks++; if (sample) begin failures++; $display("sample without write"); end
      end
    end
    @(negedge clk) wr = 0;
    // expected 900, standard deviation about 30
    checks++;
    if (nsamp < 810 || nsamp > 990) begin failures++; $display("samples %0d out of range", nsamp); end
    $display("sampled %0d of %0d writes", nsamp, 1 << 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
