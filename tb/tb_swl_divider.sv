// tb_swl_divider: random and corner-case divisions at 48 bits compared with the
// simulator's own 64-bit division; also checks the latency of W+1 cycles from start to done.
module tb_swl_divider;
  localparam int W = 48;
  logic clk = 0, rst_n = 1, start = 0;
  logic [W-1:0] num = '0, den = '0, quo, rem;
  logic busy, done;
  int checks = 0, failures = 0;

  swl_divider #(.W(W)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quo, .rem);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint unsigned n, longint unsigned d);
    int cyc = 0;
    longint unsigned eq, er;
    @(negedge clk);
    num = W'(n); den = W'(d); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    eq = (d == 0) ? ((64'd1 << W) - 1) : (n / d);
    er = (d == 0) ? n : (n % d);
    checks++;
    if (quo !== W'(eq) || rem !== W'(er)) begin
      failures++;
      $display("%0d / %0d: got %0d r %0d, expected %0d r %0d", n, d, quo, rem, eq, er);
    end
    checks++;
    if (cyc != W) begin failures++; $display("latency %0d", cyc + 1); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(48'd100, 48'd7);
    run(48'd25165824, 48'd3420000);
    run((64'd1 << W) - 1, 1);
    run((64'd1 << W) - 1, (64'd1 << W) - 1);
    run(5, 9);
    run(0, 3);
    run(77, 0);
    for (int i = 0; i < 300; i++) begin
      longint unsigned n, d;
      n = {$urandom, $urandom} & ((64'd1 << W) - 1);
      d = {$urandom, $urandom} & ((64'd1 << ($urandom_range(W, 1))) - 1);
      if (d == 0) d = 1;
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
