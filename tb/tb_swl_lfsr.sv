// tb_swl_lfsr: checks the LFSR against an independently written Galois recurrence, checks
// that it holds its state while disabled, never reaches zero and does not repeat a state
// within the first 20000 steps.
module tb_swl_lfsr;
  logic clk = 0, rst_n = 1, en = 0;
  logic [31:0] value;
  int checks = 0, failures = 0;

  swl_lfsr #(.W(32), .SEED(32'h1234_5678)) dut (.clk, .rst_n, .en, .value);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] step(logic [31:0] s);
    // polynomial x^32 + x^22 + x^2 + x + 1 in right-shift Galois form
    logic fb = s[0];
    s = s >> 1;
    if (fb) s = s ^ ((32'h1 << 31) | (32'h1 << 21) | (32'h1 << 1) | 32'h1);
    return s;
  endfunction

  initial begin
    logic [31:0] ref_s;
    bit seen [logic [31:0]];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ref_s = 32'h1234_5678;
    checks++; if (value !== ref_s) begin failures++; $display("reset value %h", value); end
    // disabled: holds
    repeat (5) @(negedge clk);
    checks++; if (value !== ref_s) begin failures++; $display("moved while disabled"); end
    en = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      ref_s = step(ref_s);
      checks++;
      if (value !== ref_s || value == 0 || seen.exists(value)) begin
        failures++;
        if (failures < 5) $display("step %0d: got %h expected %h", i, value, ref_s);
      end
      seen[value] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
