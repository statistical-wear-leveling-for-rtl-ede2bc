// tb_swl_bank_remap: drives a small bank (2^6 blocks, rows of 4 blocks) through several
// full pointer sweeps. A reference array records which block each physical frame holds; each
// swap step exchanges the two frames the remapper names (unless it says skip). After every
// step the remapper's lookup must find every block where the reference put it, the mapping
// must stay a bijection, and at every wrap the keys must rotate and each row's blocks must
// sit together in one physical row.
module tb_swl_bank_remap;
  localparam int FW = 6, RB = 2, N = 1 << FW;
  logic clk = 0, rst_n = 1, advance = 0;
  logic [FW-1:0] lookup_addr = 0, lookup_frame, ptr, frame_a, frame_b, key_old, key_new;
  logic skip, wrapped;
  int checks = 0, failures = 0, wraps = 0, skips = 0, swaps = 0;

  swl_bank_remap #(.P_FRAME_W(FW), .P_ROW_BLK_W(RB), .SEED(32'hC0FF_EE11)) dut (
    .clk, .rst_n, .lookup_addr, .lookup_frame, .ptr, .frame_a, .frame_b, .skip,
    .advance, .wrapped, .key_old, .key_new);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int holds [N];   // holds[frame] = block stored there

  task automatic check_map(bit at_wrap);
    bit used [N];
    for (int a = 0; a < N; a++) begin
      lookup_addr = FW'(a);
      #1;
      checks++;
      if (holds[lookup_frame] != a || used[lookup_frame]) begin
        failures++;
        if (failures < 10) $display("ptr %0d: block %0d maps to %0d holding %0d", ptr, a, lookup_frame, holds[lookup_frame]);
      end
      used[lookup_frame] = 1;
      if (at_wrap && (a % (1 << RB)) != 0) begin
        logic [FW-1:0] f0;
        lookup_addr = FW'(a - (a % (1 << RB)));
        #1 f0 = lookup_frame;
        lookup_addr = FW'(a);
        #1;
        checks++;
        if ((f0 >> RB) != (lookup_frame >> RB)) begin failures++; $display("row split for block %0d", a); end
      end
    end
  endtask

  initial begin
    logic [FW-1:0] ko;
    for (int f = 0; f < N; f++) holds[f] = f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_map(1);
    for (int s = 0; s < 5 * N; s++) begin
      // perform the step in the reference
      if (!skip) begin
        int t;
        t = holds[frame_a];
        holds[frame_a] = holds[frame_b];
        holds[frame_b] = t;
        swaps++;
      end else skips++;
      ko = key_new;
      advance = 1;
      @(negedge clk);
      advance = 0;
      if (wrapped) begin
        wraps++;
        checks++;
        if (key_old !== ko || ptr != 0) begin failures++; $display("key rotation wrong"); end
      end
      check_map(ptr == 0);
    end
    checks++;
    if (wraps != 5 || skips == 0 || swaps == 0) begin
      failures++; $display("wraps %0d skips %0d swaps %0d", wraps, skips, swaps);
    end
    $display("wraps %0d swaps %0d skips %0d", wraps, swaps, skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
