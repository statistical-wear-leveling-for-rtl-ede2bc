// tb_swl_sample_buffer: compares the sample buffer, write by write, with a reference model
// kept as a SystemVerilog queue of {tag, distance} in age order. The stimulus runs in three
// phases so that overwrites (small tag pool), cut-offs (large pool, few samples) and
// overflows (large pool, many samples) all occur; a directed start checks exact distances.
// CUTOFF and EPSILON are reduced so that cut-offs happen within a short run; the depth is the
// document's 13 entries.
module tb_swl_sample_buffer;
  localparam int DEPTH = 13, TW = 43, CUT = 64, EPS = 8;
  localparam int DIST_W = $clog2(CUT + 1), SUM_W = DIST_W + 2;

  logic clk = 0, rst_n = 1, wr = 0, sample = 0;
  logic [TW-1:0] tag = '0;
  logic comp_valid, ev_overwrite, ev_cutoff, ev_overflow;
  logic [1:0] comp_n;
  logic [SUM_W-1:0] comp_sum;
  logic [$clog2(DEPTH+1)-1:0] occupancy;
  int checks = 0, failures = 0;
  int n_ow = 0, n_cut = 0, n_ovf = 0;

  swl_sample_buffer #(.DEPTH(DEPTH), .P_TAG_W(TW), .P_CUTOFF(CUT), .P_EPSILON(EPS)) dut (
    .clk, .rst_n, .wr, .tag, .sample, .comp_valid, .comp_n, .comp_sum,
    .ev_overwrite, .ev_cutoff, .ev_overflow, .occupancy);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [TW-1:0] t; int d; } ent_t;
  ent_t q[$];

  function automatic int adj(int d);
    return (d > EPS) ? d - EPS : 1;
  endfunction

  // one write: drive, let the reference model predict, check one cycle later
  task automatic do_write(logic [TW-1:0] t, bit s);
    int en = 0, es = 0;
    bit eo = 0, ec = 0, ef = 0;
    ent_t nq[$];
    foreach (q[i]) begin
      if (q[i].t == t) begin en++; es += adj(q[i].d); eo = 1; end
      else if (q[i].d + 1 >= CUT) begin en++; es += adj(CUT); ec = 1; end
      else nq.push_back('{q[i].t, q[i].d + 1});
    end
    if (s) begin
      if (nq.size() == DEPTH) begin
        en++; es += adj(nq[0].d); ef = 1;
        void'(nq.pop_front());
      end
      nq.push_back('{t, 0});
    end
    q = nq;
    @(negedge clk);
    wr = 1; tag = t; sample = s;
    @(negedge clk);
    wr = 0; sample = 0;
    checks++;
    if (comp_valid !== (en != 0) || (en != 0 && (comp_n !== 2'(en) || comp_sum !== SUM_W'(es)))
        || ev_overwrite !== eo || ev_cutoff !== ec || ev_overflow !== ef
        || occupancy != q.size()) begin
      failures++;
      if (failures < 10)
        $display("tag %0d s %0d: got v%0d n%0d sum%0d o%0d c%0d f%0d occ%0d; expected n%0d sum%0d o%0d c%0d f%0d occ%0d",
                 t, s, comp_valid, comp_n, comp_sum, ev_overwrite, ev_cutoff, ev_overflow, occupancy,
                 en, es, eo, ec, ef, q.size());
    end
    n_ow += eo; n_cut += ec; n_ovf += ef;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: sample tag 5, 3 other writes, then overwrite 5: distance 3 -> adjusted 1
    do_write(5, 1);
    for (int i = 0; i < 3; i++) do_write(100 + i, 0);
    do_write(5, 0);
    checks++; if (comp_sum !== SUM_W'(1)) begin failures++; $display("short distance not lifted to 1"); end
    // directed: sample tag 7 and let it run into the cut-off
    do_write(7, 1);
    for (int i = 0; i < CUT; i++) do_write(1000 + i, 0);
    // random phases
    for (int i = 0; i < 20000; i++) begin
      int ph;
      logic [TW-1:0] t;
      bit s;
      ph = (i / 2000) % 3;
      case (ph)
        0: begin t = TW'($urandom_range(15)); s = ($urandom_range(3) == 0); end
        1: begin t = {$urandom, $urandom}; s = ($urandom_range(99) == 0); end
        default: begin t = TW'($urandom_range(200)); s = ($urandom_range(1) == 0); end
      endcase
      do_write(t, s);
      if ($urandom_range(7) == 0) @(negedge clk);  // idle cycle
    end
    checks++;
    if (n_ow == 0 || n_cut == 0 || n_ovf == 0) begin
      failures++; $display("missing event kinds: ow %0d cut %0d ovf %0d", n_ow, n_cut, n_ovf);
    end
    $display("overwrites %0d cutoffs %0d overflows %0d", n_ow, n_cut, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
