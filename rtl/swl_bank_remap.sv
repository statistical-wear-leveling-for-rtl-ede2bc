// swl_bank_remap: address-to-frame mapping of one bank, randomized one block swap at a time.
//
// A bank holds 2^FRAME_W blocks. Block a lives in frame a ^ key, with two keys: the old key
// of the previous round and the new key of the current round. A running pointer sweeps the
// block addresses; a swap step at pointer p exchanges the contents of frames p ^ k_old and
// p ^ k_new. The block displaced from p ^ k_new is p's partner q = p ^ k_old ^ k_new, which
// thereby also moves to its new-key frame. So block a uses the new key when a or its
// partner is below the pointer, else the old key. If the partner is below the pointer the
// pair was already exchanged and the step is skipped (`skip`). When the pointer wraps, the
// new key becomes the old one and a fresh key is drawn from the bank's own LFSR, which runs
// freely every cycle (FRAME_W may be at most 32). After reset the new key is the low bits
// of SEED.
// XOR mapping keeps the blocks of a row together: the high key bits select the row the row
// goes to and the low ROW_BLK_W bits permute the blocks inside it, so the same key
// randomizes rows and the blocks within rows.
// The document gives the pointer, the two keys, the XOR, the incrementer and the key renewal
// on wrap (these follow the one-level scheme it builds on). The partner rule above, the
// initial identity mapping (old key 0 after reset) and the LFSR key source are this design's
// own completion of that description.
// Interface: `lookup_addr` -> `lookup_frame` is combinational. `frame_a`/`frame_b`/`skip`
// describe the next swap step; `advance` (one cycle) finishes it and moves the pointer.
module swl_bank_remap
  import swl_pkg::*;
#(
  parameter int unsigned P_FRAME_W   = FRAME_W,
  parameter int unsigned P_ROW_BLK_W = ROW_BLK_W,
  parameter logic [31:0] SEED        = 32'h5EED_0001
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P_FRAME_W-1:0] lookup_addr,
  output logic [P_FRAME_W-1:0] lookup_frame,
  output logic [P_FRAME_W-1:0] ptr,
  output logic [P_FRAME_W-1:0] frame_a,
  output logic [P_FRAME_W-1:0] frame_b,
  output logic                 skip,
  input  logic                 advance,
  output logic                 wrapped,
  output logic [P_FRAME_W-1:0] key_old,
  output logic [P_FRAME_W-1:0] key_new
);

  localparam int unsigned ROW_W = P_FRAME_W - P_ROW_BLK_W;

  logic [31:0] rnd;

  swl_lfsr #(.W(32), .SEED(SEED)) u_keygen (.clk, .rst_n, .en(1'b1), .value(rnd));

  // key split into row part and block-in-row part
  typedef struct packed {
    logic [ROW_W-1:0]       row;
    logic [P_ROW_BLK_W-1:0] blk;
  } key_t;

  function automatic logic [P_FRAME_W-1:0] apply_key(logic [P_FRAME_W-1:0] a, key_t k);
    return {a[P_FRAME_W-1 -: ROW_W] ^ k.row, a[P_ROW_BLK_W-1:0] ^ k.blk};
  endfunction

  key_t k_old, k_new;
  logic [P_FRAME_W-1:0] partner_lookup, partner_ptr;
  logic                 use_new;

  assign partner_lookup = lookup_addr ^ k_old ^ k_new;
  assign use_new        = (lookup_addr < ptr) || (partner_lookup < ptr);
  assign lookup_frame   = apply_key(lookup_addr, use_new ? k_new : k_old);

  assign partner_ptr = ptr ^ k_old ^ k_new;
  assign skip        = (partner_ptr < ptr) || (k_old == k_new);
  assign frame_a     = apply_key(ptr, k_old);
  assign frame_b     = apply_key(ptr, k_new);
  assign key_old     = k_old;
  assign key_new     = k_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr     <= '0;
      k_old   <= '0;
      k_new   <= key_t'(P_FRAME_W'(SEED));
      wrapped <= 1'b0;
    end else begin
      wrapped <= 1'b0;
      if (advance) begin
        ptr <= ptr + P_FRAME_W'(1);
        if (ptr == '1) begin
          k_old   <= k_new;
          k_new   <= key_t'(rnd[P_FRAME_W-1:0]);
          wrapped <= 1'b1;
        end
      end
    end
  end

endmodule
