// swl_swap_engine: performs one random block swap at a time through a bank's array port.
//
// A swap step of a bank (see swl_bank_remap) exchanges the blocks in frames A = p ^ k_old
// and B = p ^ k_new: read A, read B, write A's block into B, write B's block into A, then
// advance the bank's pointer. That is two reads and two writes per swap, as the document
// counts them. A step whose pair was already exchanged (`skip`) only advances the pointer.
// While the engine is busy the chip refuses (nacks) host requests, which makes the pointer
// update and the block moves atomic as seen from outside.
// The array port is a request/ready handshake (`mem_valid` held until `mem_ready`) with
// read data returned later on `mem_rvalid`, in order. The engine must only be started when
// no host read is outstanding on the bank, so every `mem_rvalid` it sees is its own.
// Interface: `start` with `start_bank` begins a swap when `busy` is low; `bank` names the
// bank being swapped, whose `frame_a`, `frame_b` and `skip` the caller must feed back.
// `advance` and `done` pulse together in the last cycle; `skipped` marks a skip step.
// Timing: a skipped step takes 2 cycles; a full swap 5 cycles plus the array's latencies.
module swl_swap_engine
  import swl_pkg::*;
#(
  parameter int unsigned P_FRAME_W = FRAME_W,
  parameter int unsigned P_DATA_W  = DATA_W,
  parameter int unsigned NBANKS    = BANKS_PER_REGION,
  localparam int unsigned B_W = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [B_W-1:0]       start_bank,
  output logic                 busy,
  output logic [B_W-1:0]       bank,
  input  logic [P_FRAME_W-1:0] frame_a,
  input  logic [P_FRAME_W-1:0] frame_b,
  input  logic                 skip,
  output logic                 advance,
  output logic                 done,
  output logic                 skipped,
  // array port of the bank being swapped
  output logic                 mem_valid,
  output logic                 mem_we,
  output logic [P_FRAME_W-1:0] mem_frame,
  output logic [P_DATA_W-1:0]  mem_wdata,
  input  logic                 mem_ready,
  input  logic                 mem_rvalid,
  input  logic [P_DATA_W-1:0]  mem_rdata
);

  swap_state_e          state_q;
  logic [P_DATA_W-1:0]  data_a_q, data_b_q;
  logic                 skip_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= SW_IDLE;
      bank     <= '0;
      data_a_q <= '0;
      data_b_q <= '0;
      skip_q   <= 1'b0;
    end else begin
      unique case (state_q)
        SW_IDLE:   if (start) begin
                     bank    <= start_bank;
                     state_q <= SW_RD_A;
                   end
        SW_RD_A:   if (skip) begin
                     skip_q  <= 1'b1;
                     state_q <= SW_ADV;
                   end else if (mem_ready) begin
                     skip_q  <= 1'b0;
                     state_q <= SW_WAIT_A;
                   end
        SW_WAIT_A: if (mem_rvalid) begin
                     data_a_q <= mem_rdata;
                     state_q  <= SW_RD_B;
                   end
        SW_RD_B:   if (mem_ready) state_q <= SW_WAIT_B;
        SW_WAIT_B: if (mem_rvalid) begin
                     data_b_q <= mem_rdata;
                     state_q  <= SW_WR_A;
                   end
        SW_WR_A:   if (mem_ready) state_q <= SW_WR_B;
        SW_WR_B:   if (mem_ready) state_q <= SW_ADV;
        SW_ADV:    state_q <= SW_IDLE;
        default:   state_q <= SW_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_valid = 1'b0;
    mem_we    = 1'b0;
    mem_frame = frame_a;
    mem_wdata = data_a_q;
    unique case (state_q)
      SW_RD_A: mem_valid = !skip;
      SW_RD_B: begin mem_valid = 1'b1; mem_frame = frame_b; end
      SW_WR_A: begin mem_valid = 1'b1; mem_we = 1'b1; mem_frame = frame_b; mem_wdata = data_a_q; end
      SW_WR_B: begin mem_valid = 1'b1; mem_we = 1'b1; mem_frame = frame_a; mem_wdata = data_b_q; end
      default: ;
    endcase
  end

  assign busy    = (state_q != SW_IDLE);
  assign advance = (state_q == SW_ADV);
  assign done    = advance;
  assign skipped = advance && skip_q;

endmodule
