// pcm_bank_model: behavioural model of one PCM bank array, for simulation only.
//
// The array is not part of the wear-leveling logic; this model only gives the testbenches a
// bank to talk to. It stores 2^FRAME_W blocks of DATA_W bits sparsely. A frame that was
// never written reads as init_word(BANK_ID, frame), so a testbench can predict the content
// of every block without writing it first. Port: `valid`/`ready` request handshake; after
// an accepted read the block returns on `rvalid`/`rdata` RD_LAT cycles later; after an
// accepted write the bank is not ready for WR_LAT cycles. Requests are served one at a time,
// so read data comes back in order. The model counts the writes each frame has taken
// (its wear) and reports the largest count on `max_wear`.
module pcm_bank_model #(
  parameter int unsigned FRAME_W = 20,
  parameter int unsigned DATA_W  = 512,
  parameter int unsigned RD_LAT  = 2,
  parameter int unsigned WR_LAT  = 2,
  parameter int unsigned BANK_ID = 0
) (
  input  logic               clk,
  input  logic               valid,
  input  logic               we,
  input  logic [FRAME_W-1:0] frame,
  input  logic [DATA_W-1:0]  wdata,
  output logic               ready,
  output logic               rvalid,
  output logic [DATA_W-1:0]  rdata,
  output int unsigned        max_wear,
  output longint unsigned    writes
);

  logic [DATA_W-1:0] store [logic [FRAME_W-1:0]];
  int unsigned       wear  [logic [FRAME_W-1:0]];
  int unsigned       wait_cnt = 0;
  bit                rd_pend  = 0;
  logic [DATA_W-1:0] rd_word  = '0;

  function automatic logic [DATA_W-1:0] init_word(int unsigned bank, logic [FRAME_W-1:0] f);
    logic [DATA_W-1:0] w;
    for (int i = 0; i < DATA_W; i += 32) w[i +: 32] = (bank << 24) ^ 32'(f) ^ (32'(i) << 16) ^ 32'hA5A5_0000;
    return w;
  endfunction

  initial begin
    ready    = 1'b1;
    rvalid   = 1'b0;
    rdata    = '0;
    max_wear = 0;
    writes   = 0;
  end

  always @(posedge clk) begin
    rvalid <= 1'b0;
    if (wait_cnt != 0) begin
      wait_cnt = wait_cnt - 1;
      if (wait_cnt == 0) begin
        if (rd_pend) begin
          rvalid  <= 1'b1;
          rdata   <= rd_word;
          rd_pend  = 0;
        end
        ready <= 1'b1;
      end
    end else if (valid && ready) begin
      if (we) begin
        store[frame] = wdata;
        if (wear.exists(frame)) wear[frame] = wear[frame] + 1;
        else wear[frame] = 1;
        if (wear[frame] > max_wear) max_wear <= wear[frame];
        writes   <= writes + 1;
        wait_cnt  = WR_LAT;
      end else begin
        rd_word  = store.exists(frame) ? store[frame] : init_word(BANK_ID, frame);
        rd_pend  = 1;
        wait_cnt = RD_LAT;
      end
      ready <= 1'b0;
    end
  end

endmodule
