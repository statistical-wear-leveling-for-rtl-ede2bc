// swl_divider: serial restoring divider for unsigned W-bit operands.
//
// Used once per population to turn the region's sample count and total distance into a
// swap batch size (a division that the document's equation for sampleSwapThreshold
// implies but does not detail). One quotient bit is produced per cycle: `start` loads the
// operands, `busy` is high for W cycles, then `done` pulses for one cycle with `quo` and
// `rem` valid until the next `start`. A zero divisor yields an all-ones quotient.
// The serial form is this design's choice: the division is needed once every 2^20 writes.
module swl_divider #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo,
  output logic [W-1:0] rem
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  d_q;
  logic [W:0]    r_q;      // partial remainder, one bit wider
  logic [W-1:0]  q_q;      // dividend shifting out, quotient shifting in
  logic [CW-1:0] cnt_q;

  logic [W:0] shifted, diff;
  assign shifted = {r_q[W-1:0], q_q[W-1]};
  assign diff    = shifted - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q   <= '0;
      r_q   <= '0;
      q_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d_q   <= den;
        r_q   <= '0;
        q_q   <= num;
        cnt_q <= CW'(W);
        busy  <= 1'b1;
      end else if (busy) begin
        if (!diff[W]) begin
          r_q <= diff;
          q_q <= {q_q[W-2:0], 1'b1};
        end else begin
          r_q <= shifted;
          q_q <= {q_q[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - CW'(1);
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = q_q;
  assign rem = r_q[W-1:0];

endmodule
