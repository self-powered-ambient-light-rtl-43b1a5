// result_sync: carries the ADC code from the on-chip clock domain to the bus
// clock domain.
//
// The bus block runs only on the clock the main device supplies, which is
// unrelated to the slow on-chip oscillator that paces the ADC and stops between
// messages, so the code crosses clock domains. The source side captures each
// finished code into a hold register and advances a Gray-coded sequence number
// (one bit changes per code, so it can pass through two flip-flops safely).
// The bus side samples the hold register on every edge and keeps a copy of the
// sample taken at edge e only if the sequence number read at edges e-1 and e+1
// is the same, i.e. no code changed around the moment of sampling. This
// refreshes the copy on every quiet edge, so even after the bus clock has been
// stopped over many conversions the newest code appears, and a half-written
// code is never taken (unless a whole multiple of 2^SEQ_W codes passed between
// two bus edges and the last one landed on the edge itself).
// While a message is being sent (hold_i high) the copy is frozen, so a payload
// never mixes two codes.
// Timing: a new code reaches code_o at the fourth rising bus-clock edge after
// it is written, provided hold_i is low. new_o marks the edge that copies a
// code with a new sequence number.
// The document does not describe this crossing; the scheme is this design's.
`timescale 1ns/1ps
module result_sync #(
  parameter int unsigned W     = 8,
  parameter int unsigned SEQ_W = 4
) (
  // on-chip clock domain
  input  logic         src_clk,
  input  logic         rst_n,
  input  logic         src_valid,
  input  logic [W-1:0] src_code,
  // bus clock domain
  input  logic         dst_clk,
  input  logic         hold_i,
  output logic [W-1:0] code_o,
  output logic         new_o
);

  logic [W-1:0]     hold_q;
  logic [SEQ_W-1:0] bin_q, gray_q;

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q <= '0;
      bin_q  <= '0;
      gray_q <= '0;
    end else if (src_valid) begin
      hold_q <= src_code;
      bin_q  <= bin_q + 1'b1;
      gray_q <= (bin_q + 1'b1) ^ ((bin_q + 1'b1) >> 1);
    end
  end

  // s1..s3: sequence sampled at the last three edges; c1, c2: hold register
  // sampled at the last two edges.
  logic [SEQ_W-1:0] s1_q, s2_q, s3_q, seen_q;
  logic [W-1:0]     c1_q, c2_q;
  logic             quiet;

  assign quiet = (s1_q == s3_q) && !hold_i;
  assign new_o = quiet && (s1_q != seen_q);

  always_ff @(posedge dst_clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q   <= '0;
      s2_q   <= '0;
      s3_q   <= '0;
      seen_q <= '0;
      c1_q   <= '0;
      c2_q   <= '0;
      code_o <= '0;
    end else begin
      s1_q <= gray_q;
      s2_q <= s1_q;
      s3_q <= s2_q;
      c1_q <= hold_q;
      c2_q <= c1_q;
      if (quiet) begin
        code_o <= c2_q;
        seen_q <= s1_q;
      end
    end
  end

endmodule
