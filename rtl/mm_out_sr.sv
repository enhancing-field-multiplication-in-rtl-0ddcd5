// mm_out_sr: output shift register of one systolic array (SR-A or SR-B).
//
// The last PE of an array delivers the final partial product one bit per
// cycle. Its first bit (a_{k-1} for A, b_0 for B) is kept in the last PE's
// hold register and enters here as end_bit; the remaining K-1 bits arrive
// on bit_in and are shifted in while shift_en = 1. Keeping the first bit
// out of the shift register keeps the word in order.
//   MSB_FIRST = 1 (SR-A): bits arrive a_{k-2}, ..., a_0;
//                         word = {end_bit, a_{k-2}, ..., a_0}.
//   MSB_FIRST = 0 (SR-B): bits arrive b_1, ..., b_{k-1};
//                         word = {b_{k-1}, ..., b_1, end_bit}.
// word is complete after K-1 shifts and holds while shift_en = 0.
// Reset (asynchronous, active low) clears the register.
// SR-A, SR-B and the separate end latch follow the published architecture;
// the shift enable that freezes the result after a pass is this design's.
module mm_out_sr #(
  parameter int unsigned K         = 233,
  parameter bit          MSB_FIRST = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         bit_in,
  input  logic         end_bit,
  output logic [K-1:0] word
);

  logic [K-2:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (shift_en) sr <= MSB_FIRST ? {sr[K-3:0], bit_in} : {bit_in, sr[K-2:1]};
  end

  assign word = MSB_FIRST ? {end_bit, sr} : {sr, end_bit};

endmodule
