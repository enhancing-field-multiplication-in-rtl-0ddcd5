// mm_pe: one processing element of the bit-serial systolic Montgomery
// multiplier (the cell of both the A array and the B array; the two cells
// have the same gates and differ only in which operand bits are fed in).
//
// Each cycle the PE produces one coefficient bit of the next partial
// product, with AND-XOR logic:
//   s = (d & c) ^ (f & top) ^ (z & prev)
// For the A array (x*A mod F, MSB first) this is
//   a^i_{k-1-j} = a^{i-1}_{k-2-j} ^ a^{i-1}_{k-1} f_{k-1-j} ^ d_{k-i} c_{k-1-j}
// and for the B array (x^-1*B mod F, LSB first)
//   b^i_j = b^{i-1}_{j+1} ^ b^{i-1}_0 f_{j+1} ^ d_{i-1} c_j.
// Here "top" is the bit of the previous partial product that decides the
// reduction (a_{k-1} or b_0); it is held constant by the previous PE.
//
// Registers (one flip-flop per D-latch of the cell drawing):
//   c_out, f_out : two-stage delay of the serial c and f streams (D_c D_c),
//                  so the next PE, which starts two cycles later, sees the
//                  same bit order.
//   bit_out      : D_a, the serial partial-product bit, one cycle after s.
//   top_out      : the hold register behind the tri-state buffer T; it
//                  loads s on the clock edge that ends the cycle with
//                  t = 1 (bit position j = 0), and keeps it for the rest of
//                  the pass. Modelling T as a load enable of an edge
//                  triggered register is this design's choice.
// z is active low: z = 0 forces the shifted-in bit to zero at j = k-1.
// Reset (asynchronous, active low) clears every register, as the design
// requires all storage to be cleared before the first operation.
module mm_pe (
  input  logic clk,
  input  logic rst_n,
  input  logic c_in,     // serial operand C bit
  input  logic f_in,     // serial field polynomial bit
  input  logic d_in,     // this PE's (static) operand D bit
  input  logic top_in,   // held reduction bit of the previous partial product
  input  logic prev_in,  // serial bit of the previous partial product
  input  logic t_in,     // capture strobe for top_out
  input  logic z_in,     // active-low mask of prev_in
  output logic c_out,
  output logic f_out,
  output logic bit_out,
  output logic top_out
);

  logic       s;
  logic [1:0] c_dly, f_dly;

  always_comb s = (d_in & c_in) ^ (f_in & top_in) ^ (z_in & prev_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_dly   <= '0;
      f_dly   <= '0;
      bit_out <= 1'b0;
      top_out <= 1'b0;
    end else begin
      c_dly   <= {c_dly[0], c_in};
      f_dly   <= {f_dly[0], f_in};
      bit_out <= s;
      if (t_in) top_out <= s;
    end
  end

  assign c_out = c_dly[1];
  assign f_out = f_dly[1];

endmodule
