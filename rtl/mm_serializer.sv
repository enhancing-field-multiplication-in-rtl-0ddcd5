// mm_serializer: parallel-in/serial-out register that feeds one operand
// stream (C or the field polynomial F) into PE 1 of a systolic array.
//
// load = 1 captures din; every cycle with shift = 1 moves the next bit to
// dout. MSB_FIRST = 1 presents din[K-1], din[K-2], ... (the A array's
// order); MSB_FIRST = 0 presents din[0], din[1], ... (the B array's order).
// dout shows the first bit in the cycle after load. The register rotates,
// so after K shifts it holds the loaded word again and the stream goes on
// repeating it: the bits that follow an operand are therefore not zero, and
// the arrays rely on their z control, not on a zero fill, to ignore them.
// Reset (asynchronous, active low) clears the register.
module mm_serializer #(
  parameter int unsigned K         = 233,
  parameter bit          MSB_FIRST = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [K-1:0] din,
  output logic         dout
);

  logic [K-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (load)  r <= din;
    else if (shift) r <= MSB_FIRST ? {r[K-2:0], r[K-1]} : {r[0], r[K-1:1]};
  end

  assign dout = MSB_FIRST ? r[K-1] : r[0];

endmodule
