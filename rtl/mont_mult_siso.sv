// mont_mult_siso: serial-in/serial-out systolic Montgomery multiplier over
// GF(2^K) in polynomial basis.
//
// Computes P = C * D * x^{-(K-1)/2} mod F for an odd K and any field
// polynomial F = x^K + f_{K-1} x^{K-1} + ... + f_1 x + f_0 (f_0 = 1).
// The Montgomery factor x^{(K-1)/2} splits D into an upper half, handled by
// the "A" array with multiply-by-x steps (MSB first), and a lower half,
// handled by the "B" array with multiply-by-x^-1 steps (LSB first). Both
// arrays run at the same time on the same operand C and need no data from
// each other; P = A + B at the end.
//
// Structure:
//   mm_ctrl        sequencer (t and z control, operand feed, completion)
//   mm_serializer  x4: C and F, MSB first for A and LSB first for B
//                  (the B array uses f_1 .. f_K with f_K = 1)
//   mm_array       x2: (K+1)/2 PEs each; A's PE i gets d_{K-i}, B's PE i
//                  gets d_{i-1}, and B's last PE gets 0
//   mm_out_sr      x2: SR-A and SR-B
//   mm_gf_add      K XOR gates, P = A ^ B
//
// Interface: pulse start with C, D and F on the inputs while busy = 0; they
// are captured in that cycle. busy is then high for 2K cycles and done
// pulses in the cycle after (2K+1 cycles after start). p holds the product
// from the done cycle until the next operation is K+1 cycles old.
// f carries f_0 .. f_{K-1}; the leading coefficient f_K = 1 is implied.
// A normal product sigma*v mod F is obtained by the usual Montgomery
// domain conversions around this unit.
// All storage is an edge-triggered flip-flop with asynchronous active-low
// reset; the array's latches and tri-state buffers are modelled this way.
// The arrays, output registers and XOR follow the published architecture;
// the serializers, the D register, the controller and the handshake are
// this design's own, because the architecture leaves open where the serial
// streams come from and how an operation is started.
module mont_mult_siso
  import mm_pkg::*;
#(
  parameter int unsigned K = 233
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] c,
  input  logic [K-1:0] d,
  input  logic [K-1:0] f,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] p
);

  localparam int unsigned NPE = mm_num_pe(K);

  logic     load, ser_shift, sr_shift;
  mm_ctrl_t ctrl;

  mm_ctrl #(.K(K)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .busy     (busy),
    .done     (done),
    .load     (load),
    .ser_shift(ser_shift),
    .ctrl     (ctrl),
    .sr_shift (sr_shift)
  );

  // Operand D stays parallel: each PE reads one fixed bit of it.
  logic [K-1:0] d_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    d_q <= '0;
    else if (load) d_q <= d;
  end

  logic [NPE-1:0] d_pe_a, d_pe_b;
  always_comb begin
    for (int i = 1; i <= NPE; i++) begin
      d_pe_a[i-1] = d_q[K-i];
      d_pe_b[i-1] = (i < NPE) ? d_q[i-1] : 1'b0;
    end
  end

  // Serial operand streams.
  logic c_hi, f_hi, c_lo, f_lo;

  mm_serializer #(.K(K), .MSB_FIRST(1'b1)) u_ser_c_a (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(ser_shift), .din(c), .dout(c_hi));
  mm_serializer #(.K(K), .MSB_FIRST(1'b1)) u_ser_f_a (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(ser_shift), .din(f), .dout(f_hi));
  mm_serializer #(.K(K), .MSB_FIRST(1'b0)) u_ser_c_b (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(ser_shift), .din(c), .dout(c_lo));
  mm_serializer #(.K(K), .MSB_FIRST(1'b0)) u_ser_f_b (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(ser_shift),
    .din({1'b1, f[K-1:1]}), .dout(f_lo));

  // The two systolic arrays.
  logic a_bit, a_top, b_bit, b_top;

  mm_array #(.K(K)) u_array_a (
    .clk(clk), .rst_n(rst_n), .c_in(c_hi), .f_in(f_hi), .d_pe(d_pe_a),
    .ctrl_in(ctrl), .bit_out(a_bit), .top_out(a_top));
  mm_array #(.K(K)) u_array_b (
    .clk(clk), .rst_n(rst_n), .c_in(c_lo), .f_in(f_lo), .d_pe(d_pe_b),
    .ctrl_in(ctrl), .bit_out(b_bit), .top_out(b_top));

  // Output shift registers and the final addition.
  logic [K-1:0] a_word, b_word;

  mm_out_sr #(.K(K), .MSB_FIRST(1'b1)) u_sr_a (
    .clk(clk), .rst_n(rst_n), .shift_en(sr_shift), .bit_in(a_bit), .end_bit(a_top),
    .word(a_word));
  mm_out_sr #(.K(K), .MSB_FIRST(1'b0)) u_sr_b (
    .clk(clk), .rst_n(rst_n), .shift_en(sr_shift), .bit_in(b_bit), .end_bit(b_top),
    .word(b_word));

  mm_gf_add #(.K(K)) u_add (.a(a_word), .b(b_word), .p(p));

endmodule
