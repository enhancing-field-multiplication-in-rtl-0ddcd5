// mm_array: one linear systolic array of (K+1)/2 processing elements.
//
// The multiplier uses two of these: the upper array computes
//   A = C*(d_{k-1} x^{(k-1)/2} + ... + d_{(k+1)/2} x + d_{(k-1)/2}) mod F
// by (k+1)/2 steps of A_i = x*A_{i-1} mod F + C*d_{k-i}, bits MSB first;
// the lower array computes
//   B = C*(d_0 x^{-(k-1)/2} + ... + d_{(k-3)/2} x^{-1}) mod F
// by (k+1)/2 steps of B_i = x^-1*B_{i-1} mod F + C*d_{i-1}, bits LSB first,
// with the last PE's d tied to 0 by the caller.
//
// PE i handles step i; it processes bit position j in cycle 2(i-1)+j
// (schedule t = 2i + j with projection onto i). Accordingly:
//   * the serial c and f streams pass through two registers per PE;
//   * the serial partial-product bit passes through one register (D_a), so
//     PE i reads bit j+1 of the previous step while it works on bit j;
//   * the control word {t, z} passes through two registers (D_t D_t) per PE;
//   * PE 1 reads an all-zero previous partial product (A_0 = B_0 = 0).
//
// Interface: c_in/f_in carry one operand bit per cycle starting in the
// cycle in which ctrl_in.t = 1; d_pe[i-1] is PE i's D bit and must be held
// for the whole operation. bit_out is the last PE's D_a register: result
// bit j appears in cycle K+j, counted from the cycle with ctrl_in.t = 1.
// top_out is the last PE's hold register, which carries the first result
// bit (a_{k-1} or b_0) from cycle K on.
//
// The chain, its schedule and the two D_t stages per PE on t follow the
// published architecture. Sending z through the same two stages (the
// drawing shows delay stages on t only) is this design's choice; it gives
// every PE its z pulse exactly on its last bit.
module mm_array
  import mm_pkg::*;
#(
  parameter int unsigned K = 233
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             c_in,
  input  logic                             f_in,
  input  logic [mm_num_pe(K)-1:0]          d_pe,
  input  mm_ctrl_t                         ctrl_in,
  output logic                             bit_out,
  output logic                             top_out
);

  localparam int unsigned NPE = mm_num_pe(K);

  initial begin
    if (K < 3 || (K % 2) == 0)
      $fatal(1, "mm_array: K must be odd and at least 3 (K=%0d)", K);
  end

  logic     [NPE:0] c_l, f_l, bit_l, top_l;
  mm_ctrl_t [NPE:0] ctrl_l;

  // PE 1 sees the operand streams and a zero previous partial product.
  assign c_l[0]    = c_in;
  assign f_l[0]    = f_in;
  assign bit_l[0]  = 1'b0;
  assign top_l[0]  = 1'b0;
  assign ctrl_l[0] = ctrl_in;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    mm_pe u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .c_in   (c_l[i]),
      .f_in   (f_l[i]),
      .d_in   (d_pe[i]),
      .top_in (top_l[i]),
      .prev_in(bit_l[i]),
      .t_in   (ctrl_l[i].t),
      .z_in   (ctrl_l[i].z),
      .c_out  (c_l[i+1]),
      .f_out  (f_l[i+1]),
      .bit_out(bit_l[i+1]),
      .top_out(top_l[i+1])
    );

    // D_t D_t: two-cycle delay of the control word towards the next PE.
    mm_ctrl_t [1:0] ctrl_dly;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ctrl_dly <= {MM_CTRL_IDLE, MM_CTRL_IDLE};
      else        ctrl_dly <= {ctrl_dly[0], ctrl_l[i]};
    end
    assign ctrl_l[i+1] = ctrl_dly[1];
  end

  assign bit_out = bit_l[NPE];
  assign top_out = top_l[NPE];

endmodule
