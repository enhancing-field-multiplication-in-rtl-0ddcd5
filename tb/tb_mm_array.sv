// tb_mm_array: self-checking testbench of the systolic array.
// Two arrays (K = 11) run side by side, wired as the A array (MSB first,
// multiply by x) and as the B array (LSB first, multiply by x^-1, last PE
// d = 0). Their serial outputs are compared, bit by bit and cycle by cycle,
// with word-level references:
//   A = C * (d_{k-1} x^h + ... + d_h) mod F
//   B = C * (d_{h-1} x^{h-1} + ... + d_0) * x^-h mod F,   h = (k-1)/2.
// Result bit j must appear on bit_out exactly in cycle K+j after the t
// pulse, and the first bit on top_out from cycle K on.
module tb_mm_array;
  import mm_pkg::*;
  import mm_ref_pkg::*;

  localparam int K   = 11;
  localparam int H   = (K - 1) / 2;
  localparam int NPE = (K + 1) / 2;
  localparam int OPS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           ca, fa, cb, fb;
  logic [NPE-1:0] dpa, dpb;
  mm_ctrl_t       ctrl;
  logic           a_bit, a_top, b_bit, b_top;
  int             checks = 0, failures = 0;

  mm_array #(.K(K)) u_a (.clk, .rst_n, .c_in(ca), .f_in(fa), .d_pe(dpa), .ctrl_in(ctrl),
                         .bit_out(a_bit), .top_out(a_top));
  mm_array #(.K(K)) u_b (.clk, .rst_n, .c_in(cb), .f_in(fb), .d_pe(dpb), .ctrl_in(ctrl),
                         .bit_out(b_bit), .top_out(b_top));

  initial begin
    repeat (OPS * 3 * K + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // F = x^11 + x^2 + 1 (irreducible trinomial) for most runs; random odd
  // polynomials (f_0 = 1) for others, since the arrays do not need F to be
  // irreducible for the reduction identity to hold.
  poly_t fk, c, d, dhi, dlo, ea, eb;

  initial begin
    ca = 0; fa = 0; cb = 0; fb = 0; dpa = '0; dpb = '0; ctrl = MM_CTRL_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < OPS; op++) begin
      if (op % 3 == 0) fk = (poly_t'(1) << K) | poly_t'(32'h5);
      else             fk = (poly_t'(1) << K) | rand_elem(K) | poly_t'(1);
      c = rand_elem(K);
      d = rand_elem(K);
      if (op == 0) begin c = (poly_t'(1) << K) - 1; d = c; end
      dhi = d >> H;
      dlo = d & ((poly_t'(1) << H) - 1);
      ea  = mulmod(c, dhi, fk, K);
      eb  = divx(mulmod(c, dlo, fk, K), fk, H);
      for (int i = 1; i <= NPE; i++) begin
        dpa[i-1] = d[K-i];
        dpb[i-1] = (i < NPE) ? d[i-1] : 1'b0;
      end
      for (int n = 0; n < 2 * K + 1; n++) begin
        // Outputs of cycle n (sampled before new inputs are applied).
        if (n >= K && n < 2 * K) begin
          check("A serial bit", a_bit, ea[K-1-(n-K)]);
          check("B serial bit", b_bit, eb[n-K]);
          check("A held msb",   a_top, ea[K-1]);
          check("B held lsb",   b_top, eb[0]);
        end
        ctrl.t = (n == 0);
        ctrl.z = (n != K - 1);
        // Past the operand the streams carry random bits, which the z
        // control must keep out of the result.
        ca = (n < K) ? c[K-1-n] : 1'($urandom);
        fa = (n < K) ? fk[K-1-n] : 1'($urandom);
        cb = (n < K) ? c[n] : 1'($urandom);
        fb = (n < K) ? fk[n+1] : 1'($urandom);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
