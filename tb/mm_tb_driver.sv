// mm_tb_driver: drives one mont_mult_siso of size K through OPS random
// Montgomery multiplications and checks each against the word-level
// reference (mm_ref_pkg::mont), including the exact start-to-done latency
// of 2K+1 cycles. Every fourth operation is followed by a second pass with
// the inputs (P, 1), and U = sigma * v mod F is checked for operands
// brought into the Montgomery domain by the testbench. With EXHAUSTIVE = 1
// all 2^K x 2^K operand pairs are run instead of random ones.
// It also counts how often the operations exercised the design's
// mechanisms: a reduction by F in each array, a held first bit of 1, a
// z mask that has to clear a 1, and a start raised while busy (which must
// be ignored).
module mm_tb_driver
  import mm_ref_pkg::*;
#(
  parameter int       K          = 5,
  parameter bit [255:0] FLOW     = 256'h5,  // f_0 .. f_{K-1}
  parameter int       OPS        = 100,
  parameter bit       EXHAUSTIVE = 1'b0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_red_a,
  output int   n_red_b,
  output int   n_hold,
  output int   n_zmask,
  output int   n_ignored,
  output logic finished
);

  localparam int H   = (K - 1) / 2;
  localparam int NPE = (K + 1) / 2;

  logic         rst_n, start, busy, done;
  logic [K-1:0] c, d, f, p;

  mont_mult_siso #(.K(K)) u_dut (.clk, .rst_n, .start, .c, .d, .f, .busy, .done, .p);

  poly_t fk;
  assign fk = (poly_t'(1) << K) | (FLOW & ((poly_t'(1) << K) - 1));

  // Count which mechanisms an operation needs, from its operands:
  //   reduction: a partial product A_{i-1} with a_{k-1} = 1 (or B_{i-1}
  //              with b_0 = 1) before a later step, so F is added;
  //   t capture: the held first bit of the final A or B is 1;
  //   z mask:    c_{k-1} d_{k-1} = 1 (or c_0 d_0 = 1); PE 1 then produces a
  //              1 from the rotated operand stream right after the operand,
  //              which PE 2 must mask on its last bit.
  task automatic count_mech(poly_t ci, poly_t di);
    poly_t ap, bp;
    ap = '0; bp = '0;
    for (int i = 1; i <= NPE; i++) begin
      if (ap[K-1]) n_red_a++;
      if (bp[0])   n_red_b++;
      ap = mulx(ap, fk, K, 1) ^ (di[K-i] ? ci : poly_t'(0));
      bp = divx(bp, fk, 1) ^ ((i < NPE && di[i-1]) ? ci : poly_t'(0));
    end
    if (ap[K-1] || bp[0]) n_hold++;
    if (ci[K-1] && di[K-1]) n_zmask++;
    if (ci[0] && di[0])     n_zmask++;
  endtask

  task automatic check(string what, poly_t got, poly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL K=%0d %s: got %h expected %h", K, what, got, exp);
    end
  endtask

  // One multiplication: returns P, checks the latency.
  task automatic run(input poly_t ci, input poly_t di, output poly_t po);
    int lat;
    @(negedge clk);
    c = K'(ci); d = K'(di); f = K'(fk);
    checks++;
    if (busy) begin failures++; $display("FAIL K=%0d busy before start", K); end
    start = 1'b1;
    @(negedge clk);
    c = ~c; d = ~d; f = ~f;  // inputs are only needed in the start cycle
    lat = 1;
    start = 1'b0;
    count_mech(ci, di);
    while (!done) begin
      start = ($urandom % 8 == 0);
      if (start) n_ignored++;
      @(negedge clk);
      lat++;
    end
    start = 1'b0;
    checks++;
    if (lat != 2 * K + 1) begin
      failures++;
      $display("FAIL K=%0d latency %0d, expected %0d", K, lat, 2 * K + 1);
    end
    po = poly_t'(p);
  endtask

  initial begin
    poly_t ci, di, pr, ur, sg, vv;
    {checks, failures, n_red_a, n_red_b, n_hold, n_zmask, n_ignored} = '0;
    finished = 1'b0;
    rst_n = 1'b0; start = 1'b0; c = '0; d = '0; f = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (p !== '0 || busy || done) begin failures++; $display("FAIL K=%0d reset", K); end
    rst_n = 1'b1;
    if (EXHAUSTIVE) begin
      for (int x = 0; x < (1 << K); x++)
        for (int y = 0; y < (1 << K); y++) begin
          run(poly_t'(x), poly_t'(y), pr);
          check("exhaustive P", pr, mont(poly_t'(x), poly_t'(y), fk, K));
        end
    end else begin
      for (int n = 0; n < OPS; n++) begin
        ci = rand_elem(K);
        di = rand_elem(K);
        if (n == 0) begin ci = (poly_t'(1) << K) - 1; di = ci; end
        run(ci, di, pr);
        check("P", pr, mont(ci, di, fk, K));
        if (n % 4 == 0) begin
          // Montgomery domain round trip: C = sigma x^h, D = v x^h,
          // U = MM(MM(C, D), 1) = sigma v mod F.
          sg = rand_elem(K);
          vv = rand_elem(K);
          run(mulx(sg, fk, K, H), mulx(vv, fk, K, H), pr);
          run(pr, poly_t'(1), ur);
          check("U = sigma*v", ur, mulmod(sg, vv, fk, K));
        end
      end
    end
    finished = 1'b1;
  end

endmodule
