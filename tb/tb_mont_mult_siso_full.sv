// tb_mont_mult_siso_full: the multiplier at its default size, K = 233, with
// the trinomial F = x^233 + x^74 + 1 (the field of the NIST B-233 curves).
// Runs random Montgomery multiplications and Montgomery-domain round trips
// (P, then MM(P, 1) = sigma * v mod F), checks each result against the
// word-level reference and checks the 2K+1 = 467 cycle start-to-done
// latency.
module tb_mont_mult_siso_full;
  import mm_ref_pkg::*;

  localparam int K   = 233;
  localparam int Q   = 74;
  localparam int H   = (K - 1) / 2;
  localparam int OPS = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, start, busy, done;
  logic [K-1:0] c, d, f, p;
  int           checks = 0, failures = 0;
  poly_t        fk;

  mont_mult_siso u_dut (.clk, .rst_n, .start, .c, .d, .f, .busy, .done, .p);

  initial begin
    repeat (OPS * 3 * (2 * K + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, poly_t got, poly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input poly_t ci, input poly_t di, output poly_t po);
    int lat;
    @(negedge clk);
    c = K'(ci); d = K'(di); f = K'(fk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    c = '0; d = '0; f = '0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2 * K + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, 2 * K + 1);
    end
    po = poly_t'(p);
  endtask

  initial begin
    poly_t ci, di, pr, ur, sg, vv;
    fk = (poly_t'(1) << K) | (poly_t'(1) << Q) | poly_t'(1);
    rst_n = 1'b0; start = 1'b0; c = '0; d = '0; f = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < OPS; n++) begin
      ci = rand_elem(K);
      di = rand_elem(K);
      if (n == 0) begin ci = (poly_t'(1) << K) - 1; di = ci; end
      run(ci, di, pr);
      check("P", pr, mont(ci, di, fk, K));
      sg = rand_elem(K);
      vv = rand_elem(K);
      run(mulx(sg, fk, K, H), mulx(vv, fk, K, H), pr);
      run(pr, poly_t'(1), ur);
      check("U = sigma*v", ur, mulmod(sg, vv, fk, K));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
