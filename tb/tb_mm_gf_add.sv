// tb_mm_gf_add: self-checking testbench of the GF(2^K) adder at K = 233.
// Each result coefficient is checked against a sum computed coefficient by
// coefficient as (a + b) mod 2.
module tb_mm_gf_add;

  localparam int K = 233;

  logic [K-1:0] a, b, p;
  int           checks = 0, failures = 0;

  mm_gf_add #(.K(K)) u_dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int w = 0; w < K; w += 32) begin
        a[w +: 32] = $urandom;
        b[w +: 32] = $urandom;
      end
      if (n == 0) begin a = '1; b = '0; end
      if (n == 1) begin a = '1; b = '1; end
      #1;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (p[i] != 1'((int'(a[i]) + int'(b[i])) % 2)) begin
          failures++;
          $display("FAIL bit %0d of test %0d", i, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
