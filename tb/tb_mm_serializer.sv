// tb_mm_serializer: self-checking testbench of the operand serializer.
// Both orders, K = 13: after load, dout must present the loaded word one
// bit per shift cycle (MSB first or LSB first), hold while shift = 0, and
// start over with the same word once it is used up (rotation).
module tb_mm_serializer;

  localparam int K = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load, shift, dm, dl;
  logic [K-1:0] din;
  int           checks = 0, failures = 0;

  mm_serializer #(.K(K), .MSB_FIRST(1'b1)) u_m (.clk, .rst_n, .load, .shift, .din, .dout(dm));
  mm_serializer #(.K(K), .MSB_FIRST(1'b0)) u_l (.clk, .rst_n, .load, .shift, .din, .dout(dl));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    load = 0; shift = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 300; op++) begin
      logic [K-1:0] w;
      w = K'($urandom);
      din = w; load = 1'b1; shift = 1'b1;  // load wins over shift
      @(negedge clk);
      load = 1'b0; din = ~w;
      for (int n = 0; n < K + 2; n++) begin
        check("MSB-first bit", dm, w[(2*K-1-n) % K]);
        check("LSB-first bit", dl, w[n % K]);
        shift = 1'b0;
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          check("MSB-first hold", dm, w[(2*K-1-n) % K]);
          check("LSB-first hold", dl, w[n % K]);
        end
        shift = 1'b1;
        @(negedge clk);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
