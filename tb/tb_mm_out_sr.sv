// tb_mm_out_sr: self-checking testbench of the output shift registers.
// One instance in each order (SR-A: MSB first, SR-B: LSB first), K = 9.
// A random word is streamed in the order the arrays produce it, with its
// first bit on end_bit; the assembled word must equal the original, and it
// must hold while shift_en = 0.
module tb_mm_out_sr;

  localparam int K = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         sh, bit_a, bit_b, end_a, end_b;
  logic [K-1:0] word_a, word_b, wa, wb;
  int           checks = 0, failures = 0;

  mm_out_sr #(.K(K), .MSB_FIRST(1'b1)) u_a (.clk, .rst_n, .shift_en(sh), .bit_in(bit_a),
                                            .end_bit(end_a), .word(word_a));
  mm_out_sr #(.K(K), .MSB_FIRST(1'b0)) u_b (.clk, .rst_n, .shift_en(sh), .bit_in(bit_b),
                                            .end_bit(end_b), .word(word_b));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [K-1:0] got, logic [K-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    sh = 0; bit_a = 0; bit_b = 0; end_a = 0; end_b = 0;
    repeat (2) @(negedge clk);
    check("reset A", word_a, '0);
    check("reset B", word_b, '0);
    rst_n = 1'b1;
    for (int op = 0; op < 300; op++) begin
      wa = K'($urandom);
      wb = K'($urandom);
      end_a = wa[K-1];
      end_b = wb[0];
      for (int j = 1; j < K; j++) begin
        sh    = 1'b1;
        bit_a = wa[K-1-j];
        bit_b = wb[j];
        @(negedge clk);
        // Idle cycles in between must not disturb the contents.
        if ($urandom % 3 == 0) begin
          sh = 1'b0; bit_a = ~bit_a; bit_b = ~bit_b;
          @(negedge clk);
        end
      end
      sh = 1'b0;
      bit_a = 1'($urandom); bit_b = 1'($urandom);
      repeat (2) @(negedge clk);
      check("SR-A word", word_a, wa);
      check("SR-B word", word_b, wb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
