// tb_mm_pe: self-checking testbench of one processing element.
// Random inputs every cycle; a cycle-level model of the cell's equation,
// delay lines and t-controlled hold register predicts every output.
module tb_mm_pe;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c_in, f_in, d_in, top_in, prev_in, t_in, z_in;
  logic c_out, f_out, bit_out, top_out;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_pe u_dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
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

  logic c_h1, c_h2, f_h1, f_h2, exp_bit, exp_top;

  initial begin
    {c_in, f_in, d_in, top_in, prev_in, t_in, z_in} = '0;
    repeat (2) @(negedge clk);
    // Reset clears every register.
    check("reset bit", bit_out, 1'b0);
    check("reset top", top_out, 1'b0);
    check("reset c",   c_out,   1'b0);
    check("reset f",   f_out,   1'b0);
    rst_n = 1'b1;
    {c_h1, c_h2, f_h1, f_h2, exp_bit, exp_top} = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check("bit_out", bit_out, exp_bit);
      check("top_out", top_out, exp_top);
      check("c_out",   c_out,   c_h2);
      check("f_out",   f_out,   f_h2);
      {c_in, f_in, d_in, top_in, prev_in} = 5'($urandom);
      t_in = ($urandom % 4) == 0;
      z_in = ($urandom % 4) != 0;
      // Model: s = d&c ^ f&top ^ z&prev, registered; hold loads s on t.
      begin
        logic s;
        s = 1'b0;
        if (d_in && c_in)    s = ~s;
        if (f_in && top_in)  s = ~s;
        if (z_in && prev_in) s = ~s;
        exp_bit = s;
        if (t_in) exp_top = s;
      end
      c_h2 = c_h1; c_h1 = c_in;
      f_h2 = f_h1; f_h1 = f_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
