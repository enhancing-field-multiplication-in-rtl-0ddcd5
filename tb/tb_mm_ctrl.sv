// tb_mm_ctrl: self-checking testbench of the sequencer, K = 7.
// Checks, cycle by cycle from an accepted start, the busy window (2K
// cycles), the t pulse (first busy cycle), the z pulse (busy cycle K-1),
// the output shift window (busy cycles K+1 .. 2K-1), the load strobe and the
// done pulse 2K+1 cycles after start. Starts raised while busy must be
// ignored.
module tb_mm_ctrl;
  import mm_pkg::*;

  localparam int K = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     start, busy, done, load, ser_shift, sr_shift;
  mm_ctrl_t ctrl;
  int       checks = 0, failures = 0;

  mm_ctrl #(.K(K)) u_dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at step %0d: got %b expected %b", what, n, got, exp);
    end
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    check("idle after reset", busy, 1'b0, -1);
    rst_n = 1'b1;
    for (int op = 0; op < 100; op++) begin
      int gap;
      gap = $urandom % 3;
      repeat (gap) begin
        @(negedge clk);
        check("idle busy", busy, 1'b0, -1);
        check("idle t", ctrl.t, 1'b0, -1);
        check("idle z", ctrl.z, 1'b1, -1);
        check("idle load", load, 1'b0, -1);
      end
      start = 1'b1;
      #1;
      check("load with start", load, 1'b1, -1);
      @(negedge clk);
      for (int n = 0; n < 2 * K; n++) begin
        start = ($urandom % 2 == 0);  // ignored while busy
        #1;
        check("busy",      busy,      1'b1, n);
        check("load",      load,      1'b0, n);
        check("done",      done,      1'b0, n);
        check("ser_shift", ser_shift, 1'b1, n);
        check("t",         ctrl.t,    n == 0, n);
        check("z",         ctrl.z,    n != K - 1, n);
        check("sr_shift",  sr_shift,  n >= K + 1, n);
        @(negedge clk);
      end
      start = 1'b0;
      check("done pulse", done, 1'b1, 2 * K);
      check("not busy",   busy, 1'b0, 2 * K);
      @(negedge clk);
      check("done ends", done, 1'b0, 2 * K + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
