// tb_mont_mult_siso: end-to-end testbench of the systolic Montgomery
// multiplier at three reduced sizes running in parallel:
//   K = 5,  F = x^5 + x^2 + 1, all 1024 operand pairs;
//   K = 11, F = x^11 + x^2 + 1, random operands;
//   K = 31, F = x^31 + x^3 + 1, random operands.
// Each product is compared with a word-level reference, the start-to-done
// latency (2K+1 cycles) is checked, and Montgomery-domain round trips
// (P then MM(P, 1)) are checked against the plain field product. It fails
// if a mechanism of the design never acted: reduction by F in either array,
// t capture of the held bit, z masking, or a start ignored while busy.
module tb_mont_mult_siso;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 3;
  int   ck[N], fl[N], ra[N], rb[N], ho[N], zm[N], ig[N];
  logic fin[N];

  mm_tb_driver #(.K(5),  .FLOW(256'h5), .EXHAUSTIVE(1'b1)) u_k5 (
    .clk, .checks(ck[0]), .failures(fl[0]), .n_red_a(ra[0]), .n_red_b(rb[0]),
    .n_hold(ho[0]), .n_zmask(zm[0]), .n_ignored(ig[0]), .finished(fin[0]));
  mm_tb_driver #(.K(11), .FLOW(256'h5), .OPS(400)) u_k11 (
    .clk, .checks(ck[1]), .failures(fl[1]), .n_red_a(ra[1]), .n_red_b(rb[1]),
    .n_hold(ho[1]), .n_zmask(zm[1]), .n_ignored(ig[1]), .finished(fin[1]));
  mm_tb_driver #(.K(31), .FLOW(256'h9), .OPS(200)) u_k31 (
    .clk, .checks(ck[2]), .failures(fl[2]), .n_red_a(ra[2]), .n_red_b(rb[2]),
    .n_hold(ho[2]), .n_zmask(zm[2]), .n_ignored(ig[2]), .finished(fin[2]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks   += ck[i];
      failures += fl[i];
    end
  endtask

  task automatic mech(string name, int cnt);
    checks++;
    $display("mechanism %-28s happened %0d times", name, cnt);
    if (cnt == 0) failures++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2]);
    report();
    for (int i = 0; i < N; i++) begin
      mech($sformatf("[%0d] reduction in A array", i), ra[i]);
      mech($sformatf("[%0d] reduction in B array", i), rb[i]);
      mech($sformatf("[%0d] t capture", i),            ho[i]);
      mech($sformatf("[%0d] z mask", i),               zm[i]);
      mech($sformatf("[%0d] start ignored while busy", i), ig[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
