// tb_dropin_configs: runs the other evaluated configurations of the
// accelerator system side by side, each through the same end-to-end
// sequence (dropin_cfg_run): D = 1 without squaring unit, D = 1, D = 4 and
// D = 8 with squaring unit. The default configuration (D = 2 with
// squaring unit) is covered by tb_dropin_system.
module tb_dropin_configs;

  logic clk = 0;
  logic [3:0] done;
  int c [4], f [4];
  int checks, failures;

  always #5 clk = ~clk;

  dropin_cfg_run #(.D(1), .SQ(1'b0)) r0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  dropin_cfg_run #(.D(1), .SQ(1'b1)) r1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  dropin_cfg_run #(.D(4), .SQ(1'b1)) r2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  dropin_cfg_run #(.D(8), .SQ(1'b1)) r3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));

  function automatic void report(int extra);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    report(0);
    $finish;
  end
endmodule
