// tb_rc_workloads: the decoder on the other two component-code lengths
// evaluated for this architecture, n = 64 and n = 128 (product codes of
// 4096 and 16384 bits), eight iterations, one block each, both at once.
// The default n = 32 is run by tb_rc_turbo_decoder.
module tb_rc_workloads;

  logic clk = 0;
  logic rst_n = 0;
  bit   fin64, fin128;
  int   c64, f64, x64, c128, f128, x128;

  always #5 clk = ~clk;

  tb_rc_code_run #(.N(64),  .NBLK(1)) u64  (.clk, .rst_n, .finished(fin64),
                                            .checks(c64), .failures(f64), .n_fixed(x64));
  tb_rc_code_run #(.N(128), .NBLK(1)) u128 (.clk, .rst_n, .finished(fin128),
                                            .checks(c128), .failures(f128), .n_fixed(x128));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c128, f64 + f128 + 1);
    $finish;
  end

  initial begin : main
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin64 && fin128);
    repeat (2) @(posedge clk);
    checks   = c64 + c128 + 2;
    failures = f64 + f128;
    if (x64 == 0)  failures++;          // channel errors must have been corrected
    if (x128 == 0) failures++;
    $display("n=64: corrected channel errors %0d; n=128: %0d", x64, x128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
