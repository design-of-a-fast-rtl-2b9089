// tb_qsd_adder_workloads: the adder at the word lengths it is meant for, side by side.
//
//   DIGITS = 1    the single-digit adder (all 49 digit pairs)
//   DIGITS = 4    the four-digit worked example 107 + (-233) = -126, plus random vectors
//   DIGITS = 128  a 128-digit (256-bit-range) adder with random vectors
// (The 64-digit default is covered by tb_qsd_adder.) Each size runs in its own
// qsd_adder_bench; the three run one after another and their counts are summed.
module tb_qsd_adder_workloads;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int c1, f1, c4, f4, c128, f128;
  logic go, d1, d4, d128;
  initial begin
    go = 1'b0;
    #1 go = 1'b1;
  end
  int checks, failures;

  qsd_adder_bench #(.DIGITS(1),   .VECTORS(100))  u_d1   (.clk(clk), .start(go),   .checks(c1),   .failures(f1),   .done(d1));
  qsd_adder_bench #(.DIGITS(4),   .VECTORS(1000)) u_d4   (.clk(clk), .start(d1),   .checks(c4),   .failures(f4),   .done(d4));
  qsd_adder_bench #(.DIGITS(128), .VECTORS(1000)) u_d128 (.clk(clk), .start(d4),   .checks(c128), .failures(f128), .done(d128));

  initial begin
    checks = 0; failures = 0;
    wait (d128 === 1'b1);
    @(posedge clk);
    checks = c1 + c4 + c128;
    failures = f1 + f4 + f128;
    $display("sizes: 1 digit %0d/%0d, 4 digits %0d/%0d, 128 digits %0d/%0d (checks/failures)",
             c1, f1, c4, f4, c128, f128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c4 + c128, f1 + f4 + f128 + 1);
    $finish;
  end
endmodule
