// tb_mvx: self-checking test of the cross-coupling correction unit at the
// three unroll factors 1, 2 and 4 (initiation intervals of 32, 16 and 8
// cycles). Each instance is driven and checked by mvx_tb_unit; this module
// adds the clock, reset, the watchdog and the result line. The latency of
// each instance is also checked against the bound given for the 6.1 ns
// clock (360, 262 and 213 ns, i.e. 59, 42 and 34 cycles).
module tb_mvx;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   chk [3], fl [3];
  logic dn  [3];

  mvx_tb_unit #(.UNROLL(1)) u1 (.clk, .rst_n, .checks(chk[0]), .failures(fl[0]), .done(dn[0]));
  mvx_tb_unit #(.UNROLL(2)) u2 (.clk, .rst_n, .checks(chk[1]), .failures(fl[1]), .done(dn[1]));
  mvx_tb_unit #(.UNROLL(4)) u4 (.clk, .rst_n, .checks(chk[2]), .failures(fl[2]), .done(dn[2]));

  int checks, failures;
  localparam int LAT_BOUND [3] = '{59, 42, 34};

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    @(posedge rst_n);
    @(posedge clk);
    wait (dn[0] && dn[1] && dn[2]);
    report();
    checks += 3;
    if (u1.first_lat > LAT_BOUND[0]) failures++;
    if (u2.first_lat > LAT_BOUND[1]) failures++;
    if (u4.first_lat > LAT_BOUND[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
