// tb_virtual_probe: self-checking test of the virtual-probe unit at the
// unroll factors 1, 2 and 4 (initiation intervals of 16, 8 and 4 cycles).
// Each instance is driven and checked by vp_tb_unit; this module adds the
// clock, reset, the watchdog and the result line, and checks the latency
// against the bound given for the 6.1 ns clock (140, 91 and 67 ns, i.e.
// 22, 14 and 10 cycles).
module tb_virtual_probe;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   chk [3], fl [3], lat [3];
  logic dn  [3];
  int   checks, failures;
  localparam int LAT_BOUND [3] = '{22, 14, 10};

  vp_tb_unit #(.UNROLL(1)) u1 (.clk, .rst_n, .checks(chk[0]), .failures(fl[0]), .done(dn[0]), .first_lat(lat[0]));
  vp_tb_unit #(.UNROLL(2)) u2 (.clk, .rst_n, .checks(chk[1]), .failures(fl[1]), .done(dn[1]), .first_lat(lat[1]));
  vp_tb_unit #(.UNROLL(4)) u4 (.clk, .rst_n, .checks(chk[2]), .failures(fl[2]), .done(dn[2]), .first_lat(lat[2]));

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
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (lat[i] > LAT_BOUND[i]) begin
        failures++;
        $display("latency %0d above bound %0d", lat[i], LAT_BOUND[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
