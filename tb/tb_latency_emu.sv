// tb_latency_emu: runs the five D-cache configurations of the platform's
// evaluation through latency_emu, each against an independent model:
// SRAM (2 cycles), STT-RAM (read 3 / write 7 here), RTM_1 (16-domain
// horizontal track, 1 port, 1 shift/cycle), RTM_2 (ring, 4 ports) and RTM_3
// (4 shifts/cycle). It also checks that the largest shift count seen equals
// TRACK_LENGTH/(ports*k_ring) where that bound is reachable.
module tb_latency_emu;
  import nvmisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c[5], f[5], mx[5];
  bit fin[5];
  int checks, failures;

  le_runner #(.TECH(TECH_SRAM))   r_sram (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]), .max_shifts(mx[0]));
  le_runner #(.TECH(TECH_STTRAM)) r_stt  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]), .max_shifts(mx[1]));
  le_runner #(.TECH(TECH_RTM))    r_rtm1 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]), .max_shifts(mx[2]));
  le_runner #(.TECH(TECH_RTM), .ACCESS_PORTS(4), .RING(1'b1))
                                  r_rtm2 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]), .max_shifts(mx[3]));
  le_runner #(.TECH(TECH_RTM), .SHIFT_PER_CYCLE(4))
                                  r_rtm3 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .finished(fin[4]), .max_shifts(mx[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    // reachable maxima: horizontal 1 port: 15, ring 4 ports: 16/(4*2) = 2
    checks += 3;
    if (mx[2] != 15) begin failures++; $display("FAIL RTM_1 max shifts %0d", mx[2]); end
    if (mx[3] != 2)  begin failures++; $display("FAIL RTM_2 max shifts %0d", mx[3]); end
    if (mx[0] != 0 || mx[1] != 0) begin failures++; $display("FAIL shifts outside RTM"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
