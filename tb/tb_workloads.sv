// tb_workloads: the three benchmark kernels (Matmul as a 3x3 convolution,
// Bubblesort, Bitcount) run on five D-cache technologies side by side:
//   SRAM   - fixed two-cycle access;
//   STT    - two-cycle read, six-cycle write;
//   RTM_1  - 16-bit track, one port, horizontal, one shift per cycle;
//   RTM_2  - 16-bit track, four ports, ring;
//   RTM_3  - 16-bit track, one port, horizontal, four shifts per cycle.
// Each configuration is a wl_runner (a whole platform plus pipeline and host
// models) with a 1 KiB cache and scaled-down data sets (34x34 convolution,
// 128-element sort, 4096-element bit count), so that the data set to cache
// ratio resembles that of full-size runs on a 16 KiB cache while the
// simulation stays short.
// Checked: every result of every kernel on every configuration; that each
// configuration refilled lines; that the racetrack ones shifted; and the
// ordering the latency model implies: STT slower than SRAM on every kernel
// (its writes, refills included, are longer), RTM_2 and RTM_3 no slower than
// RTM_1. A table of cycle counts is printed.
module tb_workloads;
  import nvmisc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NC = 5;
  logic            done [NC];
  longint unsigned cyc  [NC][3];
  int              c_chk [NC], c_fail [NC], c_ref [NC], c_sh [NC];
  string           cname [NC] = '{"SRAM", "STT", "RTM_1", "RTM_2", "RTM_3"};

  wl_runner #(.TECH(TECH_SRAM))   u_sram (.clk_i(clk), .done_o(done[0]), .cyc_o(cyc[0]),
    .checks_o(c_chk[0]), .failures_o(c_fail[0]), .refills_o(c_ref[0]), .shifts_o(c_sh[0]));
  wl_runner #(.TECH(TECH_STTRAM)) u_stt  (.clk_i(clk), .done_o(done[1]), .cyc_o(cyc[1]),
    .checks_o(c_chk[1]), .failures_o(c_fail[1]), .refills_o(c_ref[1]), .shifts_o(c_sh[1]));
  wl_runner #(.TECH(TECH_RTM))    u_rtm1 (.clk_i(clk), .done_o(done[2]), .cyc_o(cyc[2]),
    .checks_o(c_chk[2]), .failures_o(c_fail[2]), .refills_o(c_ref[2]), .shifts_o(c_sh[2]));
  wl_runner #(.TECH(TECH_RTM), .ACCESS_PORTS(4), .RING(1'b1)) u_rtm2 (.clk_i(clk), .done_o(done[3]),
    .cyc_o(cyc[3]), .checks_o(c_chk[3]), .failures_o(c_fail[3]), .refills_o(c_ref[3]), .shifts_o(c_sh[3]));
  wl_runner #(.TECH(TECH_RTM), .SHIFT_PER_CYCLE(4)) u_rtm3 (.clk_i(clk), .done_o(done[4]),
    .cyc_o(cyc[4]), .checks_o(c_chk[4]), .failures_o(c_fail[4]), .refills_o(c_ref[4]), .shifts_o(c_sh[4]));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("config   Matmul  Bubblesort  Bitcount  refills  shifting-accesses");
    for (int c = 0; c < NC; c++) begin
      $display("%-6s %8d %10d %9d %8d %8d", cname[c], cyc[c][0], cyc[c][1], cyc[c][2], c_ref[c], c_sh[c]);
      checks += c_chk[c];
      failures += c_fail[c];
      chk(c_ref[c] > 0, {cname[c], " refilled lines"});
    end
    for (int c = 2; c < NC; c++) chk(c_sh[c] > 0, {cname[c], " shifted"});
    chk(c_sh[0] == 0 && c_sh[1] == 0, "no shifts outside racetrack");
    for (int k = 0; k < 3; k++) begin
      chk(cyc[1][k] > cyc[0][k], $sformatf("STT slower than SRAM on kernel %0d", k));
      chk(cyc[3][k] <= cyc[2][k], $sformatf("RTM_2 no slower than RTM_1 on kernel %0d", k));
      chk(cyc[4][k] <= cyc[2][k], $sformatf("RTM_3 no slower than RTM_1 on kernel %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
