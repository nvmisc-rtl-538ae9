// wl_runner: one complete platform (nvmisc_top) configured as one of the five
// cache technologies, running three benchmark kernels back to back and
// reporting how many cycles each took. Used by tb_workloads, which puts five
// runners side by side.
//
// The kernels are executed by a pipeline model that issues every load and
// store of the program through the D-cache port and waits out the halt:
//   Matmul     - 3x3 kernel convolved over an R x C integer array ("valid"
//                output, (R-2) x (C-2) results stored to memory);
//   Bubblesort - plain bubble sort of N_SORT integers in place;
//   Bitcount   - Kernighan's bit count over N_BITS integers, one stored sum.
// As on the platform, the host loads each kernel's data with the core (and so
// the cache) held in reset, which also invalidates the cache between kernels.
// Each kernel ends with a store of a marker to the completion word at the
// top of the data memory; the host model polls that word through the data
// memory's host port and then reads back and checks all results (convolution
// outputs, sorted array, bit count) against values computed here.
// The input data is a fixed integer sequence so that all runners see the
// same data and their cycle counts are comparable.
// Interface: clk_i in; done_o rises when all three kernels are finished and
// checked; cyc_o[k] is the number of cycles kernel k ran (0 Matmul,
// 1 Bubblesort, 2 Bitcount), counted from the first access to the completion
// store; checks_o/failures_o are the check counters; refills_o, shifts_o count
// line refills and shifting array accesses.
module wl_runner #(
  parameter nvmisc_pkg::tech_e TECH = nvmisc_pkg::TECH_RTM,
  parameter int unsigned CACHE_BYTES     = 1024,
  parameter int unsigned ACCESS_PORTS    = 1,
  parameter bit          RING            = 1'b0,
  parameter int unsigned SHIFT_PER_CYCLE = 1,
  parameter int unsigned MM_R   = 34,
  parameter int unsigned MM_C   = 34,
  parameter int unsigned N_SORT = 128,
  parameter int unsigned N_BITS = 4096
) (
  input  logic clk_i,
  output logic done_o,
  output longint unsigned cyc_o [3],
  output int   checks_o,
  output int   failures_o,
  output int   refills_o,
  output int   shifts_o
);
  import nvmisc_pkg::*;
  localparam logic [31:0] DMEM_BASE = 32'h8000_0000;
  localparam logic [31:0] IN_A      = DMEM_BASE;
  localparam logic [31:0] OUT_A     = DMEM_BASE + 32'h0001_0000;
  localparam logic [31:0] KER_A     = DMEM_BASE + 32'h0002_0000;
  localparam logic [31:0] DEBUG_LOC = DMEM_BASE + 32'h0007_FFFC;

  logic rst_n = 0;
  logic        cpu_req = 0, cpu_we = 0;
  logic [3:0]  cpu_be = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        halt_ex, halt_wb;
  axi_req_t    ibus_req;
  axi_rsp_t    ibus_rsp;
  logic        pd_en = 0, pd_we = 0;
  logic [3:0]  pd_be = 0;
  logic [31:0] pd_addr = 0, pd_wdata = 0, pd_rdata, pi_rdata;
  logic        ev_hit, ev_miss, ev_refill_done, ev_arr_start;
  logic [15:0] arr_lat;
  logic [$clog2(16 / (ACCESS_PORTS * (RING ? 2 : 1)) + 1)-1:0] arr_sh;

  assign ibus_req = '0;

  nvmisc_top #(.TECH(TECH), .CACHE_BYTES(CACHE_BYTES), .ACCESS_PORTS(ACCESS_PORTS),
               .RING(RING), .SHIFT_PER_CYCLE(SHIFT_PER_CYCLE)) dut (
    .clk_i(clk_i), .rst_ni(rst_n),
    .cpu_req_i(cpu_req), .cpu_we_i(cpu_we), .cpu_be_i(cpu_be), .cpu_addr_i(cpu_addr),
    .cpu_wdata_i(cpu_wdata), .cpu_rdata_o(cpu_rdata), .halt_ex_o(halt_ex), .halt_wb_o(halt_wb),
    .ibus_req_i(ibus_req), .ibus_rsp_o(ibus_rsp),
    .ps_imem_en_i(1'b0), .ps_imem_we_i(1'b0), .ps_imem_be_i(4'h0), .ps_imem_addr_i(32'h0),
    .ps_imem_wdata_i(32'h0), .ps_imem_rdata_o(pi_rdata),
    .ps_dmem_en_i(pd_en), .ps_dmem_we_i(pd_we), .ps_dmem_be_i(pd_be), .ps_dmem_addr_i(pd_addr),
    .ps_dmem_wdata_i(pd_wdata), .ps_dmem_rdata_o(pd_rdata),
    .ev_hit_o(ev_hit), .ev_miss_o(ev_miss), .ev_refill_done_o(ev_refill_done),
    .ev_arr_start_o(ev_arr_start), .arr_latency_o(arr_lat), .arr_shifts_o(arr_sh));

  int checks = 0, failures = 0, n_refill = 0, n_shift = 0;
  assign checks_o = checks;
  assign failures_o = failures;
  assign refills_o = n_refill;
  assign shifts_o = n_shift;

  always @(posedge clk_i) begin
    if (ev_refill_done) n_refill++;
    if (ev_arr_start && arr_sh != 0) n_shift++;
  end

  // fixed input sequence (a 32-bit linear congruential generator)
  function automatic logic [31:0] gen(input int unsigned i, input logic [31:0] salt);
    logic [31:0] x = (32'(i) ^ salt) * 32'd1664525 + 32'd1013904223;
    x = x ^ (x >> 13);
    return x * 32'd22695477 + 32'd1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m: %s at %0t", what, $time);
    end
  endtask

  // ---- pipeline model: one access, held until the halt drops ----
  task automatic acc(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d; cpu_be = 4'hF;
    forever begin
      @(negedge clk_i);
      if (!halt_ex) break;
    end
    q = cpu_rdata;
    @(posedge clk_i); #1;
    cpu_req = 0; cpu_we = 0;
  endtask

  // ---- host model ----
  task automatic ps_write(input logic [31:0] a, input logic [31:0] d);
    pd_en = 1; pd_we = 1; pd_be = 4'hF; pd_addr = a; pd_wdata = d;
    @(posedge clk_i); #1;
    pd_en = 0; pd_we = 0;
  endtask
  task automatic ps_read(input logic [31:0] a, output logic [31:0] d);
    pd_en = 1; pd_we = 0; pd_addr = a;
    @(posedge clk_i); #1;
    pd_en = 0;
    d = pd_rdata;
  endtask
  task automatic wait_marker(input logic [31:0] m);
    logic [31:0] q;
    forever begin
      repeat (50) @(posedge clk_i);
      #1;
      ps_read(DEBUG_LOC, q);
      if (q == m) break;
    end
  endtask

  function automatic int popcount(input logic [31:0] v);
    int c = 0;
    while (v != 0) begin v = v & (v - 1); c++; end
    return c;
  endfunction

  logic [31:0] mm_in [MM_R * MM_C];
  logic [31:0] ker [9];
  logic [31:0] srt [N_SORT];
  logic [31:0] bits [N_BITS];
  longint unsigned t0;

  initial begin
    logic [31:0] q, a, b;
    done_o = 0;
    for (int k = 0; k < 3; k++) cyc_o[k] = 0;
    repeat (2) @(posedge clk_i);
    #1;
    // host loads all inputs while the core is in reset
    for (int i = 0; i < MM_R * MM_C; i++) begin
      mm_in[i] = gen(i, 32'h1) & 32'h0000_FFFF;
      ps_write(IN_A + 32'(4 * i), mm_in[i]);
    end
    for (int i = 0; i < 9; i++) begin
      ker[i] = 32'(i) - 32'd4;
      ps_write(KER_A + 32'(4 * i), ker[i]);
    end
    ps_write(DEBUG_LOC, 32'h0);
    rst_n = 1;
    @(posedge clk_i); #1;

    // ---- Matmul: 3x3 convolution ----
    t0 = $time;
    begin
      logic [31:0] k [9];
      for (int i = 0; i < 9; i++) acc(0, KER_A + 32'(4 * i), 0, k[i]);
      for (int r = 0; r < MM_R - 2; r++)
        for (int c = 0; c < MM_C - 2; c++) begin
          automatic logic [31:0] s = 0;
          for (int kr = 0; kr < 3; kr++)
            for (int kc = 0; kc < 3; kc++) begin
              acc(0, IN_A + 32'(4 * ((r + kr) * MM_C + c + kc)), 0, q);
              s += q * k[kr * 3 + kc];
            end
          acc(1, OUT_A + 32'(4 * (r * (MM_C - 2) + c)), s, q);
        end
      acc(1, DEBUG_LOC, 32'h1, q);
    end
    cyc_o[0] = ($time - t0) / 10;
    wait_marker(32'h1);
    for (int r = 0; r < MM_R - 2; r++)
      for (int c = 0; c < MM_C - 2; c++) begin
        automatic logic [31:0] s = 0;
        for (int kr = 0; kr < 3; kr++)
          for (int kc = 0; kc < 3; kc++)
            s += mm_in[(r + kr) * MM_C + c + kc] * ker[kr * 3 + kc];
        ps_read(OUT_A + 32'(4 * (r * (MM_C - 2) + c)), q);
        chk(q == s, $sformatf("matmul out[%0d][%0d]", r, c));
      end

    // ---- Bubblesort ----
    rst_n = 0;
    for (int i = 0; i < N_SORT; i++) begin
      srt[i] = gen(i, 32'h2);
      ps_write(IN_A + 32'(4 * i), srt[i]);
    end
    rst_n = 1;
    @(posedge clk_i); #1;
    t0 = $time;
    for (int i = 0; i < N_SORT - 1; i++)
      for (int j = 0; j < N_SORT - 1 - i; j++) begin
        acc(0, IN_A + 32'(4 * j), 0, a);
        acc(0, IN_A + 32'(4 * (j + 1)), 0, b);
        if (a > b) begin
          acc(1, IN_A + 32'(4 * j), b, q);
          acc(1, IN_A + 32'(4 * (j + 1)), a, q);
        end
      end
    acc(1, DEBUG_LOC, 32'h2, q);
    cyc_o[1] = ($time - t0) / 10;
    wait_marker(32'h2);
    srt.sort();
    for (int i = 0; i < N_SORT; i++) begin
      ps_read(IN_A + 32'(4 * i), q);
      chk(q == srt[i], $sformatf("sorted[%0d]", i));
    end

    // ---- Bitcount ----
    begin
      automatic int exp_cnt = 0, cnt = 0;
      rst_n = 0;
      for (int i = 0; i < N_BITS; i++) begin
        bits[i] = gen(i, 32'h3);
        exp_cnt += popcount(bits[i]);
        ps_write(IN_A + 32'(4 * i), bits[i]);
      end
      rst_n = 1;
      @(posedge clk_i); #1;
      t0 = $time;
      for (int i = 0; i < N_BITS; i++) begin
        acc(0, IN_A + 32'(4 * i), 0, q);
        cnt += popcount(q);
      end
      acc(1, OUT_A, 32'(cnt), q);
      acc(1, DEBUG_LOC, 32'h3, q);
      cyc_o[2] = ($time - t0) / 10;
      wait_marker(32'h3);
      ps_read(OUT_A, q);
      chk(q == 32'(exp_cnt), $sformatf("bitcount result %0d expected %0d (core %0d)", q, exp_cnt, cnt));
    end
    done_o = 1;
  end
endmodule
