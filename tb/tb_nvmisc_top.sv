// tb_nvmisc_top: end-to-end run of the platform at its default parameters
// (racetrack D-cache with a 16-bit track, one port, one shift per cycle,
// 16 KiB; 64 KiB instruction and 512 KiB data memory; 16-cycle memory
// latency), following the platform's software flow:
//  1. with the core in reset, the host writes a program image into the
//     instruction memory and 28K random integers into the data memory, and
//     clears the completion word DEBUG_LOC;
//  2. the host releases reset; a pipeline model runs Bitcount over the array
//     through the D-cache (Kernighan's loop is done by the model, the data
//     comes from the cache), stores a partial sum every 1024 elements and
//     reads a constant from a new line of the instruction memory every 256
//     elements; an
//     instruction-cache model fetches 16-word lines from the instruction
//     memory through the crossbar all the while;
//  3. the pipeline stores the total to DEBUG_LOC; the host polls DEBUG_LOC
//     through its port until it sees the total, then reads back the partial
//     sums.
// Checked: every loaded word, every fetched instruction word, the partial
// sums and the total in memory. Counted, and each required at least once:
// load hits, load misses with refill, stores, racetrack shifts, shift-free
// accesses, crossbar contention for the instruction memory, memory latency of
// at least 16 cycles seen by the instruction bus, and host polls that found
// the run unfinished.
module tb_nvmisc_top;
  import nvmisc_pkg::*;
  localparam int N          = 28 * 1024;
  localparam logic [31:0] DMEM_BASE = 32'h8000_0000;
  localparam logic [31:0] ARRAY_A   = DMEM_BASE;                // input array
  localparam logic [31:0] PART_A    = DMEM_BASE + 32'h0002_0000; // partial sums
  localparam logic [31:0] DEBUG_LOC = DMEM_BASE + 32'h0007_FFFC;
  localparam int IMEM_WORDS = 16384;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cpu_req = 0, cpu_we = 0;
  logic [3:0]  cpu_be = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        halt_ex, halt_wb;
  axi_req_t    ibus_req;
  axi_rsp_t    ibus_rsp;
  logic        pi_en = 0, pi_we = 0, pd_en = 0, pd_we = 0;
  logic [3:0]  pi_be = 0, pd_be = 0;
  logic [31:0] pi_addr = 0, pi_wdata = 0, pi_rdata, pd_addr = 0, pd_wdata = 0, pd_rdata;
  logic        ev_hit, ev_miss, ev_refill_done, ev_arr_start;
  logic [15:0] arr_lat;
  logic [4:0]  arr_sh;

  nvmisc_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cpu_req_i(cpu_req), .cpu_we_i(cpu_we), .cpu_be_i(cpu_be), .cpu_addr_i(cpu_addr),
    .cpu_wdata_i(cpu_wdata), .cpu_rdata_o(cpu_rdata), .halt_ex_o(halt_ex), .halt_wb_o(halt_wb),
    .ibus_req_i(ibus_req), .ibus_rsp_o(ibus_rsp),
    .ps_imem_en_i(pi_en), .ps_imem_we_i(pi_we), .ps_imem_be_i(pi_be), .ps_imem_addr_i(pi_addr),
    .ps_imem_wdata_i(pi_wdata), .ps_imem_rdata_o(pi_rdata),
    .ps_dmem_en_i(pd_en), .ps_dmem_we_i(pd_we), .ps_dmem_be_i(pd_be), .ps_dmem_addr_i(pd_addr),
    .ps_dmem_wdata_i(pd_wdata), .ps_dmem_rdata_o(pd_rdata),
    .ev_hit_o(ev_hit), .ev_miss_o(ev_miss), .ev_refill_done_o(ev_refill_done),
    .ev_arr_start_o(ev_arr_start), .arr_latency_o(arr_lat), .arr_shifts_o(arr_sh));

  logic [31:0] data [N];
  int n_hit = 0, n_miss = 0, n_refill = 0, n_store = 0, n_shift = 0, n_noshift = 0;
  int n_contention = 0, n_polls_busy = 0, n_fetch = 0, min_ibus_lat = 1 << 30, halt_cycles = 0;
  bit core_done = 0;
  longint unsigned run_cycles = 0;

  function automatic logic [31:0] prog_word(input int i);
    return 32'h0000_0013 ^ (32'(i) * 32'h9E37_79B9);
  endfunction

  function automatic int popcount(input logic [31:0] v);
    int c = 0;
    while (v != 0) begin v = v & (v - 1); c++; end   // Kernighan
    return c;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_refill_done) n_refill++;
    if (ev_arr_start && arr_sh != 0) n_shift++;
    if (ev_arr_start && arr_sh == 0) n_noshift++;
    if (halt_ex) halt_cycles++;
    if (dut.m_req[0].ar_valid && dut.m_req[1].ar_valid
        && dut.m_req[0].ar_addr[31] == dut.m_req[1].ar_addr[31]) n_contention++;
    if (rst_n && !core_done) run_cycles++;
  end

  // ---- pipeline side: one access, held until the halt drops ----
  task automatic mem_access(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d; cpu_be = 4'hF;
    forever begin
      @(negedge clk);
      if (!halt_ex) break;
    end
    q = cpu_rdata;
    @(posedge clk); #1;
    cpu_req = 0; cpu_we = 0;
    if (w) n_store++;
  endtask

  task automatic core_run();
    logic [31:0] q;
    int total = 0, part = 0;
    for (int i = 0; i < N; i++) begin
      if (i % 256 == 0) begin
        mem_access(0, 32'(64 * (i / 256)), 0, q);
        chk(q == prog_word(16 * (i / 256)), "constant from instruction memory");
      end
      mem_access(0, ARRAY_A + 32'(4 * i), 0, q);
      chk(q == data[i], $sformatf("load a[%0d] got %h exp %h", i, q, data[i]));
      part += popcount(q);
      if (i % 1024 == 1023) begin
        mem_access(1, PART_A + 32'(4 * (i / 1024)), 32'(part), q);
        total += part;
        part = 0;
      end
    end
    mem_access(1, DEBUG_LOC, 32'(total), q);
    core_done = 1;
  endtask

  // ---- instruction-cache model: line refills over the crossbar ----
  task automatic ifetch_run();
    int line = 0;
    while (!core_done) begin
      int t0 = 0, lat = 0;
      ibus_req.ar_valid = 1; ibus_req.ar_addr = 32'(line * 64); ibus_req.ar_len = 8'd15;
      ibus_req.r_ready = 1;
      do begin @(negedge clk); t0++; end while (!ibus_rsp.ar_ready);
      @(posedge clk); #1;
      ibus_req.ar_valid = 0;
      for (int b = 0; b < 16; b++) begin
        do begin @(negedge clk); lat++; end while (!ibus_rsp.r_valid);
        chk(ibus_rsp.r_data == prog_word(line * 16 + b), "instruction word");
        chk(ibus_rsp.r_last == (b == 15), "instruction r_last");
        if (b == 0 && lat < min_ibus_lat) min_ibus_lat = lat;
        @(posedge clk); #1;
      end
      ibus_req.r_ready = 0;
      n_fetch++;
      line = (line + 37) % (IMEM_WORDS / 16);
      repeat ($urandom_range(40, 5)) @(posedge clk);
      #1;
    end
  endtask

  // ---- host side ----
  task automatic ps_dwrite(input logic [31:0] a, input logic [31:0] d);
    pd_en = 1; pd_we = 1; pd_be = 4'hF; pd_addr = a; pd_wdata = d;
    @(posedge clk); #1;
    pd_en = 0; pd_we = 0;
  endtask
  task automatic ps_dread(input logic [31:0] a, output logic [31:0] d);
    pd_en = 1; pd_we = 0; pd_addr = a;
    @(posedge clk); #1;
    pd_en = 0;
    d = pd_rdata;
  endtask

  initial begin
    logic [31:0] q;
    int expect_total;
    expect_total = 0;
    ibus_req = '0;
    // 1. load program and data while the core is held in reset
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      pi_en = 1; pi_we = 1; pi_be = 4'hF; pi_addr = 32'(4 * i); pi_wdata = prog_word(i);
      @(posedge clk); #1;
    end
    pi_en = 0; pi_we = 0;
    for (int i = 0; i < N; i++) begin
      data[i] = $urandom;
      expect_total += popcount(data[i]);
      ps_dwrite(ARRAY_A + 32'(4 * i), data[i]);
    end
    ps_dwrite(DEBUG_LOC, 32'h0);
    // 2. release reset, run
    rst_n = 1;
    @(posedge clk); #1;
    fork
      core_run();
      ifetch_run();
      begin
        // 3. poll DEBUG_LOC
        forever begin
          repeat (200) @(posedge clk);
          #1;
          ps_dread(DEBUG_LOC, q);
          if (q == 32'(expect_total)) break;
          n_polls_busy++;
        end
      end
    join
    chk(q == 32'(expect_total), "DEBUG_LOC total");
    for (int p = 0; p < N / 1024; p++) begin
      automatic int s = 0;
      for (int i = p * 1024; i < (p + 1) * 1024; i++) s += popcount(data[i]);
      ps_dread(PART_A + 32'(4 * p), q);
      chk(q == 32'(s), $sformatf("partial sum %0d", p));
    end
    chk(n_hit > 0, "load hits happened");
    chk(n_refill > 0 && n_refill <= n_miss, "misses and refills happened");
    chk(n_store > 0, "stores happened");
    chk(n_shift > 0, "racetrack shifts happened");
    chk(n_noshift > 0, "shift-free accesses happened");
    chk(n_contention > 0, "crossbar contention happened");
    chk(min_ibus_lat >= 16, $sformatf("memory latency on the instruction bus (%0d)", min_ibus_lat));
    chk(n_polls_busy > 0, "host polled before the end");
    chk(n_fetch > 0, "instruction fetches happened");
    $display("Bitcount %0d integers: %0d cycles, %0d halted; hits %0d misses %0d stores %0d",
             N, run_cycles, halt_cycles, n_hit, n_miss, n_store);
    $display("shifting accesses %0d, shift-free %0d, contention cycles %0d, fetches %0d, first-beat latency %0d",
             n_shift, n_noshift, n_contention, n_fetch, min_ibus_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
