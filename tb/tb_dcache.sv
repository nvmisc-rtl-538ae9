// tb_dcache: the D-cache in its racetrack configuration (ring track, 4 ports,
// 1 shift per cycle; 512-byte cache so that lines are evicted often) against
// a behavioural AXI memory of 1 KiB. A pipeline model issues random loads
// and byte-masked stores and holds each until the halt drops. Checked:
//  - every load returns the reference value (memory is write-through, so the
//    reference is the memory image);
//  - after the run, the memory holds every store;
//  - a load hit is halted for exactly 2 + L cycles, where L = 1 + shifts and
//    the shifts come from a separate model of each line's track position
//    (a refill writes words 0..15 in order and leaves the track at 15 mod 4);
//  - a load miss is halted longer than a hit and the refill is reported;
//  - hits, misses, write hits and write misses all occur.
module tb_dcache;
  import nvmisc_pkg::*;
  localparam int CACHE = 512, LINE = 64, LINES = CACHE / LINE;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req = 0, we = 0;
  logic [3:0] be = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic halt_ex, halt_wb;
  axi_req_t axi_req;
  axi_rsp_t axi_rsp;
  logic ev_hit, ev_miss, ev_refill_done, ev_arr_start;
  logic [15:0] arr_lat;
  logic [1:0] arr_sh;
  int nr, nw;

  dcache #(.TECH(TECH_RTM), .CACHE_BYTES(CACHE), .LINE_BYTES(LINE), .ACCESS_PORTS(4), .RING(1'b1)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cpu_req_i(req), .cpu_we_i(we), .cpu_be_i(be), .cpu_addr_i(addr),
    .cpu_wdata_i(wdata), .cpu_rdata_o(rdata), .halt_ex_o(halt_ex), .halt_wb_o(halt_wb),
    .axi_req_o(axi_req), .axi_rsp_i(axi_rsp), .ev_hit_o(ev_hit), .ev_miss_o(ev_miss),
    .ev_refill_done_o(ev_refill_done), .ev_arr_start_o(ev_arr_start), .arr_latency_o(arr_lat),
    .arr_shifts_o(arr_sh));

  axi_slave_model #(.ID(16'h5A00)) mem (.clk, .rst_n, .req(axi_req), .rsp(axi_rsp), .n_reads(nr), .n_writes(nw));

  logic [31:0] refm [256];
  bit          cvalid [LINES];
  int          ctag [LINES];
  int          tpos [LINES];
  int n_hit = 0, n_miss = 0, n_whit = 0, n_wmiss = 0, n_refill = 0;

  always @(posedge clk) if (ev_refill_done) n_refill++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(input bit w, input int wa, input logic [31:0] d, input logic [3:0] b);
    int cyc = 0, line = (wa / 16) % LINES, tag = wa / (16 * LINES), word = wa % 16;
    bit hit = cvalid[line] && ctag[line] == tag;
    int rel = word % 4, dd, exp_l;
    req = 1; we = w; addr = 32'(wa * 4); wdata = d; be = b;
    // halt is sampled at the falling edge, when every input has settled
    forever begin
      @(negedge clk);
      if (!halt_ex) break;
      cyc++;
      if (cyc > 500) break;
    end
    if (!w) begin
      chk(rdata == refm[wa], $sformatf("load word %0d got %h exp %h", wa, rdata, refm[wa]));
      if (!hit) begin
        // refill leaves the track at word 15
        tpos[line] = 15 % 4;
        cvalid[line] = 1; ctag[line] = tag;
      end
      dd = (rel > tpos[line]) ? rel - tpos[line] : tpos[line] - rel;
      if (dd > 2) dd = 4 - dd;
      exp_l = 1 + dd;
      tpos[line] = rel;
      if (hit) begin
        n_hit++;
        chk(cyc == 2 + exp_l, $sformatf("hit halt %0d cycles, exp %0d", cyc, 2 + exp_l));
      end else begin
        n_miss++;
        chk(cyc > 2 + 16 + exp_l, $sformatf("miss halt %0d cycles", cyc));
      end
    end else begin
      for (int i = 0; i < 4; i++) if (b[i]) refm[wa][8*i +: 8] = d[8*i +: 8];
      if (hit) begin
        n_whit++;
        dd = (rel > tpos[line]) ? rel - tpos[line] : tpos[line] - rel;
        tpos[line] = rel;
      end else n_wmiss++;
      chk(cyc >= 3, "store halted");
    end
    @(posedge clk); #1;
    req = 0;
    repeat ($urandom_range(2, 0)) begin @(negedge clk); chk(!halt_ex, "no halt without request"); @(posedge clk); #1; end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) refm[i] = {16'h5A00, 16'(i)};
    for (int i = 0; i < LINES; i++) begin cvalid[i] = 0; tpos[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 1500; n++) begin
      automatic int wa = (n < 40) ? (n % 20) : $urandom_range(255, 0);
      automatic bit w = ($urandom_range(3, 0) == 0);
      access(w, wa, $urandom, w ? 4'($urandom_range(15, 1)) : 4'hF);
    end
    repeat (5) @(posedge clk);
    for (int i = 0; i < 256; i++) chk(mem.mem[i] == refm[i], $sformatf("memory word %0d", i));
    chk(n_refill == n_miss, $sformatf("refills %0d misses %0d", n_refill, n_miss));
    chk(n_hit > 0 && n_miss > 0 && n_whit > 0 && n_wmiss > 0, "all access kinds seen");
    $display("load hits %0d, load misses %0d, store hits %0d, store misses %0d", n_hit, n_miss, n_whit, n_wmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
