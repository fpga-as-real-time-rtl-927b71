// Workload test at full size: one complete 1024-period acquisition of a
// Xenomai-generated 1 ms square wave, on the top with all parameters at
// their defaults.
//
// The program on the processor toggles a pin every 500 us with a sleeping
// real-time task; on an unloaded system its periods spread from 1271 us to
// 1476 us. Every period is drawn at random from that range, split into a high
// and a low half, and recorded. The CPU side starts the period meter, polls
// STATUS every 100 us of simulated time and reads the 1024 stored values,
// which must be the generated periods in 8 ns units, minus one, in order,
// with their minimum and maximum inside the range. This is about 175 million
// clock cycles.
`timescale 1ns/1ps
module tb_workload_full_acq;
  import tp_fpga_pkg::*;
  localparam axi_addr_t   BASE = 32'h43C0_0000;
  localparam int unsigned N    = 1024;
  localparam int unsigned CYC_PER_US = 125;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t add_req, ram_req, cnt_req;
  axil_rsp_t add_rsp, ram_rsp, cnt_rsp;
  logic      ram_busy, cnt_busy, cnt_level, ext;
  int unsigned periods [$];   // generated periods, in clock cycles
  int unsigned lo_us, hi_us, stall_us;
  bit          gen_on;
  int checks = 0, failures = 0;

  tp_fpga_top dut (
    .clk(clk), .rst(rst),
    .add_axi_req_i(add_req), .add_axi_rsp_o(add_rsp),
    .ram_axi_req_i(ram_req), .ram_axi_rsp_o(ram_rsp), .ram_busy_o(ram_busy),
    .cnt_axi_req_i(cnt_req), .cnt_axi_rsp_o(cnt_rsp),
    .external_signal(ext), .cnt_level_o(cnt_level), .cnt_busy_o(cnt_busy)
  );

  axil_master_bfm bfm_cnt (.clk(clk), .req_o(cnt_req), .rsp_i(cnt_rsp));

  initial begin
    add_req = '0;
    ram_req = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(64'd3_000_000_000);   // 3 s of simulated time
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Square-wave generator: one rising edge per period, periods recorded.
  initial begin
    ext = 1'b0;
    wait (gen_on);
    @(negedge clk);
    while (1) begin
      int unsigned p, h;
      if (stall_us != 0 && ($urandom % 16) == 0)
        p = stall_us * CYC_PER_US;
      else
        p = (lo_us + $urandom % (hi_us - lo_us + 1)) * CYC_PER_US + $urandom % CYC_PER_US;
      h = p / 2;
      ext = 1'b1;
      periods.push_back(p);
      #(64'(h) * 8);
      ext = 1'b0;
      #(64'(p - h) * 8);
    end
  end

  task automatic run_case(input string name, input int unsigned lo, input int unsigned hi,
                          input int unsigned stall);
    axi_data_t d;
    logic [1:0] r;
    axi_data_t got [N];
    int unsigned polls, first, errs, vmin, vmax;
    bit found;
    lo_us = lo; hi_us = hi; stall_us = stall;
    first = periods.size();
    bfm_cnt.write(BASE + 32'h8, 32'd1, r);
    polls = 0;
    do begin
      #100_000;
      bfm_cnt.read(BASE + 32'h4, d, r);
      polls++;
    end while (d[0] && polls < 50000);
    check(!d[0], {name, ": acquisition ends"});
    for (int i = 0; i < N; i++) begin
      bfm_cnt.read(BASE + 32'hC, d, r);
      got[i] = d;
    end
    // periods are generated from the start of a case; the first stored one
    // is the first whole period after START
    found = 0;
    for (int j = (first > 2) ? first - 2 : 0; j < first + 4 && j + N <= periods.size() && !found; j++) begin
      errs = 0;
      for (int i = 0; i < N && errs == 0; i++)
        if (got[i] != periods[j + i] - 1) errs++;
      if (errs == 0) found = 1;
    end
    check(found, {name, ": stored values are the generated periods minus one"});
    vmin = '1; vmax = 0;
    for (int i = 0; i < N; i++) begin
      if (got[i] < vmin) vmin = got[i];
      if (got[i] > vmax) vmax = got[i];
    end
    check(vmin + 1 >= lo * CYC_PER_US && vmax + 1 <= ((stall != 0) ? stall : hi + 1) * CYC_PER_US,
          $sformatf("%s: range %0d..%0d us", name, (vmin + 1) / CYC_PER_US, (vmax + 1) / CYC_PER_US));
    $display("%s: %0d periods from %0d us to %0d us", name, N, (vmin + 1) / CYC_PER_US,
             (vmax + 1) / CYC_PER_US);
  endtask

  initial begin
    gen_on = 0; lo_us = 1271; hi_us = 1476; stall_us = 0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    gen_on = 1;
    bfm_cnt.timeouts = 0;
    run_case("xeno_gpio_sleep unloaded", 1271, 1476, 0);
    check(bfm_cnt.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
