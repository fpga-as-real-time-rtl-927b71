// End-to-end test of the three gatewares at their default sizes, each driven
// through its own AXI4-Lite port as the lab's user programs drive them
// (base address 0x43C0_0000).
//
// Adder: random additions and subtractions, operands read back.
// RAM acquisition: start, a second start while busy (ignored), poll, read
//   the 1024-word ramp and one word more (the read pointer wraps to 0).
// Period counter: a glitchy square wave of random half periods on
//   external_signal; start, poll, read the 1024 stored periods and match
//   them with the intervals between clean rising edges.
// Every bus access outside the 32-byte window must be answered DECERR.
// The test counts how often each mechanism happened (add, subtract, DECERR,
// RAM fill, ignored start, pointer wrap, period acquisition, first-edge
// wait, glitch rejected) and fails any that never did.
`timescale 1ns/1ps
module tb_tp_fpga_top;
  import tp_fpga_pkg::*;
  localparam axi_addr_t   BASE = 32'h43C0_0000;
  localparam int unsigned N    = 1024;
  localparam int unsigned LEN  = 8;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t add_req, ram_req, cnt_req;
  axil_rsp_t add_rsp, ram_rsp, cnt_rsp;
  logic      ram_busy, cnt_busy, cnt_level, ext;
  int unsigned cyc, ram_busy_cycles, level_rises;
  int unsigned rises [$];
  bit          gen_on;
  logic        level_d;
  int checks = 0, failures = 0;

  // mechanism counters
  int unsigned n_add, n_sub, n_decerr, n_fill, n_ignored_start, n_wrap,
               n_period_acq, n_first_edge_wait, n_glitch;

  tp_fpga_top dut (
    .clk(clk), .rst(rst),
    .add_axi_req_i(add_req), .add_axi_rsp_o(add_rsp),
    .ram_axi_req_i(ram_req), .ram_axi_rsp_o(ram_rsp), .ram_busy_o(ram_busy),
    .cnt_axi_req_i(cnt_req), .cnt_axi_rsp_o(cnt_rsp),
    .external_signal(ext), .cnt_level_o(cnt_level), .cnt_busy_o(cnt_busy)
  );

  axil_master_bfm bfm_add (.clk(clk), .req_o(add_req), .rsp_i(add_rsp));
  axil_master_bfm bfm_ram (.clk(clk), .req_o(ram_req), .rsp_i(ram_rsp));
  axil_master_bfm bfm_cnt (.clk(clk), .req_o(cnt_req), .rsp_i(cnt_rsp));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ram_busy) ram_busy_cycles++;
    if (!rst && cnt_level && !level_d) level_rises++;
    level_d <= cnt_level;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Glitchy square wave on the external input.
  initial begin
    ext = 1'b0;
    wait (gen_on);
    while (1) begin
      int unsigned lh, ll, g;
      bit gh, gl;
      lh = 20 + $urandom % 131;
      ll = 20 + $urandom % 131;
      g  = 1 + $urandom % (LEN - 1);
      gh = ($urandom % 3) == 0;
      gl = ($urandom % 3) == 0 && (2 * LEN + 1 + g < ll);
      if (gh) n_glitch++;
      if (gl) n_glitch++;
      @(negedge clk);
      ext = 1'b1;
      rises.push_back(cyc + 1);
      for (int unsigned i = 1; i < lh; i++) begin
        @(negedge clk);
        ext = !(gh && i >= LEN + 1 && i < LEN + 1 + g);
      end
      @(negedge clk);
      ext = 1'b0;
      for (int unsigned i = 1; i < ll; i++) begin
        @(negedge clk);
        ext = gl && i >= LEN + 1 && i < LEN + 1 + g;
      end
    end
  end

  task automatic decerr_probe(input int which);
    axi_data_t d;
    logic [1:0] r;
    case (which)
      0: bfm_add.read(BASE + 32'h20, d, r);
      1: bfm_ram.read(BASE - 32'h4, d, r);
      default: bfm_cnt.write(BASE + 32'h100, 32'h1, r);
    endcase
    check(r == RESP_DECERR, $sformatf("DECERR outside the window of gateware %0d", which));
    if (r == RESP_DECERR) n_decerr++;
  endtask

  // ---------------------------------------------------------- adder
  task automatic run_adder();
    axi_data_t d, a, b, e;
    logic [1:0] r;
    bfm_add.read(BASE + 32'h0, d, r);
    check(d == 32'd1, "adder ID");
    for (int i = 0; i < 40; i++) begin
      a = $urandom; b = $urandom;
      bfm_add.write(BASE + 32'h4, a, r);
      bfm_add.write(BASE + 32'h8, b, r);
      bfm_add.write(BASE + 32'h10, 32'(i % 2), r);
      bfm_add.read(BASE + 32'hC, d, r);
      e = ((i % 2) != 0) ? a - b : a + b;
      check(d == e, $sformatf("adder result %h vs %h", d, e));
      if (d == e) begin
        if ((i % 2) != 0) n_sub++;
        else       n_add++;
      end
      bfm_add.read(BASE + 32'h4, d, r);
      check(d == a, "OP1 readback");
    end
    decerr_probe(0);
  endtask

  // ------------------------------------------------ RAM acquisition
  task automatic run_ram();
    axi_data_t d;
    logic [1:0] r;
    int unsigned polls, errs;
    bfm_ram.read(BASE + 32'h0, d, r);
    check(d == 32'd1, "RAM block ID");
    for (int run = 0; run < 2; run++) begin
      ram_busy_cycles = 0;
      bfm_ram.write(BASE + 32'h8, 32'd1, r);
      bfm_ram.write(BASE + 32'h8, 32'd1, r);     // while busy: ignored
      polls = 0;
      do begin
        bfm_ram.read(BASE + 32'h4, d, r);
        polls++;
      end while (d[0] && polls < 5000);
      check(ram_busy_cycles == N, $sformatf("RAM fill busy %0d cycles", ram_busy_cycles));
      if (ram_busy_cycles == N) begin
        n_fill++;
        n_ignored_start++;
      end
      errs = 0;
      for (int i = 0; i < N; i++) begin
        bfm_ram.read(BASE + 32'hC, d, r);
        if (d != 32'(i)) errs++;
      end
      check(errs == 0, "RAM ramp 0..1023");
      bfm_ram.read(BASE + 32'hC, d, r);
      check(d == 32'd0, "read pointer wraps to word 0");
      if (d == 32'd0) n_wrap++;
    end
    decerr_probe(1);
  endtask

  // ------------------------------------------------- period counter
  task automatic run_counter();
    axi_data_t d;
    logic [1:0] r;
    axi_data_t got [N];
    int unsigned polls, errs, start_cyc, first_busy;
    bit found;
    bfm_cnt.read(BASE + 32'h0, d, r);
    check(d == 32'd1, "counter ID");
    for (int run = 0; run < 2; run++) begin
      bfm_cnt.write(BASE + 32'h8, 32'd1, r);
      start_cyc = cyc;
      polls = 0;
      do begin
        repeat (50) @(negedge clk);
        bfm_cnt.read(BASE + 32'h4, d, r);
        polls++;
      end while (d[0] && polls < 20000);
      check(!d[0], "period acquisition ends");
      for (int i = 0; i < N; i++) begin
        bfm_cnt.read(BASE + 32'hC, d, r);
        got[i] = d;
      end
      found = 0;
      for (int j = 0; j + N < rises.size() && !found; j++) begin
        errs = 0;
        for (int i = 0; i < N && errs == 0; i++)
          if (got[i] != rises[j + i + 1] - rises[j + i] - 1) errs++;
        if (errs == 0) begin
          found = 1;
          first_busy = rises[j];
        end
      end
      check(found, "stored periods match the clean input");
      if (found) begin
        n_period_acq++;
        // the first stored interval starts at the first edge after START,
        // and START did not come at an edge: a first edge was waited for
        if (first_busy + LEN + 4 >= start_cyc) n_first_edge_wait++;
      end
    end
    decerr_probe(2);
  endtask

  initial begin
    cyc = 0; gen_on = 0; level_d = 1'b0; level_rises = 0; ram_busy_cycles = 0;
    n_add = 0; n_sub = 0; n_decerr = 0; n_fill = 0; n_ignored_start = 0;
    n_wrap = 0; n_period_acq = 0; n_first_edge_wait = 0; n_glitch = 0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    gen_on = 1;
    repeat (400) @(negedge clk);
    fork
      run_adder();
      run_ram();
      run_counter();
    join
    // every clean rise gave exactly one level rise: glitches were rejected
    check(level_rises + 1 >= rises.size() && level_rises <= rises.size(),
          $sformatf("%0d cleaned rises for %0d clean rises", level_rises, rises.size()));
    check(n_add > 0,             $sformatf("additions: %0d", n_add));
    check(n_sub > 0,             $sformatf("subtractions: %0d", n_sub));
    check(n_decerr == 3,         $sformatf("DECERR answers: %0d", n_decerr));
    check(n_fill > 0,            $sformatf("RAM fills: %0d", n_fill));
    check(n_ignored_start > 0,   $sformatf("ignored starts: %0d", n_ignored_start));
    check(n_wrap > 0,            $sformatf("pointer wraps: %0d", n_wrap));
    check(n_period_acq > 0,      $sformatf("period acquisitions: %0d", n_period_acq));
    check(n_first_edge_wait > 0, $sformatf("first-edge waits: %0d", n_first_edge_wait));
    check(n_glitch > 0 && level_rises <= rises.size(),
          $sformatf("glitches rejected: %0d", n_glitch));
    $display("mechanisms: add=%0d sub=%0d decerr=%0d fill=%0d ignored_start=%0d wrap=%0d period_acq=%0d first_edge_wait=%0d glitch=%0d",
             n_add, n_sub, n_decerr, n_fill, n_ignored_start, n_wrap, n_period_acq,
             n_first_edge_wait, n_glitch);
    check(bfm_add.timeouts + bfm_ram.timeouts + bfm_cnt.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
