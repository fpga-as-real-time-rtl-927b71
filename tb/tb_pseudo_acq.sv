// Self-checking test of the pseudo acquisition.
//
// A model RAM records every write. After a one-cycle start pulse the test
// checks that busy stays high for exactly 1024 cycles, that exactly 1024
// writes happen, in address order, with data equal to address (RAM[k] = k,
// the first word being 0), and that a start pulse during the acquisition is
// ignored. It runs two acquisitions.
`timescale 1ns/1ps
module tb_pseudo_acq;
  localparam int unsigned DEPTH = 1024;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  logic        start, busy, we;
  logic [9:0]  waddr;
  logic [31:0] wdata;
  int checks = 0, failures = 0;
  int unsigned busy_cycles, writes, order_errs, data_errs;
  int          last_addr;

  pseudo_acq #(.DEPTH(DEPTH), .DATA_W(32)) dut (
    .clk(clk), .rst(rst), .start_i(start), .busy_o(busy),
    .ram_we_o(we), .ram_addr_o(waddr), .ram_wdata_o(wdata)
  );

  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (we) begin
      writes++;
      if (int'(waddr) != last_addr + 1) order_errs++;
      if (wdata != 32'(waddr)) data_errs++;
      last_addr = int'(waddr);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1; start = 1'b0;
    busy_cycles = 0; writes = 0; order_errs = 0; data_errs = 0; last_addr = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5) @(negedge clk);
    check(!busy && writes == 0, "idle after reset, no writes");
    for (int run = 0; run < 2; run++) begin
      busy_cycles = 0; writes = 0; order_errs = 0; data_errs = 0; last_addr = -1;
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      check(busy, "busy right after start");
      repeat (300) @(negedge clk);
      start = 1'b1;                       // ignored while busy
      @(negedge clk) start = 1'b0;
      repeat (2000) @(negedge clk);
      check(!busy, "busy falls at the end");
      check(busy_cycles == DEPTH, $sformatf("busy for %0d cycles", busy_cycles));
      check(writes == DEPTH, $sformatf("%0d writes", writes));
      check(order_errs == 0, "writes in address order from 0");
      check(data_errs == 0, "data equal to address");
      check(last_addr == DEPTH - 1, "last write at DEPTH-1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
