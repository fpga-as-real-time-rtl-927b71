// Self-checking test of the period counter's acquisition state machine.
//
// The testbench drives edge pulses at random intervals and a counter value
// that it picks at random for every edge, and records every RAM write. It
// checks that nothing is written before a start or on the first edge after
// it, that the next N edges are written in address order 0..N-1 with the
// counter value of their own edge, that busy stays high from start to the
// N-th write and then falls, that edges after the end are not written, and
// that a start while busy is ignored. Two full acquisitions of N = 1024 are
// run.
`timescale 1ns/1ps
module tb_period_statem;
  localparam int unsigned N = 1024;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  logic        start, edge_p, busy, we;
  logic [31:0] cpt, wdata;
  logic [9:0]  waddr;
  int checks = 0, failures = 0;
  int unsigned writes, order_errs, data_errs;
  int          last_addr;

  period_statem #(.N(N), .CPT_W(32)) dut (
    .clk(clk), .rst(rst), .start_i(start), .edge_i(edge_p), .cpt_i(cpt),
    .busy_o(busy), .ram_we_o(we), .ram_addr_o(waddr), .ram_wdata_o(wdata)
  );

  // The value expected with each write is the one driven with that edge.
  always @(posedge clk) begin
    if (we) begin
      writes++;
      if (int'(waddr) != last_addr + 1) order_errs++;
      if (wdata != cpt) data_errs++;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_edge();
    repeat (1 + $urandom % 40) @(negedge clk);
    cpt    = $urandom;
    edge_p = 1'b1;
    @(negedge clk);
    edge_p = 1'b0;
    cpt    = $urandom;
  endtask

  initial begin
    start = 1'b0; edge_p = 1'b0; cpt = '0;
    writes = 0; order_errs = 0; data_errs = 0; last_addr = -1;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5) pulse_edge();
    check(writes == 0 && !busy, "no writes and idle before start");
    for (int run = 0; run < 2; run++) begin
      writes = 0; order_errs = 0; data_errs = 0; last_addr = -1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      check(busy, "busy after start");
      pulse_edge();
      check(writes == 0 && busy, "first edge only arms the acquisition");
      for (int i = 0; i < N; i++) begin
        if (i == 100) begin
          @(negedge clk) start = 1'b1;   // ignored while busy
          @(negedge clk) start = 1'b0;
        end
        pulse_edge();
        if (i < N - 1 && !busy) begin
          check(0, $sformatf("busy fell early after %0d writes", i + 1));
          break;
        end
      end
      check(!busy, "idle after N writes");
      check(writes == N, $sformatf("%0d writes", writes));
      check(order_errs == 0, "addresses 0..N-1 in order");
      check(data_errs == 0, "each write carries the counter of its edge");
      check(last_addr == N - 1, "last write at N-1");
      repeat (3) pulse_edge();
      check(writes == N, "edges after the end are not written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
