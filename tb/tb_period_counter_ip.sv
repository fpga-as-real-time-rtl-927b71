// Self-checking test of the period measurement block, run the way the lab's
// user program runs it.
//
// A generator drives the external input with a square wave whose high and
// low times are random (20 to 150 cycles each), with short glitches (below
// the deglitcher length) thrown in, and records the cycle of every clean
// rising transition. The CPU side reads ID, writes START, polls STATUS until
// the busy bit falls and reads the N = 1024 stored values. These must be N
// consecutive intervals between clean rising edges, each stored as
// (interval - 1) clock periods, starting with the first whole interval after
// the start. Two acquisitions are run.
`timescale 1ns/1ps
module tb_period_counter_ip;
  import tp_fpga_pkg::*;
  localparam int unsigned N   = 1024;
  localparam int unsigned LEN = 8;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t   req;
  axil_rsp_t   rsp;
  logic        ext, level, busy;
  int unsigned cyc;
  int unsigned rises [$];
  bit          gen_on;
  int checks = 0, failures = 0;

  period_counter_ip #(.ID(1), .ADDR_W(5), .N(N), .CPT_W(32), .DEBOUNCE_LEN(LEN)) dut (
    .clk(clk), .rst(rst), .axi_req_i(req), .axi_rsp_o(rsp),
    .external_signal(ext), .level_o(level), .busy_o(busy)
  );

  axil_master_bfm #(.TIMEOUT(1000)) bfm (.clk(clk), .req_o(req), .rsp_i(rsp));

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Square-wave generator with glitches once a level has settled.
  initial begin
    ext = 1'b0;
    wait (gen_on);
    while (1) begin
      int unsigned lh, ll, g;
      lh = 20 + $urandom % 131;
      ll = 20 + $urandom % 131;
      g  = 1 + $urandom % (LEN - 1);
      @(negedge clk);
      ext = 1'b1;
      rises.push_back(cyc + 1);
      for (int unsigned i = 1; i < lh; i++) begin
        @(negedge clk);
        ext = !(($urandom % 4 == 0) && i >= LEN + 1 && i < LEN + 1 + g);
      end
      @(negedge clk);
      ext = 1'b0;
      for (int unsigned i = 1; i < ll; i++) begin
        @(negedge clk);
        ext = (($urandom % 4 == 0) && i >= LEN + 1 && i < LEN + 1 + g && i + g + LEN < ll);
      end
    end
  end

  initial begin
    axi_data_t d;
    logic [1:0] resp;
    axi_data_t got [N];
    int unsigned polls, j0, errs, start_cyc;
    bit found;
    cyc = 0; gen_on = 0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    gen_on = 1;
    repeat (500) @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      bfm.read(32'h00, d, resp);
      check(d == 32'd1, "ID reads 1");
      bfm.write(32'h08, 32'd1, resp);
      start_cyc = cyc;
      polls = 0;
      do begin
        repeat (50) @(negedge clk);
        bfm.read(32'h04, d, resp);
        polls++;
      end while (d[0] && polls < 20000);
      check(polls > 10, "busy seen while polling");
      for (int i = 0; i < N; i++) begin
        bfm.read(32'h0C, d, resp);
        got[i] = d;
      end
      found = 0;
      for (int j = 0; j + N < rises.size() && !found; j++) begin
        if (got[0] == rises[j + 1] - rises[j] - 1) begin
          errs = 0;
          for (int i = 0; i < N; i++)
            if (got[i] != rises[j + i + 1] - rises[j + i] - 1) errs++;
          if (errs == 0) begin
            found = 1;
            j0 = j;
          end
        end
      end
      check(found, "stored values are N consecutive intervals minus one");
      check(found && rises[j0] + LEN + 4 >= start_cyc && rises[j0] < start_cyc + 320,
            "the first stored interval starts at the first edge after START");
      if (!found) $display("first values %0d %0d %0d", got[0], got[1], got[2]);
    end
    check(bfm.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
