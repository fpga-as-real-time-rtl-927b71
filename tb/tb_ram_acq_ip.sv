// Self-checking test of the RAM acquisition block, run the way the lab's
// user program runs it: read ID and expect 1, write 1 to START, poll STATUS
// until the busy bit is 0, then read DATA 1024 times and expect the ramp
// 0, 1, ..., 1023 (the first word 0, not the last value). The busy time is
// checked against the 1024 cycles of the fill, and the whole sequence is run
// twice.
`timescale 1ns/1ps
module tb_ram_acq_ip;
  import tp_fpga_pkg::*;
  localparam int unsigned DEPTH = 1024;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      busy;
  int unsigned busy_cycles;
  int checks = 0, failures = 0;

  ram_acq_ip #(.ID(1), .ADDR_W(5), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .axi_req_i(req), .axi_rsp_o(rsp), .busy_o(busy)
  );

  axil_master_bfm bfm (.clk(clk), .req_o(req), .rsp_i(rsp));

  always @(posedge clk) if (busy) busy_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    axi_data_t d;
    logic [1:0] resp;
    int unsigned errs, polls;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int run = 0; run < 2; run++) begin
      busy_cycles = 0;
      bfm.read(32'h00, d, resp);
      check(d == 32'd1, "ID reads 1");
      bfm.write(32'h08, 32'd1, resp);
      polls = 0;
      do begin
        bfm.read(32'h04, d, resp);
        polls++;
      end while (d[0] && polls < 2000);
      check(polls > 1, "busy seen at least once while polling");
      check(busy_cycles == DEPTH, $sformatf("busy for %0d cycles", busy_cycles));
      errs = 0;
      for (int i = 0; i < DEPTH; i++) begin
        bfm.read(32'h0C, d, resp);
        if (d != 32'(i)) begin
          errs++;
          if (errs < 5) $display("sample %0d reads %0d", i, d);
        end
      end
      check(errs == 0, "data is the ramp 0..1023 from the first read");
    end
    check(bfm.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
