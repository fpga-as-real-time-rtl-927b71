// Self-checking test of the acquisition register layer.
//
// The testbench drives the busy input and stands in for the buffer RAM with
// a model that has a registered read port, filled with random words. It
// checks the ID, that STATUS follows busy, that writing 1 to START gives one
// single-cycle start pulse (and writing 0, or another register, none), that
// START reads back 0, and that DATA returns the words in order from 0,
// wrapping after the last one, with the pointer cleared by a new start.
`timescale 1ns/1ps
module tb_acq_comm;
  import tp_fpga_pkg::*;
  localparam int unsigned DEPTH = 1024;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t   req;
  axil_rsp_t   rsp;
  logic        busy, start;
  logic [31:0] ram_q;
  logic [9:0]  raddr;
  logic [31:0] ram [DEPTH];
  int unsigned start_pulses, start_long;
  logic        start_d;
  int checks = 0, failures = 0;

  acq_comm #(.ID(1), .ADDR_W(5), .DEPTH(DEPTH), .DATA_W(32)) dut (
    .clk(clk), .rst(rst), .axi_req_i(req), .axi_rsp_o(rsp),
    .busy_i(busy), .start_o(start), .data_val_i(ram_q), .data_addr_o(raddr)
  );

  axil_master_bfm bfm (.clk(clk), .req_o(req), .rsp_i(rsp));

  always @(posedge clk) begin
    ram_q <= ram[raddr];
    if (start) start_pulses++;
    if (start && start_d) start_long++;
    start_d <= start;
  end

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
    int unsigned errs;
    for (int i = 0; i < DEPTH; i++) ram[i] = $urandom;
    busy = 1'b0; start_pulses = 0; start_long = 0; start_d = 1'b0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    bfm.read(32'h00, d, resp);
    check(d == 32'd1 && resp == RESP_OKAY, "ID reads 1");
    bfm.read(32'h04, d, resp);
    check(d == 32'd0, "STATUS idle");
    busy = 1'b1;
    bfm.read(32'h04, d, resp);
    check(d == 32'd1, "STATUS busy");
    busy = 1'b0;
    bfm.write(32'h08, 32'd0, resp);
    check(start_pulses == 0, "writing 0 to START gives no pulse");
    bfm.write(32'h04, 32'd1, resp);
    check(start_pulses == 0, "writing STATUS gives no pulse");
    bfm.write(32'h08, 32'd1, resp);
    repeat (2) @(negedge clk);
    check(start_pulses == 1 && start_long == 0, "one single-cycle start pulse");
    bfm.read(32'h08, d, resp);
    check(d == 32'd0, "START reads back 0");
    errs = 0;
    for (int i = 0; i < DEPTH + 5; i++) begin
      bfm.read(32'h0C, d, resp);
      if (d != ram[i % DEPTH]) begin
        errs++;
        if (errs < 5) $display("DATA read %0d: %h vs %h", i, d, ram[i % DEPTH]);
      end
    end
    check(errs == 0, "DATA in order with wrap-around");
    bfm.write(32'h08, 32'd1, resp);
    bfm.read(32'h0C, d, resp);
    check(d == ram[0], "new start clears the read pointer");
    bfm.read(32'h0C, d, resp);
    check(d == ram[1], "then the pointer moves on");
    bfm.read(32'h18, d, resp);
    check(d == 32'd0, "unused register reads 0");
    check(start_pulses == 2, "two pulses in all");
    check(bfm.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
