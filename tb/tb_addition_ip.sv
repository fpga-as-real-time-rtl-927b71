// Self-checking test of the adder/subtractor register block.
//
// Goes through the CPU sequence of the lab (read ID = 1, write 2 and 3, read
// 5) and then random operands in both modes: sums and differences are
// computed here modulo 2**32 and compared with RESULT; OP1, OP2 and OPER are
// read back; an unused register reads 0; writes to read-only registers change
// nothing. The 3-cycle read latency is checked.
`timescale 1ns/1ps
module tb_addition_ip;
  import tp_fpga_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;

  addition_ip #(.ID(1), .ADDR_W(5)) dut (
    .clk(clk), .rst(rst), .axi_req_i(req), .axi_rsp_o(rsp)
  );

  axil_master_bfm bfm (.clk(clk), .req_o(req), .rsp_i(rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    axi_data_t d, a, b, expv;
    logic [1:0] resp;
    bit sub;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    bfm.read(32'h00, d, resp);
    check(d == 32'd1 && resp == RESP_OKAY, "ID reads 1");
    check(bfm.last_cycles == 3, $sformatf("read latency %0d", bfm.last_cycles));
    bfm.write(32'h04, 32'd2, resp);
    bfm.write(32'h08, 32'd3, resp);
    bfm.read(32'h0C, d, resp);
    check(d == 32'd5, $sformatf("2 + 3 = %0d", d));
    for (int i = 0; i < 60; i++) begin
      a   = $urandom;
      b   = (i % 7 == 0) ? 32'hFFFF_FFFF : $urandom;
      sub = i[0];
      bfm.write(32'h04, a, resp);
      bfm.write(32'h08, b, resp);
      bfm.write(32'h10, {31'b0, sub}, resp);
      expv = sub ? a - b : a + b;
      bfm.read(32'h0C, d, resp);
      check(d == expv, $sformatf("%s %h %h gives %h, expected %h", sub ? "sub" : "add", a, b, d, expv));
      bfm.read(32'h04, d, resp);
      check(d == a, "OP1 reads back");
      bfm.read(32'h08, d, resp);
      check(d == b, "OP2 reads back");
      bfm.read(32'h10, d, resp);
      check(d == {31'b0, sub}, "OPER reads back");
    end
    bfm.write(32'h00, 32'h55, resp);
    bfm.read(32'h00, d, resp);
    check(d == 32'd1, "ID is read-only");
    bfm.write(32'h0C, 32'h55, resp);
    bfm.read(32'h0C, d, resp);
    check(d == expv, "RESULT is read-only");
    bfm.read(32'h1C, d, resp);
    check(d == 32'd0 && resp == RESP_OKAY, "unused register reads 0");
    check(bfm.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
