// Self-checking test of the AXI4-Lite address decoder with three
// components.
//
// Three adder register blocks with IDs 1, 2 and 3 sit in the three 32-byte
// windows from 0x43C0_0000. The test reads each ID through its window,
// writes different operands into each block and checks each block's result
// (so a write that lands in the wrong window shows), checks DECERR answers
// for addresses above the last window and below the base, and checks the
// 4-cycle read and write latency through the decoder.
`timescale 1ns/1ps
module tb_axil_intercon;
  import tp_fpga_pkg::*;

  localparam int unsigned NS   = 3;
  localparam axi_addr_t   BASE = 32'h43C0_0000;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t m_req;
  axil_rsp_t m_rsp;
  axil_req_t s_req [NS];
  axil_rsp_t s_rsp [NS];
  int checks = 0, failures = 0;

  axil_intercon #(.NSLAVES(NS), .BASE_ADDR(BASE), .SLOT_W(5)) dut (
    .clk(clk), .rst(rst), .m_req_i(m_req), .m_rsp_o(m_rsp),
    .s_req_o(s_req), .s_rsp_i(s_rsp)
  );

  for (genvar k = 0; k < NS; k++) begin : g_slave
    addition_ip #(.ID(k + 1), .ADDR_W(5)) u_add (
      .clk(clk), .rst(rst), .axi_req_i(s_req[k]), .axi_rsp_o(s_rsp[k])
    );
  end

  axil_master_bfm bfm (.clk(clk), .req_o(m_req), .rsp_i(m_rsp));

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
    axi_data_t d;
    logic [1:0] resp;
    axi_data_t a [NS], b [NS];
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < NS; k++) begin
      bfm.read(BASE + axi_addr_t'(k * 32) + 32'h0, d, resp);
      check(resp == RESP_OKAY && d == axi_data_t'(k + 1), $sformatf("ID of slot %0d = %0d", k, d));
      check(bfm.last_cycles == 4, $sformatf("read latency %0d", bfm.last_cycles));
    end
    for (int round = 0; round < 5; round++) begin
      for (int k = 0; k < NS; k++) begin
        a[k] = $urandom;
        b[k] = $urandom;
        bfm.write(BASE + axi_addr_t'(k * 32) + 32'h4, a[k], resp);
        check(resp == RESP_OKAY, "write OKAY");
        check(bfm.last_cycles == 4, $sformatf("write latency %0d", bfm.last_cycles));
        bfm.write(BASE + axi_addr_t'(k * 32) + 32'h8, b[k], resp);
        check(resp == RESP_OKAY, "write OKAY");
      end
      for (int k = 0; k < NS; k++) begin
        bfm.read(BASE + axi_addr_t'(k * 32) + 32'hC, d, resp);
        check(resp == RESP_OKAY && d == a[k] + b[k],
              $sformatf("slot %0d result %h, expected %h", k, d, a[k] + b[k]));
      end
    end
    // outside the windows
    bfm.read(BASE + axi_addr_t'(NS * 32), d, resp);
    check(resp == RESP_DECERR && d == '0, "read above the windows gives DECERR");
    bfm.read(BASE - 32'h4, d, resp);
    check(resp == RESP_DECERR, "read below the base gives DECERR");
    bfm.write(BASE + axi_addr_t'(NS * 32) + 32'h4, 32'hDEAD_BEEF, resp);
    check(resp == RESP_DECERR, "write above the windows gives DECERR");
    bfm.read(BASE + 32'h4, d, resp);
    check(d == a[0], "stray write did not reach slot 0");
    check(bfm.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
