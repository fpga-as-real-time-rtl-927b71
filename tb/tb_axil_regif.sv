// Self-checking test of the AXI4-Lite slave front end.
//
// A small register file in the testbench sits behind the front end: it
// stores on write_en and loads its read register on read_en. Random words
// are written to all 8 register indexes through the bus and read back; the
// test checks the data, the OKAY responses, that each write gives exactly one
// write strobe with the right index, and the 3-cycle write and read
// latencies of the front end.
`timescale 1ns/1ps
module tb_axil_regif;
  import tp_fpga_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      write_en, read_en;
  logic [2:0] addr;
  axi_data_t wdata, readdata;
  axi_data_t regs [8];
  int unsigned wr_pulses, rd_pulses;
  int checks = 0, failures = 0;

  axil_regif #(.ADDR_W(5)) dut (
    .clk(clk), .rst(rst), .axi_req_i(req), .axi_rsp_o(rsp),
    .write_en_o(write_en), .read_en_o(read_en), .addr_o(addr),
    .wdata_o(wdata), .readdata_i(readdata)
  );

  axil_master_bfm bfm (.clk(clk), .req_o(req), .rsp_i(rsp));

  always_ff @(posedge clk) begin
    if (rst) begin
      readdata  <= '0;
      wr_pulses <= 0;
      rd_pulses <= 0;
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
    if (write_en) begin
      regs[addr] <= wdata;
      wr_pulses  <= wr_pulses + 1;
    end
    if (read_en) begin
      readdata  <= regs[addr];
      rd_pulses <= rd_pulses + 1;
    end
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
    axi_data_t exp [8];
    axi_data_t d;
    logic [1:0] resp;
    int unsigned n_prev;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 8; i++) begin
        exp[i] = $urandom;
        n_prev = wr_pulses;
        bfm.write(axi_addr_t'(i * 4), exp[i], resp);
        check(resp == RESP_OKAY, "write response OKAY");
        check(bfm.last_cycles == 3, $sformatf("write latency %0d", bfm.last_cycles));
        check(wr_pulses == n_prev + 1, "one write strobe per write");
        check(regs[i] == exp[i], $sformatf("register %0d written", i));
      end
      for (int i = 7; i >= 0; i--) begin
        n_prev = rd_pulses;
        bfm.read(axi_addr_t'(i * 4), d, resp);
        check(resp == RESP_OKAY, "read response OKAY");
        check(d == exp[i], $sformatf("read back reg %0d: %h vs %h", i, d, exp[i]));
        check(bfm.last_cycles == 3, $sformatf("read latency %0d", bfm.last_cycles));
        check(rd_pulses == n_prev + 1, "one read strobe per read");
      end
    end
    check(bfm.timeouts == 0, "no bus timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
