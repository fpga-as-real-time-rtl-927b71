// Self-checking test of the buffer RAM.
//
// Fills all 1024 words with random data, reads them back in a shuffled
// order checking the one-cycle read latency, and checks that a read of the
// address being written returns the old word, the new one a cycle later.
`timescale 1ns/1ps
module tb_dp_ram;
  localparam int unsigned DEPTH = 1024;
  localparam int unsigned AW    = 10;

  logic clk = 1'b0;
  always #4 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [31:0]   wdata, rdata;
  logic [31:0]   model [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(DEPTH), .DATA_W(32)) dut (
    .clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_i(raddr), .rdata_o(rdata)
  );

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
    logic [AW-1:0] a;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      we = 1; waddr = AW'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      a = AW'((i * 389 + 17) % DEPTH);
      raddr = a;
      @(negedge clk);
      check(rdata == model[a], $sformatf("word %0d: %h vs %h", a, rdata, model[a]));
    end
    // write and read the same address in one cycle
    raddr = 10'd77; we = 1; waddr = 10'd77; wdata = 32'hCAFE_F00D;
    @(negedge clk);
    we = 0;
    check(rdata == model[77], "read during write returns the old word");
    @(negedge clk);
    check(rdata == 32'hCAFE_F00D, "new word visible one cycle later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
