// Self-checking test of the period counter.
//
// Edge pulses are driven at random intervals P (1 to 3000 cycles, plus a few
// back-to-back pulses). On every edge cycle the counter must show P - 1, the
// count since the previous edge; between edges it must grow by one per
// cycle.
`timescale 1ns/1ps
module tb_period_cpt;
  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  logic        edge_p;
  logic [31:0] cpt;
  int checks = 0, failures = 0;

  period_cpt #(.W(32)) dut (.clk(clk), .rst(rst), .edge_i(edge_p), .cpt_o(cpt));

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

  initial begin
    int unsigned p;
    int unsigned step_errs;
    edge_p = 1'b0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    edge_p = 1'b1;
    @(negedge clk) edge_p = 1'b0;
    step_errs = 0;
    for (int i = 0; i < 200; i++) begin
      p = (i < 5) ? 1 : 1 + ($urandom % 3000);
      for (int unsigned k = 1; k < p; k++) begin
        if (cpt != 32'(k - 1)) step_errs++;
        @(negedge clk);
      end
      edge_p = 1'b1;
      #1;
      check(cpt == 32'(p - 1), $sformatf("interval %0d counted %0d", p, cpt));
      @(negedge clk) edge_p = 1'b0;
    end
    check(step_errs == 0, "counter steps by one between edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
