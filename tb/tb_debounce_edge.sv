// Self-checking test of the deglitcher and rising-edge detector.
//
// The input is a sequence of clean high and low levels of random lengths
// (at least 2 * LEN + 2 cycles), with random glitches of 1 to LEN-1 cycles
// thrown into many of them once their level has settled. The test checks that exactly one
// edge pulse comes out per clean rising transition, LEN cycles after the
// transition is first sampled, that no glitch produces a pulse, that every
// pulse is one cycle long, and that the cleaned level matches the clean
// input at the end of each level.
`timescale 1ns/1ps
module tb_debounce_edge;
  localparam int unsigned LEN = 8;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #4 clk = ~clk;

  logic sig, level, edge_p;
  int unsigned cyc;
  int unsigned rises [$];
  int unsigned edges [$];
  int unsigned long_pulses;
  logic        edge_d;
  int checks = 0, failures = 0;

  debounce_edge #(.LEN(LEN)) dut (
    .clk(clk), .rst(rst), .sig_i(sig), .level_o(level), .edge_o(edge_p)
  );

  always @(posedge clk) begin
    cyc <= cyc + 1;
  end
  always @(negedge clk) begin
    if (!rst) begin
      if (edge_p) edges.push_back(cyc);
      if (edge_p && edge_d) long_pulses++;
    end
    edge_d = edge_p;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive `len` cycles of level v, with an optional glitch in the middle.
  task automatic segment(input logic v, input int unsigned len, input bit glitch);
    int unsigned g, pos;
    g   = 1 + ($urandom % (LEN - 1));
    pos = LEN + ($urandom % 2);
    for (int unsigned i = 0; i < len; i++) begin
      @(negedge clk);
      if (i == 0 && v && !sig) rises.push_back(cyc + 1);
      if (glitch && i >= pos && i < pos + g) sig = !v;
      else                                    sig = v;
    end
  endtask

  initial begin
    int unsigned bad_lat;
    int unsigned level_errs;
    sig = 1'b0; cyc = 0; long_pulses = 0; edge_d = 1'b0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    level_errs = 0;
    segment(1'b0, 2 * LEN, 1'b0);
    for (int i = 0; i < 400; i++) begin
      int unsigned lh, ll;
      lh = 2 * LEN + 2 + ($urandom % 40);
      ll = 2 * LEN + 2 + ($urandom % 40);
      segment(1'b1, lh, ($urandom % 2) == 1);
      if (level !== 1'b1) level_errs++;
      segment(1'b0, ll, ($urandom % 2) == 1);
      if (level !== 1'b0) level_errs++;
    end
    repeat (2 * LEN) @(negedge clk);
    check(edges.size() == rises.size(),
          $sformatf("%0d edge pulses for %0d clean rises", edges.size(), rises.size()));
    bad_lat = 0;
    for (int i = 0; i < edges.size() && i < rises.size(); i++)
      if (edges[i] - rises[i] != LEN) begin
        bad_lat++;
        if (bad_lat < 4) $display("edge %0d latency %0d", i, edges[i] - rises[i]);
      end
    check(bad_lat == 0, "latency LEN cycles for every edge");
    check(long_pulses == 0, "edge pulses last one cycle");
    check(level_errs == 0, "clean level follows the input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
