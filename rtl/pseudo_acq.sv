// Pseudo acquisition: stands in for a long treatment by filling the buffer
// RAM with a ramp.
//
// Two states, told apart by busy_o. Idle (busy_o = 0): wait for the one-cycle
// start_i pulse, then clear the counter and raise busy_o. Busy: on every
// cycle write the counter value to the RAM at the address equal to that same
// value (ram_we_o = 1, ram_addr_o = ram_wdata_o = counter), then count up;
// after the write of DEPTH-1 busy_o falls. An acquisition thus holds busy_o
// for exactly DEPTH cycles and leaves RAM[k] = k for every k. start_i is
// ignored while busy.
//
// The two states, the counter used as both address and data, the end at
// 2**10 - 1 and busy_o as the CPU's status bit follow the lab. The lab's own
// process registered the data but not the address, which stored each value
// one word too high (RAM[0] received the last value); here address and data
// are driven from the same counter in the same cycle, which is the correction
// the lab asks for. Reset is asynchronous, active high.
module pseudo_acq #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start_i,
  output logic              busy_o,
  output logic              ram_we_o,
  output logic [AW-1:0]     ram_addr_o,
  output logic [DATA_W-1:0] ram_wdata_o
);

  logic [AW-1:0] cnt_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy_o <= 1'b0;
      cnt_q  <= '0;
    end else if (!busy_o) begin
      if (start_i) begin
        busy_o <= 1'b1;
        cnt_q  <= '0;
      end
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == AW'(DEPTH - 1)) busy_o <= 1'b0;
    end
  end

  assign ram_we_o    = busy_o;
  assign ram_addr_o  = cnt_q;
  assign ram_wdata_o = DATA_W'(cnt_q);

endmodule
