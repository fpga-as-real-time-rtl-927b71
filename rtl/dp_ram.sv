// Simple dual-port RAM: one write port, one synchronous read port.
//
// DEPTH words of DATA_W bits. A word is written on the clock edge where we_i
// is high. rdata_o is registered: it shows the word at raddr_i as it was
// before the current edge, one cycle after the address is presented, and is
// refreshed on every edge (a write to the read address shows up one cycle
// after the write). No reset: the contents start undefined, as in a block
// RAM.
//
// The 1024 x 32 size is the lab's acquisition buffer (1024 samples of a 32-bit
// bus); the port arrangement and the registered read are this design's
// choices, made to map on an FPGA block RAM.
module dp_ram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [AW-1:0]     waddr_i,
  input  logic [DATA_W-1:0] wdata_i,
  input  logic [AW-1:0]     raddr_i,
  output logic [DATA_W-1:0] rdata_o
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    rdata_o <= mem[raddr_i];
  end

endmodule
