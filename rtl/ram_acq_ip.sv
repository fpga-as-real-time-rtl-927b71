// RAM acquisition gateware block: a long treatment started by the CPU,
// simulated by filling a RAM, whose result the CPU then reads back.
//
// It joins three parts: the CPU register layer (acq_comm: ID, STATUS with the
// busy bit, START pulse, DATA with auto-increment), the pseudo acquisition
// (pseudo_acq: writes the ramp 0..DEPTH-1) and the buffer RAM (dp_ram). The
// CPU's sequence is: check ID = 1, write 1 to START, poll STATUS until bit 0
// is 0 (DEPTH cycles, 8.192 us at 125 MHz for 1024 words), then read DATA
// DEPTH times to get 0, 1, ..., DEPTH-1.
//
// The split into register layer, acquisition process and RAM wrapper follows
// the lab. Reset is asynchronous, active high.
module ram_acq_ip
  import tp_fpga_pkg::*;
#(
  parameter int unsigned ID     = 1,
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axi_req_i,
  output axil_rsp_t axi_rsp_o,
  output logic      busy_o
);

  logic            start;
  logic            ram_we;
  logic [AW-1:0]   ram_waddr, ram_raddr;
  axi_data_t       ram_wdata, ram_rdata;

  acq_comm #(.ID(ID), .ADDR_W(ADDR_W), .DEPTH(DEPTH), .DATA_W(AXI_DATA_W)) u_comm (
    .clk         (clk),
    .rst         (rst),
    .axi_req_i   (axi_req_i),
    .axi_rsp_o   (axi_rsp_o),
    .busy_i      (busy_o),
    .start_o     (start),
    .data_val_i  (ram_rdata),
    .data_addr_o (ram_raddr)
  );

  pseudo_acq #(.DEPTH(DEPTH), .DATA_W(AXI_DATA_W)) u_acq (
    .clk         (clk),
    .rst         (rst),
    .start_i     (start),
    .busy_o      (busy_o),
    .ram_we_o    (ram_we),
    .ram_addr_o  (ram_waddr),
    .ram_wdata_o (ram_wdata)
  );

  dp_ram #(.DEPTH(DEPTH), .DATA_W(AXI_DATA_W)) u_ram (
    .clk     (clk),
    .we_i    (ram_we),
    .waddr_i (ram_waddr),
    .wdata_i (ram_wdata),
    .raddr_i (ram_raddr),
    .rdata_o (ram_rdata)
  );

endmodule
