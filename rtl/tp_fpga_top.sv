// Top level: the three co-processor gatewares of the lab side by side.
//
// Each gateware is an AXI4-Lite address decoder (axil_intercon) from the
// processing system's exported bus to one component, at CPU base address
// 0x43C0_0000 in a 32-byte window (8 registers):
//   add_*  : the adder/subtractor register block (addition_ip)
//   ram_*  : the RAM pseudo-acquisition block (ram_acq_ip)
//   cnt_*  : the period measurement block (period_counter_ip) with its
//            external input external_signal (a GPIO driven by the CPU under
//            test in the lab)
// On the board each one is a separate bitstream, loaded in turn; here their
// AXI ports are simply brought out separately, so one simulation can drive
// all three. The processing system itself (ARM cores, global interconnect,
// interrupt controller, clock PLL) is outside this RTL: clk is the 125 MHz
// fabric clock and rst its active-high reset, both supplied by it.
module tp_fpga_top
  import tp_fpga_pkg::*;
#(
  parameter axi_addr_t   BASE_ADDR    = 32'h43C0_0000,
  parameter int unsigned N            = 1024,
  parameter int unsigned DEBOUNCE_LEN = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t add_axi_req_i,
  output axil_rsp_t add_axi_rsp_o,
  input  axil_req_t ram_axi_req_i,
  output axil_rsp_t ram_axi_rsp_o,
  output logic      ram_busy_o,
  input  axil_req_t cnt_axi_req_i,
  output axil_rsp_t cnt_axi_rsp_o,
  input  logic      external_signal,
  output logic      cnt_level_o,
  output logic      cnt_busy_o
);

  localparam int unsigned SLOT_W = 5;

  axil_req_t add_req [1], ram_req [1], cnt_req [1];
  axil_rsp_t add_rsp [1], ram_rsp [1], cnt_rsp [1];

  // ------------------------------------------------------------ adder
  axil_intercon #(.NSLAVES(1), .BASE_ADDR(BASE_ADDR), .SLOT_W(SLOT_W)) u_add_ic (
    .clk (clk), .rst (rst),
    .m_req_i (add_axi_req_i), .m_rsp_o (add_axi_rsp_o),
    .s_req_o (add_req),       .s_rsp_i (add_rsp)
  );

  addition_ip #(.ID(1), .ADDR_W(SLOT_W)) u_add (
    .clk (clk), .rst (rst),
    .axi_req_i (add_req[0]), .axi_rsp_o (add_rsp[0])
  );

  // ---------------------------------------------------- RAM acquisition
  axil_intercon #(.NSLAVES(1), .BASE_ADDR(BASE_ADDR), .SLOT_W(SLOT_W)) u_ram_ic (
    .clk (clk), .rst (rst),
    .m_req_i (ram_axi_req_i), .m_rsp_o (ram_axi_rsp_o),
    .s_req_o (ram_req),       .s_rsp_i (ram_rsp)
  );

  ram_acq_ip #(.ID(1), .ADDR_W(SLOT_W), .DEPTH(N)) u_ram (
    .clk (clk), .rst (rst),
    .axi_req_i (ram_req[0]), .axi_rsp_o (ram_rsp[0]),
    .busy_o (ram_busy_o)
  );

  // --------------------------------------------------- period counter
  axil_intercon #(.NSLAVES(1), .BASE_ADDR(BASE_ADDR), .SLOT_W(SLOT_W)) u_cnt_ic (
    .clk (clk), .rst (rst),
    .m_req_i (cnt_axi_req_i), .m_rsp_o (cnt_axi_rsp_o),
    .s_req_o (cnt_req),       .s_rsp_i (cnt_rsp)
  );

  period_counter_ip #(.ID(1), .ADDR_W(SLOT_W), .N(N), .CPT_W(32),
                      .DEBOUNCE_LEN(DEBOUNCE_LEN)) u_cnt (
    .clk (clk), .rst (rst),
    .axi_req_i (cnt_req[0]), .axi_rsp_o (cnt_rsp[0]),
    .external_signal (external_signal),
    .level_o (cnt_level_o),
    .busy_o (cnt_busy_o)
  );

endmodule
