// Period measurement block: measures the time between consecutive rising
// edges of an external signal, in periods of the 125 MHz clock (8 ns), and
// stores N such measurements for the CPU.
//
// Data path: the external signal is cleaned and its rising edges detected
// (debounce_edge); a 32-bit counter runs between edges and is cleared by each
// one (period_cpt); the state machine (period_statem) waits for the CPU's
// start, skips to the first edge and then writes the counter value at every
// following edge into the buffer RAM (dp_ram), N times. The CPU talks to it
// through the same register map as the RAM acquisition block (acq_comm):
//   0 ID, 1 STATUS (bit 0 busy), 2 START (write 1), 3 DATA (auto-increment).
// A stored value V means two rising edges (V + 1) clock periods apart, that
// is (V + 1) * 8 ns. level_o is the cleaned level of the external signal and
// busy_o the acquisition status, both brought out for observation.
//
// The three processes and their connections (edge detection to both the
// counter and the state machine, counter value and write port to the RAM)
// follow the lab's block diagram; the communication layer is the one of the
// RAM acquisition block, as in the lab. Reset is asynchronous, active high.
module period_counter_ip
  import tp_fpga_pkg::*;
#(
  parameter int unsigned ID           = 1,
  parameter int unsigned ADDR_W       = 5,
  parameter int unsigned N            = 1024,
  parameter int unsigned CPT_W        = 32,
  parameter int unsigned DEBOUNCE_LEN = 8,
  localparam int unsigned AW          = $clog2(N)
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axi_req_i,
  output axil_rsp_t axi_rsp_o,
  input  logic      external_signal,
  output logic      level_o,
  output logic      busy_o
);

  logic             start, detect_edge;
  logic [CPT_W-1:0] cpt;
  logic             ram_we;
  logic [AW-1:0]    ram_waddr, ram_raddr;
  logic [CPT_W-1:0] ram_wdata, ram_rdata;

  acq_comm #(.ID(ID), .ADDR_W(ADDR_W), .DEPTH(N), .DATA_W(CPT_W)) u_comm (
    .clk         (clk),
    .rst         (rst),
    .axi_req_i   (axi_req_i),
    .axi_rsp_o   (axi_rsp_o),
    .busy_i      (busy_o),
    .start_o     (start),
    .data_val_i  (ram_rdata),
    .data_addr_o (ram_raddr)
  );

  debounce_edge #(.LEN(DEBOUNCE_LEN)) u_debounce (
    .clk     (clk),
    .rst     (rst),
    .sig_i   (external_signal),
    .level_o (level_o),
    .edge_o  (detect_edge)
  );

  period_cpt #(.W(CPT_W)) u_cpt (
    .clk    (clk),
    .rst    (rst),
    .edge_i (detect_edge),
    .cpt_o  (cpt)
  );

  period_statem #(.N(N), .CPT_W(CPT_W)) u_statem (
    .clk         (clk),
    .rst         (rst),
    .start_i     (start),
    .edge_i      (detect_edge),
    .cpt_i       (cpt),
    .busy_o      (busy_o),
    .ram_we_o    (ram_we),
    .ram_addr_o  (ram_waddr),
    .ram_wdata_o (ram_wdata)
  );

  dp_ram #(.DEPTH(N), .DATA_W(CPT_W)) u_ram (
    .clk     (clk),
    .we_i    (ram_we),
    .waddr_i (ram_waddr),
    .wdata_i (ram_wdata),
    .raddr_i (ram_raddr),
    .rdata_o (ram_rdata)
  );

endmodule
