// AXI4-Lite bus master used by the testbenches in place of the processing
// system: it plays the CPU's 32-bit loads and stores (the accesses a user
// program makes through its memory mapping of the FPGA range).
//
// Call write(addr, data, resp) and read(addr, data, resp) hierarchically.
// Signals are driven 1 ns after the falling clock edge and the slave's ready
// and valid outputs are sampled 1 ns after the falling edge too, so the
// handshakes happen on the following rising edge with no race. bready and
// rready are held high while a response is awaited. Each task also returns
// the number of clock cycles the transaction took, from the cycle its
// request went valid to the cycle its response was taken. A transaction that
// does not finish within TIMEOUT cycles reports an error.
`timescale 1ns/1ps
module axil_master_bfm
  import tp_fpga_pkg::*;
#(
  parameter int unsigned TIMEOUT = 1000
) (
  input  logic      clk,
  output axil_req_t req_o,
  input  axil_rsp_t rsp_i
);

  int unsigned last_cycles;
  int unsigned timeouts;

  initial begin
    req_o       = '0;
    last_cycles = 0;
    timeouts    = 0;
  end

  task automatic write(input axi_addr_t addr, input axi_data_t data,
                       output logic [1:0] resp);
    bit aw_done, w_done;
    int unsigned n;
    aw_done = 0;
    w_done  = 0;
    n       = 0;
    resp    = 2'b00;
    @(negedge clk);
    req_o.awaddr  = addr;
    req_o.awprot  = 3'b000;
    req_o.awvalid = 1'b1;
    req_o.wdata   = data;
    req_o.wstrb   = 4'hF;
    req_o.wvalid  = 1'b1;
    req_o.bready  = 1'b1;
    while (1) begin
      #1;
      if (req_o.awvalid && rsp_i.awready) aw_done = 1;
      if (req_o.wvalid  && rsp_i.wready)  w_done  = 1;
      if (aw_done && w_done && rsp_i.bvalid) begin
        resp = rsp_i.bresp;
        @(negedge clk);
        n++;
        break;
      end
      @(negedge clk);
      n++;
      if (aw_done) req_o.awvalid = 1'b0;
      if (w_done)  req_o.wvalid  = 1'b0;
      if (n > TIMEOUT) begin
        timeouts++;
        $display("BFM: write timeout at %h", addr);
        break;
      end
    end
    req_o.awvalid = 1'b0;
    req_o.wvalid  = 1'b0;
    req_o.bready  = 1'b0;
    last_cycles   = n;
  endtask

  task automatic read(input axi_addr_t addr, output axi_data_t data,
                      output logic [1:0] resp);
    bit ar_done;
    int unsigned n;
    ar_done = 0;
    n       = 0;
    data    = '0;
    resp    = 2'b00;
    @(negedge clk);
    req_o.araddr  = addr;
    req_o.arprot  = 3'b000;
    req_o.arvalid = 1'b1;
    req_o.rready  = 1'b1;
    while (1) begin
      #1;
      if (req_o.arvalid && rsp_i.arready) ar_done = 1;
      if (ar_done && rsp_i.rvalid) begin
        data = rsp_i.rdata;
        resp = rsp_i.rresp;
        @(negedge clk);
        n++;
        break;
      end
      @(negedge clk);
      n++;
      if (ar_done) req_o.arvalid = 1'b0;
      if (n > TIMEOUT) begin
        timeouts++;
        $display("BFM: read timeout at %h", addr);
        break;
      end
    end
    req_o.arvalid = 1'b0;
    req_o.rready  = 1'b0;
    last_cycles   = n;
  endtask

endmodule
