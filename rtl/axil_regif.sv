// AXI4-Lite slave front end shared by the register blocks.
//
// It hides the five AXI4-Lite channels behind the small set of signals a
// register block needs: a one-cycle write strobe, a one-cycle read strobe, a
// register index common to both, the write data, and a read-data bus that the
// register block drives and holds (readdata_i).
//
// One transaction is handled at a time, writes first when both arrive
// together:
//   IDLE    : awready and wready rise together when both awvalid and wvalid
//             are high; arready rises when arvalid is high (and no write
//             waits). The address (and data) are captured.
//   WR_EN   : write_en_o is high for one cycle.
//   WR_RESP : bvalid with OKAY until bready.
//   RD_EN   : read_en_o is high for one cycle; the register block loads its
//             read register on this clock edge.
//   RD_RESP : rvalid with rdata = readdata_i until rready.
// A write therefore takes 3 cycles to its response and a read 3 cycles to its
// data (with bready/rready held high).
//
// The strobe/index/read-data split and the register index taken from the
// address with the two byte bits dropped follow the lab; the state sequence,
// the write priority and ignoring wstrb (all accesses are full 32-bit words)
// are this design's choices. Reset is asynchronous and active high.
module axil_regif
  import tp_fpga_pkg::*;
#(
  parameter int unsigned ADDR_W = 5    // byte address bits of the window
) (
  input  logic                clk,
  input  logic                rst,
  input  axil_req_t           axi_req_i,
  output axil_rsp_t           axi_rsp_o,
  output logic                write_en_o,
  output logic                read_en_o,
  output logic [ADDR_W-3:0]   addr_o,
  output axi_data_t           wdata_o,
  input  axi_data_t           readdata_i
);

  typedef enum logic [2:0] {
    S_IDLE, S_WR_EN, S_WR_RESP, S_RD_EN, S_RD_RESP
  } state_e;

  state_e state_q;
  logic   wr_accept, rd_accept;

  assign wr_accept = (state_q == S_IDLE) && axi_req_i.awvalid && axi_req_i.wvalid;
  assign rd_accept = (state_q == S_IDLE) && !wr_accept && axi_req_i.arvalid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= S_IDLE;
      addr_o  <= '0;
      wdata_o <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (wr_accept) begin
            addr_o  <= axi_req_i.awaddr[ADDR_W-1:2];
            wdata_o <= axi_req_i.wdata;
            state_q <= S_WR_EN;
          end else if (rd_accept) begin
            addr_o  <= axi_req_i.araddr[ADDR_W-1:2];
            state_q <= S_RD_EN;
          end
        end
        S_WR_EN:   state_q <= S_WR_RESP;
        S_WR_RESP: if (axi_req_i.bready) state_q <= S_IDLE;
        S_RD_EN:   state_q <= S_RD_RESP;
        S_RD_RESP: if (axi_req_i.rready) state_q <= S_IDLE;
        default:   state_q <= S_IDLE;
      endcase
    end
  end

  assign write_en_o = (state_q == S_WR_EN);
  assign read_en_o  = (state_q == S_RD_EN);

  always_comb begin
    axi_rsp_o         = '0;
    axi_rsp_o.awready = wr_accept;
    axi_rsp_o.wready  = wr_accept;
    axi_rsp_o.bvalid  = (state_q == S_WR_RESP);
    axi_rsp_o.bresp   = RESP_OKAY;
    axi_rsp_o.arready = rd_accept;
    axi_rsp_o.rvalid  = (state_q == S_RD_RESP);
    axi_rsp_o.rresp   = RESP_OKAY;
    axi_rsp_o.rdata   = readdata_i;
  end

  // AXI rule: a response stays valid, and unchanged, until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    axi_rsp_o.bvalid && !axi_req_i.bready |=> axi_rsp_o.bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    axi_rsp_o.rvalid && !axi_req_i.rready |=> axi_rsp_o.rvalid && $stable(axi_rsp_o.rdata));
  // The strobes are single-cycle pulses and never overlap.
  a_strobes: assert property (@(posedge clk) disable iff (rst)
    !(write_en_o && read_en_o));

endmodule
