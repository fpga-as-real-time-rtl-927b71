// AXI4-Lite address decoder ("intercon") between the processing system and
// the components of a gateware.
//
// The CPU sees one address range starting at BASE_ADDR. The intercon cuts it
// into NSLAVES equal windows of 2**SLOT_W bytes, one per component, in index
// order: component k answers at BASE_ADDR + k * 2**SLOT_W. A component gets
// only its offset inside its window, so it decodes nothing but its own
// register number. An address outside every window is answered by the
// intercon itself with DECERR (reads return 0).
//
// Each direction is a small state machine that handles one transaction at a
// time:
//   write: accept AW and W together from the master, present them to the
//          selected component until each is taken, then pass B straight
//          through from component to master.
//   read : accept AR, present it to the selected component until taken,
//          then pass R straight through.
// Request channels are therefore registered (one cycle of latency each way
// into the component) and response channels are combinational.
//
// Splitting the CPU range into per-component zones and handing each one its
// register number is what the lab's generated intercon does; equal power-of-
// two windows, the DECERR answer and the registered request path are this
// design's choices. Reset is asynchronous and active high.
module axil_intercon
  import tp_fpga_pkg::*;
#(
  parameter int unsigned NSLAVES   = 1,
  parameter axi_addr_t   BASE_ADDR = 32'h43C0_0000,
  parameter int unsigned SLOT_W    = 5
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t m_req_i,
  output axil_rsp_t m_rsp_o,
  output axil_req_t s_req_o [NSLAVES],
  input  axil_rsp_t s_rsp_i [NSLAVES]
);

  localparam int unsigned SEL_W = (NSLAVES > 1) ? $clog2(NSLAVES) : 1;
  localparam axi_addr_t   SPAN  = axi_addr_t'(NSLAVES) << SLOT_W;

  typedef enum logic [1:0] {W_IDLE, W_FWD, W_RESP, W_ERR} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_FWD, R_RESP, R_ERR} rstate_e;

  wstate_e          wstate_q;
  rstate_e          rstate_q;
  logic [SEL_W-1:0] wsel_q, rsel_q;
  axi_addr_t        awaddr_q, araddr_q;
  axi_data_t        wdata_q;
  logic [3:0]       wstrb_q;
  logic [2:0]       awprot_q, arprot_q;
  logic             aw_pend_q, w_pend_q, ar_pend_q;

  axi_addr_t        woff, roff;
  logic             whit, rhit;
  logic             w_take, r_take;

  assign woff   = m_req_i.awaddr - BASE_ADDR;
  assign roff   = m_req_i.araddr - BASE_ADDR;
  assign whit   = woff < SPAN;
  assign rhit   = roff < SPAN;
  assign w_take = (wstate_q == W_IDLE) && m_req_i.awvalid && m_req_i.wvalid;
  assign r_take = (rstate_q == R_IDLE) && m_req_i.arvalid;

  function automatic logic [SEL_W-1:0] slot_of(axi_addr_t off);
    return SEL_W'(off >> SLOT_W);
  endfunction

  function automatic axi_addr_t local_of(axi_addr_t off);
    axi_addr_t mask;
    mask = (axi_addr_t'(1) << SLOT_W) - 1;
    return off & mask;
  endfunction

  // ---------------------------------------------------------------- write
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wstate_q  <= W_IDLE;
      wsel_q    <= '0;
      awaddr_q  <= '0;
      awprot_q  <= '0;
      wdata_q   <= '0;
      wstrb_q   <= '0;
      aw_pend_q <= 1'b0;
      w_pend_q  <= 1'b0;
    end else begin
      unique case (wstate_q)
        W_IDLE: if (w_take) begin
          awaddr_q <= local_of(woff);
          awprot_q <= m_req_i.awprot;
          wdata_q  <= m_req_i.wdata;
          wstrb_q  <= m_req_i.wstrb;
          wsel_q   <= slot_of(woff);
          if (whit) begin
            aw_pend_q <= 1'b1;
            w_pend_q  <= 1'b1;
            wstate_q  <= W_FWD;
          end else begin
            wstate_q  <= W_ERR;
          end
        end
        W_FWD: begin
          if (s_rsp_i[wsel_q].awready) aw_pend_q <= 1'b0;
          if (s_rsp_i[wsel_q].wready)  w_pend_q  <= 1'b0;
          if ((!aw_pend_q || s_rsp_i[wsel_q].awready) &&
              (!w_pend_q  || s_rsp_i[wsel_q].wready))
            wstate_q <= W_RESP;
        end
        W_RESP: if (s_rsp_i[wsel_q].bvalid && m_req_i.bready) wstate_q <= W_IDLE;
        W_ERR:  if (m_req_i.bready) wstate_q <= W_IDLE;
        default: wstate_q <= W_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------------- read
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rstate_q  <= R_IDLE;
      rsel_q    <= '0;
      araddr_q  <= '0;
      arprot_q  <= '0;
      ar_pend_q <= 1'b0;
    end else begin
      unique case (rstate_q)
        R_IDLE: if (r_take) begin
          araddr_q <= local_of(roff);
          arprot_q <= m_req_i.arprot;
          rsel_q   <= slot_of(roff);
          if (rhit) begin
            ar_pend_q <= 1'b1;
            rstate_q  <= R_FWD;
          end else begin
            rstate_q  <= R_ERR;
          end
        end
        R_FWD: if (s_rsp_i[rsel_q].arready) begin
          ar_pend_q <= 1'b0;
          rstate_q  <= R_RESP;
        end
        R_RESP: if (s_rsp_i[rsel_q].rvalid && m_req_i.rready) rstate_q <= R_IDLE;
        R_ERR:  if (m_req_i.rready) rstate_q <= R_IDLE;
        default: rstate_q <= R_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- channel routing
  always_comb begin
    for (int k = 0; k < NSLAVES; k++) begin
      s_req_o[k]         = '0;
      s_req_o[k].awaddr  = awaddr_q;
      s_req_o[k].awprot  = awprot_q;
      s_req_o[k].wdata   = wdata_q;
      s_req_o[k].wstrb   = wstrb_q;
      s_req_o[k].araddr  = araddr_q;
      s_req_o[k].arprot  = arprot_q;
      if (k == int'(wsel_q)) begin
        s_req_o[k].awvalid = (wstate_q == W_FWD) && aw_pend_q;
        s_req_o[k].wvalid  = (wstate_q == W_FWD) && w_pend_q;
        s_req_o[k].bready  = (wstate_q == W_RESP) && m_req_i.bready;
      end
      if (k == int'(rsel_q)) begin
        s_req_o[k].arvalid = (rstate_q == R_FWD) && ar_pend_q;
        s_req_o[k].rready  = (rstate_q == R_RESP) && m_req_i.rready;
      end
    end

    m_rsp_o         = '0;
    m_rsp_o.awready = w_take;
    m_rsp_o.wready  = w_take;
    m_rsp_o.arready = r_take;
    unique case (wstate_q)
      W_RESP: begin
        m_rsp_o.bvalid = s_rsp_i[wsel_q].bvalid;
        m_rsp_o.bresp  = s_rsp_i[wsel_q].bresp;
      end
      W_ERR: begin
        m_rsp_o.bvalid = 1'b1;
        m_rsp_o.bresp  = RESP_DECERR;
      end
      default: ;
    endcase
    unique case (rstate_q)
      R_RESP: begin
        m_rsp_o.rvalid = s_rsp_i[rsel_q].rvalid;
        m_rsp_o.rresp  = s_rsp_i[rsel_q].rresp;
        m_rsp_o.rdata  = s_rsp_i[rsel_q].rdata;
      end
      R_ERR: begin
        m_rsp_o.rvalid = 1'b1;
        m_rsp_o.rresp  = RESP_DECERR;
      end
      default: ;
    endcase
  end

endmodule
