// Shared types and constants of the CPU/FPGA co-processor gatewares.
//
// The processing system talks to the programmable logic over an AXI4-Lite
// bus. Every AXI channel is bundled into two structs, one for the signals a
// master drives (axil_req_t) and one for the signals a slave drives
// (axil_rsp_t). Addresses are always carried on 32 bits; a component only
// looks at the low bits of its own window.
//
// The register numbers are the word indexes seen by a component: the CPU
// byte address of register k is base + (k << 2). The numbers of the adder
// (ID, OP1, OP2, RESULT) and of the acquisition blocks (ID, STATUS, START,
// DATA) follow the register maps of the lab; REG_OPER, the add/subtract
// selector of the adder, sits at the next free index by this design's choice.
package tp_fpga_pkg;

  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 32;

  // Core clock of the programmable logic: 125 MHz, one count = 8 ns.
  localparam int unsigned CLK_FREQ_HZ = 125_000_000;

  typedef logic [AXI_ADDR_W-1:0] axi_addr_t;
  typedef logic [AXI_DATA_W-1:0] axi_data_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Signals driven by the AXI4-Lite master.
  typedef struct packed {
    axi_addr_t   awaddr;
    logic [2:0]  awprot;
    logic        awvalid;
    axi_data_t   wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    axi_addr_t   araddr;
    logic [2:0]  arprot;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  // Signals driven by the AXI4-Lite slave.
  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    axi_data_t   rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // Register width inside a component: C_S00_AXI_ADDR_WIDTH = 5 byte
  // address bits, i.e. 3 bits of 32-bit register index.
  localparam int unsigned REG_ADDR_W = 3;
  typedef logic [REG_ADDR_W-1:0] reg_addr_t;

  // Adder registers.
  localparam reg_addr_t REG_ID     = 3'd0;
  localparam reg_addr_t REG_OP1    = 3'd1;
  localparam reg_addr_t REG_OP2    = 3'd2;
  localparam reg_addr_t REG_RESULT = 3'd3;
  localparam reg_addr_t REG_OPER   = 3'd4;

  // Acquisition (RAM filling and period counter) registers.
  localparam reg_addr_t REG_STATUS = 3'd1;
  localparam reg_addr_t REG_START  = 3'd2;
  localparam reg_addr_t REG_DATA   = 3'd3;

endpackage
