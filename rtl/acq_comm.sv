// CPU register layer of the acquisition blocks (RAM filling and period
// counter).
//
// It lets the CPU start an acquisition, poll whether it is finished and then
// read the stored samples one after the other from a single register, the
// buffer read pointer advancing by itself on every read (a pseudo FIFO).
// Registers (32-bit words, byte offset = index * 4):
//   0 ID     RO  constant ID parameter
//   1 STATUS RO  bit 0 = busy_i, the acquisition in progress
//   2 START  RW  writing bit 0 = 1 pulses start_o for exactly one cycle;
//                the bit does not stay set, so it reads back as 0
//   3 DATA   RO  returns the RAM word at the read pointer, then moves the
//                pointer to the next word (wrapping from DEPTH-1 to 0)
//   other       reads 0, writes ignored
// The RAM's registered read port is driven by data_addr_o and its output is
// data_val_i; since the pointer moves on the read strobe and the next DATA
// read comes at least 4 cycles later, data_val_i has always caught up.
//
// The register map, the one-cycle start pulse, the status bit and the
// auto-incrementing, wrapping read pointer follow the lab. Clearing the read
// pointer when an acquisition is started is this design's choice: together
// with the aligned write in the acquisition processes it makes the first DATA
// read after an acquisition return sample 0. Reset is asynchronous, active
// high.
module acq_comm
  import tp_fpga_pkg::*;
#(
  parameter int unsigned ID     = 1,
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  axil_req_t         axi_req_i,
  output axil_rsp_t         axi_rsp_o,
  input  logic              busy_i,
  output logic              start_o,
  input  logic [DATA_W-1:0] data_val_i,
  output logic [AW-1:0]     data_addr_o
);

  logic              write_en, read_en;
  logic [ADDR_W-3:0] addr;
  axi_data_t         wdata, readdata_q;
  logic              start_wr;

  axil_regif #(.ADDR_W(ADDR_W)) u_regif (
    .clk        (clk),
    .rst        (rst),
    .axi_req_i  (axi_req_i),
    .axi_rsp_o  (axi_rsp_o),
    .write_en_o (write_en),
    .read_en_o  (read_en),
    .addr_o     (addr),
    .wdata_o    (wdata),
    .readdata_i (readdata_q)
  );

  assign start_wr = write_en && (reg_addr_t'(addr) == REG_START);

  // Write management: START is a pulse, cleared on the next cycle.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) start_o <= 1'b0;
    else     start_o <= start_wr && wdata[0];
  end

  // Read management.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      readdata_q  <= '0;
      data_addr_o <= '0;
    end else begin
      if (start_wr && wdata[0]) data_addr_o <= '0;
      if (read_en) begin
        unique case (reg_addr_t'(addr))
          REG_ID:     readdata_q <= axi_data_t'(ID);
          REG_STATUS: readdata_q <= {{(AXI_DATA_W-1){1'b0}}, busy_i};
          REG_START:  readdata_q <= {{(AXI_DATA_W-1){1'b0}}, start_o};
          REG_DATA: begin
            readdata_q  <= axi_data_t'(data_val_i);
            data_addr_o <= data_addr_o + 1'b1;
          end
          default:    readdata_q <= '0;
        endcase
      end
    end
  end

endmodule
