// Adder/subtractor register block on an AXI4-Lite slave port.
//
// The CPU writes two 32-bit operands and reads back their sum, or their
// difference when the operation register is set. Registers (32-bit words,
// byte offset = index * 4):
//   0 ID     RO  constant ID parameter
//   1 OP1    RW  first operand
//   2 OP2    RW  second operand
//   3 RESULT RO  OP1 + OP2, or OP1 - OP2 when OPER[0] = 1 (modulo 2**32)
//   4 OPER   RW  bit 0: 0 = add, 1 = subtract
//   other       reads 0, writes ignored
// The result is combinational from the operand registers; reads are
// registered (the read register is loaded on the read strobe and held
// otherwise), so a read returns 3 cycles after its address is accepted.
//
// The ID, operand and result registers at indexes 0..3, the ID default of 1,
// the held read register, and the two lab extensions (operands readable,
// add/subtract selection) follow the lab. The index of OPER and the reset
// values of 0 are this design's choices. Reset is asynchronous, active high.
module addition_ip
  import tp_fpga_pkg::*;
#(
  parameter int unsigned ID     = 1,
  parameter int unsigned ADDR_W = 5
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axi_req_i,
  output axil_rsp_t axi_rsp_o
);

  logic             write_en, read_en;
  logic [ADDR_W-3:0] addr;
  axi_data_t        wdata, readdata_q;
  axi_data_t        op1_q, op2_q, result;
  logic             sub_q;

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

  assign result = sub_q ? (op1_q - op2_q) : (op1_q + op2_q);

  // Write process: the addressed operand/operation register takes the data.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      op1_q <= '0;
      op2_q <= '0;
      sub_q <= 1'b0;
    end else if (write_en) begin
      unique case (reg_addr_t'(addr))
        REG_OP1:  op1_q <= wdata;
        REG_OP2:  op2_q <= wdata;
        REG_OPER: sub_q <= wdata[0];
        default:  ;
      endcase
    end
  end

  // Read process: the read register is loaded on the read strobe only.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      readdata_q <= '0;
    end else if (read_en) begin
      unique case (reg_addr_t'(addr))
        REG_ID:     readdata_q <= axi_data_t'(ID);
        REG_OP1:    readdata_q <= op1_q;
        REG_OP2:    readdata_q <= op2_q;
        REG_RESULT: readdata_q <= result;
        REG_OPER:   readdata_q <= {{(AXI_DATA_W-1){1'b0}}, sub_q};
        default:    readdata_q <= '0;
      endcase
    end
  end

endmodule
