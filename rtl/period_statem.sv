// Acquisition state machine of the period counter: stores N consecutive
// periods in the buffer RAM.
//
// States:
//   IDLE            waits for the one-cycle start_i pulse from the CPU
//                   register layer, then clears the write address.
//   WAIT_FIRST_EDGE waits for a first edge_i, so that the first stored value
//                   is a whole period and not the time since start.
//   ACQUIRE_TIME    on every edge_i writes cpt_i (the count reached just
//                   before the counter is cleared by that same edge) to
//                   RAM[addr]; after the write of address N-1 returns to IDLE,
//                   otherwise moves to the next address.
// busy_o is high outside IDLE and is the CPU's status bit. The RAM write is
// combinational (ram_we_o = edge_i in ACQUIRE_TIME), in the same cycle as the
// edge, so it sees cpt_i before the clear.
//
// The three states, waiting for a first edge and the end test on the address
// follow the lab. N = 1024 (the lab's readout reads 1024 values) and the
// combinational write port are this design's choices. Reset is asynchronous,
// active high.
module period_statem #(
  parameter int unsigned N     = 1024,
  parameter int unsigned CPT_W = 32,
  localparam int unsigned AW   = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_i,
  input  logic             edge_i,
  input  logic [CPT_W-1:0] cpt_i,
  output logic             busy_o,
  output logic             ram_we_o,
  output logic [AW-1:0]    ram_addr_o,
  output logic [CPT_W-1:0] ram_wdata_o
);

  typedef enum logic [1:0] {IDLE, WAIT_FIRST_EDGE, ACQUIRE_TIME} state_e;

  state_e        state_q;
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= IDLE;
      addr_q  <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (start_i) begin
          addr_q  <= '0;
          state_q <= WAIT_FIRST_EDGE;
        end
        WAIT_FIRST_EDGE: if (edge_i) state_q <= ACQUIRE_TIME;
        ACQUIRE_TIME: if (edge_i) begin
          if (addr_q == AW'(N - 1)) state_q <= IDLE;
          else                      addr_q  <= addr_q + 1'b1;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy_o      = (state_q != IDLE);
  assign ram_we_o    = (state_q == ACQUIRE_TIME) && edge_i;
  assign ram_addr_o  = addr_q;
  assign ram_wdata_o = cpt_i;

endmodule
