// ahb_external_memory_registers: configuration slave of the external memory
// controller.
//
// An AHB slave (selected by hsel_reg) holding the settings the memory
// controller reads: a global enable, a read_only flag, and for each of the four
// banks a read wait-state count and a write wait-state count. The set of
// settings is the design's; their layout and reset values are this design's
// own choice:
//   offset 0x0  CTRL     [0] enable (reset 1), [1] read_only (reset 0)
//   offset 0x4  RD_WAIT  [4b+3:4b] read_wait_state<b>, b = 0..3 (reset 0)
//   offset 0x8  WR_WAIT  [4b+3:4b] write_wait_state<b>, b = 0..3 (reset 0)
// Other offsets read as 0 and ignore writes. Registers are written as whole
// words, whatever the transfer size.
//
// Timing: zero wait states, always OKAY. The address phase is registered; in
// the following data phase a write takes hwdata and a read returns the
// register on hrdata_reg. A read of a register that is written in the
// preceding transfer returns the new value.
module ahb_external_memory_registers
  import emc_pkg::*;
(
  input  logic                hclk,
  input  logic                hreset_n,
  input  logic                hsel_reg,
  input  logic [31:0]         haddr,
  input  logic [1:0]          htrans,
  input  logic                hwrite,
  input  logic [2:0]          hsize,
  input  logic [31:0]         hwdata,
  input  logic                hready,
  output logic                hready_reg,
  output logic [1:0]          hresp_reg,
  output logic [31:0]         hrdata_reg,
  output logic                enable,
  output logic                read_only,
  output wait_t [N_BANKS-1:0] read_wait_state,
  output wait_t [N_BANKS-1:0] write_wait_state
);

  logic       dp_valid, dp_write;
  logic [3:0] dp_offset;
  logic [N_BANKS*WS_W-1:0] rd_wait_q, wr_wait_q;

  // address phase
  always_ff @(posedge hclk or negedge hreset_n) begin
    if (!hreset_n) begin
      dp_valid  <= 1'b0;
      dp_write  <= 1'b0;
      dp_offset <= '0;
    end else if (hready) begin
      dp_valid  <= hsel_reg && htrans[1];
      dp_write  <= hwrite;
      dp_offset <= haddr[3:0];
    end
  end

  // data phase: register writes
  always_ff @(posedge hclk or negedge hreset_n) begin
    if (!hreset_n) begin
      enable    <= 1'b1;
      read_only <= 1'b0;
      rd_wait_q <= '0;
      wr_wait_q <= '0;
    end else if (dp_valid && dp_write) begin
      case (dp_offset)
        REG_CTRL:    begin enable <= hwdata[0]; read_only <= hwdata[1]; end
        REG_RD_WAIT: rd_wait_q <= hwdata[N_BANKS*WS_W-1:0];
        REG_WR_WAIT: wr_wait_q <= hwdata[N_BANKS*WS_W-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    hrdata_reg = '0;
    if (dp_valid && !dp_write) begin
      case (dp_offset)
        REG_CTRL:    hrdata_reg = {30'b0, read_only, enable};
        REG_RD_WAIT: hrdata_reg = 32'(rd_wait_q);
        REG_WR_WAIT: hrdata_reg = 32'(wr_wait_q);
        default:     hrdata_reg = '0;
      endcase
    end
  end

  assign hready_reg = 1'b1;
  assign hresp_reg  = HRESP_OKAY;

  always_comb begin
    for (int b = 0; b < int'(N_BANKS); b++) begin
      read_wait_state[b]  = rd_wait_q[b*WS_W +: WS_W];
      write_wait_state[b] = wr_wait_q[b*WS_W +: WS_W];
    end
  end

endmodule
