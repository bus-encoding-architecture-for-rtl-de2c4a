// ahb_external_memory_controller: AHB slave that runs the external memory
// cycles, with bus-invert coding on the off-chip data lines.
//
// One AHB slave port serves four memory banks: hsel_mem has one select bit per
// bank (one-hot), and bank b drives chip enable, output enable and write enable
// bit b. Each transfer (single or one beat of a burst, 8, 16 or 32 bits) becomes
// one external memory cycle on the byte lanes the transfer addresses.
//
// Write path: hwdata is passed through the bus-invert coder (one invert bit
// per 8-bit lane) into the registers that drive mem_dataout_o and
// mem_invertbits_o; only the addressed lanes are updated, so idle lanes do not
// toggle. Read path: mem_data_i is conditionally inverted lane by lane by
// mem_invertbits_i and returned on hrdata_mem in its own byte lanes.
//
// Timing (all memory outputs are registered):
//   address phase  accepted when hready, htrans is NONSEQ or SEQ and a bit of
//                  hsel_mem is set; BUSY and IDLE get the zero-wait OKAY reply
//   START          first data-phase cycle: hwdata is coded, strobes are set up
//   ACCESS         strobes active for 1 + wait cycles (wait = the bank's
//                  read_wait_state or write_wait_state)
//   completion     one cycle with hready_mem = 1; for a read, the memory data
//                  (one cycle behind the strobes) is decoded onto hrdata_mem
// so a data phase takes wait + 3 cycles. A new address phase is accepted in
// the completion cycle, so bursts run back to back.
// When enable is 0, or for a write while read_only is 1, no memory cycle is
// run and the slave gives the two-cycle AHB ERROR response straight after
// the address phase (data phase of 2 cycles).
//
// The ports, the coding and the per-lane behaviour follow the design; the
// state sequence, the wait-state counting, the ERROR cases and the mapping of
// the 4-bit enables to banks are this implementation's choices.
// INVERT_EN = 0 builds the reference controller without bus-invert coding.
module ahb_external_memory_controller
  import emc_pkg::*;
#(
  parameter bit INVERT_EN = 1'b1
) (
  input  logic                hclk,
  input  logic                hreset_n,
  // AHB slave
  input  logic [N_BANKS-1:0]  hsel_mem,
  input  logic [31:0]         haddr,
  input  logic [1:0]          htrans,
  input  logic                hwrite,
  input  logic [2:0]          hsize,
  input  logic [31:0]         hwdata,
  input  logic                hready,
  output logic                hready_mem,
  output logic [1:0]          hresp_mem,
  output logic [31:0]         hrdata_mem,
  // configuration
  input  logic                enable,
  input  logic                read_only,
  input  wait_t [N_BANKS-1:0] read_wait_state,
  input  wait_t [N_BANKS-1:0] write_wait_state,
  // external memory
  output logic                mem_dataout_en_o,
  output logic [31:0]         mem_dataout_o,
  output logic [3:0]          mem_invertbits_o,
  output logic [31:0]         mem_address_o,
  output logic [3:0]          mem_byte_enabled_n_o,
  output logic [3:0]          mem_output_enabled_n_o,
  output logic [3:0]          mem_write_enabled_n_o,
  output logic [3:0]          mem_chip_enabled_n_o,
  input  logic [31:0]         mem_data_i,
  input  logic [3:0]          mem_invertbits_i
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_ACCESS, S_RDATA, S_ERR1, S_ERR2} state_t;

  state_t      state;
  logic        accept, can_accept;
  logic [31:0] a_addr;
  logic        a_write;
  lane_mask_t  a_lanes;
  logic [1:0]  a_bank;
  wait_t       cnt;
  logic        addr_ok;
  logic [1:0]  sel_bank;

  // one-hot bank select to bank number
  always_comb begin
    sel_bank = '0;
    for (int b = N_BANKS - 1; b >= 0; b--)
      if (hsel_mem[b]) sel_bank = 2'(b);
  end

  assign can_accept = (state == S_IDLE) || (state == S_RDATA) || (state == S_ERR2);
  assign accept     = can_accept && hready && (|hsel_mem) && htrans[1];
  assign addr_ok    = enable && !(hwrite && read_only);

  // AHB address phase
  always_ff @(posedge hclk or negedge hreset_n) begin
    if (!hreset_n) begin
      a_addr  <= '0;
      a_write <= 1'b0;
      a_lanes <= '0;
      a_bank  <= '0;
    end else if (accept) begin
      a_addr  <= haddr;
      a_write <= hwrite;
      a_lanes <= ahb_lanes(hsize, haddr[1:0]);
      a_bank  <= sel_bank;
    end
  end

  // transfer sequencing and memory strobes
  always_ff @(posedge hclk or negedge hreset_n) begin
    if (!hreset_n) begin
      state                  <= S_IDLE;
      cnt                    <= '0;
      mem_address_o          <= '0;
      mem_byte_enabled_n_o   <= '1;
      mem_output_enabled_n_o <= '1;
      mem_write_enabled_n_o  <= '1;
      mem_chip_enabled_n_o   <= '1;
      mem_dataout_en_o       <= 1'b0;
    end else begin
      case (state)
        S_IDLE, S_RDATA, S_ERR2: state <= !accept ? S_IDLE : addr_ok ? S_START : S_ERR1;
        S_START: begin
          state                        <= S_ACCESS;
          mem_address_o                <= a_addr;
          mem_byte_enabled_n_o         <= ~a_lanes;
          mem_chip_enabled_n_o[a_bank] <= 1'b0;
          if (a_write) begin
            mem_write_enabled_n_o[a_bank] <= 1'b0;
            mem_dataout_en_o              <= 1'b1;
            cnt                           <= write_wait_state[a_bank];
          end else begin
            mem_output_enabled_n_o[a_bank] <= 1'b0;
            cnt                            <= read_wait_state[a_bank];
          end
        end
        S_ACCESS: begin
          if (cnt == '0) begin
            state                  <= a_write ? S_IDLE : S_RDATA;
            mem_byte_enabled_n_o   <= '1;
            mem_output_enabled_n_o <= '1;
            mem_write_enabled_n_o  <= '1;
            mem_chip_enabled_n_o   <= '1;
            mem_dataout_en_o       <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_ERR1:  state <= S_ERR2;
        default: state <= S_IDLE;
      endcase
    end
  end

  // write path: bus-invert coder owns mem_dataout_o / mem_invertbits_o
  bus_invert_encoder #(
    .N_LANES  (N_LANES),
    .LANE_W   (LANE_W),
    .INVERT_EN(INVERT_EN)
  ) u_encoder (
    .clk      (hclk),
    .rst_n    (hreset_n),
    .load_i   ((state == S_START) && a_write),
    .lane_en_i(a_lanes),
    .data_i   (hwdata),
    .bus_o    (mem_dataout_o),
    .inv_o    (mem_invertbits_o)
  );

  // read path: conditional inversion per byte lane
  bus_invert_decoder #(
    .N_LANES(N_LANES),
    .LANE_W (LANE_W)
  ) u_decoder (
    .data_i(mem_data_i),
    .inv_i (mem_invertbits_i),
    .data_o(hrdata_mem)
  );

  // AHB response
  assign hready_mem = can_accept;
  assign hresp_mem  = (state == S_ERR1 || state == S_ERR2) ? HRESP_ERROR : HRESP_OKAY;

  // AHB rules: the slave selects are one-hot, and an ERROR takes two cycles
  a_onehot_sel: assert property (@(posedge hclk) disable iff (!hreset_n)
    (htrans[1] && hready) |-> $onehot0(hsel_mem));
  a_error_two_cycles: assert property (@(posedge hclk) disable iff (!hreset_n)
    (hresp_mem == HRESP_ERROR && !hready_mem) |=> (hresp_mem == HRESP_ERROR && hready_mem));

endmodule
