// external_memory_controller: the external memory controller (EMC) as a whole.
//
// Encapsulates the two AHB slaves of the EMC: ahb_external_memory_registers
// (selected by hsel_reg) holds enable, read_only and the per-bank read and
// write wait states, and ahb_external_memory_controller (selected by the four
// bits of hsel_mem, one per bank) runs the external memory cycles with
// bus-invert coding on the data lines. Both slaves share the AHB address,
// control and write-data signals and each returns its own hready, hresp and
// hrdata, to be multiplexed by the AHB like any other slave. The off-chip
// side carries 32 data lines out and in, plus four invert bits each way, one
// per byte lane. Port names follow the design; see the two slaves for timing.
module external_memory_controller
  import emc_pkg::*;
#(
  parameter bit INVERT_EN = 1'b1
) (
  input  logic               hclk,
  input  logic               hreset_n,
  input  logic               hsel_reg,
  input  logic [N_BANKS-1:0] hsel_mem,
  input  logic [31:0]        haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [2:0]         hsize,
  input  logic [31:0]        hwdata,
  input  logic               hready,
  output logic               hready_reg,
  output logic [1:0]         hresp_reg,
  output logic [31:0]        hrdata_reg,
  output logic               hready_mem,
  output logic [1:0]         hresp_mem,
  output logic [31:0]        hrdata_mem,
  output logic               mem_dataout_en_o,
  output logic [31:0]        mem_dataout_o,
  output logic [3:0]         mem_invertbits_o,
  output logic [31:0]        mem_address_o,
  output logic [3:0]         mem_byte_enabled_n_o,
  output logic [3:0]         mem_output_enabled_n_o,
  output logic [3:0]         mem_write_enabled_n_o,
  output logic [3:0]         mem_chip_enabled_n_o,
  input  logic [31:0]        mem_data_i,
  input  logic [3:0]         mem_invertbits_i
);

  logic                enable, read_only;
  wait_t [N_BANKS-1:0] read_wait_state, write_wait_state;

  ahb_external_memory_registers u_regs (
    .hclk, .hreset_n, .hsel_reg, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hready_reg, .hresp_reg, .hrdata_reg,
    .enable, .read_only, .read_wait_state, .write_wait_state
  );

  ahb_external_memory_controller #(.INVERT_EN(INVERT_EN)) u_ctrl (
    .hclk, .hreset_n, .hsel_mem, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hready_mem, .hresp_mem, .hrdata_mem,
    .enable, .read_only, .read_wait_state, .write_wait_state,
    .mem_dataout_en_o, .mem_dataout_o, .mem_invertbits_o, .mem_address_o,
    .mem_byte_enabled_n_o, .mem_output_enabled_n_o, .mem_write_enabled_n_o,
    .mem_chip_enabled_n_o, .mem_data_i, .mem_invertbits_i
  );

endmodule
