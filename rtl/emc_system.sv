// emc_system: the external memory controller with bus-invert coding, wired
// to its external memory.
//
// The EMC (external_memory_controller) writes 32 data bits and four invert
// bits (one per byte lane) for every external memory cycle. Data and invert
// bits are kept in two separate memories that share the address, chip enable,
// output enable, write enable and byte enable lines: a 4 x 8bit x 2k data
// memory and a 4 x 1bit x 2k invert-bit memory, both on bank 0 (chip enable
// bit 0). The memories take the word address from mem_address_o[12:2].
//
// Banks 1 to 3 have no memory in this system: their strobes and the shared
// address and data lines are brought out, and their read data comes back on
// ext_data_i / ext_invertbits_i. A read is answered from bank 0 when bank 0's
// output enable was active, otherwise from those inputs (this read-data
// selection is the system's own glue, one flop).
//
// The AHB side is the EMC's two slave ports (hsel_reg for the registers,
// hsel_mem for the four banks); the AHB arbiter, decoder and response
// multiplexer belong to the surrounding platform and are not included.
// INVERT_EN = 0 builds the system without bus-invert coding.
module emc_system
  import emc_pkg::*;
#(
  parameter bit          INVERT_EN = 1'b1,
  parameter int unsigned MEM_DEPTH = 2048
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
  // external bus, for the banks without a memory here
  output logic               mem_dataout_en_o,
  output logic [31:0]        mem_dataout_o,
  output logic [3:0]         mem_invertbits_o,
  output logic [31:0]        mem_address_o,
  output logic [3:0]         mem_byte_enabled_n_o,
  output logic [3:0]         mem_output_enabled_n_o,
  output logic [3:0]         mem_write_enabled_n_o,
  output logic [3:0]         mem_chip_enabled_n_o,
  input  logic [31:0]        ext_data_i,
  input  logic [3:0]         ext_invertbits_i
);

  localparam int unsigned ADDR_W = $clog2(MEM_DEPTH);

  logic [31:0] mem_data, sram_data;
  logic [3:0]  mem_invbits, sram_invbits;
  logic        bank0_read_q;

  external_memory_controller #(.INVERT_EN(INVERT_EN)) u_emc (
    .hclk, .hreset_n, .hsel_reg, .hsel_mem, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hready_reg, .hresp_reg, .hrdata_reg, .hready_mem, .hresp_mem, .hrdata_mem,
    .mem_dataout_en_o, .mem_dataout_o, .mem_invertbits_o, .mem_address_o,
    .mem_byte_enabled_n_o, .mem_output_enabled_n_o, .mem_write_enabled_n_o,
    .mem_chip_enabled_n_o,
    .mem_data_i      (mem_data),
    .mem_invertbits_i(mem_invbits)
  );

  ext_sram #(.N_LANES(N_LANES), .LANE_W(LANE_W), .DEPTH(MEM_DEPTH)) u_data_mem (
    .clk  (hclk),
    .rst_n(hreset_n),
    .ce_n (mem_chip_enabled_n_o[0]),
    .oe_n (mem_output_enabled_n_o[0]),
    .we_n (mem_write_enabled_n_o[0]),
    .be_n (mem_byte_enabled_n_o),
    .addr (mem_address_o[ADDR_W+1:2]),
    .wdata(mem_dataout_o),
    .rdata(sram_data)
  );

  ext_sram #(.N_LANES(N_LANES), .LANE_W(1), .DEPTH(MEM_DEPTH)) u_invbit_mem (
    .clk  (hclk),
    .rst_n(hreset_n),
    .ce_n (mem_chip_enabled_n_o[0]),
    .oe_n (mem_output_enabled_n_o[0]),
    .we_n (mem_write_enabled_n_o[0]),
    .be_n (mem_byte_enabled_n_o),
    .addr (mem_address_o[ADDR_W+1:2]),
    .wdata(mem_invertbits_o),
    .rdata(sram_invbits)
  );

  // read data source: the bank whose output enable was active last
  always_ff @(posedge hclk or negedge hreset_n) begin
    if (!hreset_n)                        bank0_read_q <= 1'b1;
    else if (!(&mem_output_enabled_n_o))  bank0_read_q <= !mem_output_enabled_n_o[0];
  end

  assign mem_data    = bank0_read_q ? sram_data    : ext_data_i;
  assign mem_invbits = bank0_read_q ? sram_invbits : ext_invertbits_i;

endmodule
