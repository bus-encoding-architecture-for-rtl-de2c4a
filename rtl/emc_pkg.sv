// emc_pkg: types and constants shared by the external memory controller (EMC).
//
// The EMC is an AMBA AHB slave that drives an external memory through a
// 32-bit data bus split into four 8-bit lanes, each with its own bus-invert
// bit. This package holds the AHB encodings (from the AMBA AHB protocol), the
// lane geometry (four 8-bit lanes, as the design specifies), the register map of
// the configuration slave (this design's own choice) and a helper that turns
// an AHB transfer size and address into the set of active byte lanes
// (little-endian lane numbering, also this design's choice).
package emc_pkg;

  localparam int unsigned DATA_W  = 32;            // AHB and external data width
  localparam int unsigned LANE_W  = 8;             // one invert bit per 8 bits
  localparam int unsigned N_LANES = DATA_W / LANE_W;
  localparam int unsigned N_BANKS = 4;             // hsel_mem selects one of four banks
  localparam int unsigned WS_W    = 4;             // width of a wait-state field

  typedef logic [N_LANES-1:0] lane_mask_t;
  typedef logic [WS_W-1:0]    wait_t;

  // AHB HTRANS encodings
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  // AHB HRESP encodings
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_t;

  // AHB HSIZE encodings used by the EMC
  localparam logic [2:0] HSIZE_BYTE = 3'b000;
  localparam logic [2:0] HSIZE_HALF = 3'b001;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  // Configuration register map (byte offsets within the hsel_reg slave)
  localparam logic [3:0] REG_CTRL    = 4'h0;  // [0] enable, [1] read_only
  localparam logic [3:0] REG_RD_WAIT = 4'h4;  // 4 bits per bank: read_wait_state0..3
  localparam logic [3:0] REG_WR_WAIT = 4'h8;  // 4 bits per bank: write_wait_state0..3

  // Active byte lanes of an AHB transfer. Sizes above a word are treated as a
  // word, as the external bus is 32 bits wide.
  function automatic lane_mask_t ahb_lanes(input logic [2:0] hsize, input logic [1:0] addr);
    lane_mask_t m;
    case (hsize)
      HSIZE_BYTE: m = lane_mask_t'(1) << addr;
      HSIZE_HALF: m = addr[1] ? 4'b1100 : 4'b0011;
      default:    m = 4'b1111;
    endcase
    return m;
  endfunction

endpackage
