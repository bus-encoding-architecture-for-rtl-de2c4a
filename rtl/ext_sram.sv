// ext_sram: lane-organised external memory, used twice in the system: as the
// 4 x 8bit x 2k data memory and as the 4 x 1bit x 2k invert-bit memory, both
// addressed by the same address lines.
//
// The memory holds DEPTH words of N_LANES lanes of LANE_W bits. It is selected
// by ce_n and has active-low output enable (oe_n), write enable (we_n) and one
// active-low enable per lane (be_n). It is modelled as a synchronous memory
// clocked by the system clock (the timing of the real asynchronous part is
// not the subject of this design):
//   - write: at a clock edge with ce_n = 0 and we_n = 0, every enabled lane of
//     word addr is written with its lane of wdata;
//   - read: at a clock edge with ce_n = 0, oe_n = 0 and we_n = 1, every enabled
//     lane of word addr is copied to its lane of rdata. Lanes that are not
//     enabled keep their previous value, so the memory drives data only on
//     the active lanes and the idle lanes of the read bus do not toggle.
// Read data therefore appears one clock after the read strobes. The array is
// not reset; rdata resets to 0.
module ext_sram #(
  parameter int unsigned N_LANES = 4,
  parameter int unsigned LANE_W  = 8,
  parameter int unsigned DEPTH   = 2048,
  parameter int unsigned ADDR_W  = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ce_n,
  input  logic                      oe_n,
  input  logic                      we_n,
  input  logic [N_LANES-1:0]        be_n,
  input  logic [ADDR_W-1:0]         addr,
  input  logic [N_LANES*LANE_W-1:0] wdata,
  output logic [N_LANES*LANE_W-1:0] rdata
);

  logic [N_LANES-1:0][LANE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!ce_n && !we_n) begin
      for (int l = 0; l < int'(N_LANES); l++)
        if (!be_n[l]) mem[addr][l] <= wdata[l*LANE_W +: LANE_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (!ce_n && !oe_n && we_n) begin
      for (int l = 0; l < int'(N_LANES); l++)
        if (!be_n[l]) rdata[l*LANE_W +: LANE_W] <= mem[addr][l];
    end
  end

endmodule
