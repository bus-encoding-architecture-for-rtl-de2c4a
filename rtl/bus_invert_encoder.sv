// bus_invert_encoder: write-path bus-invert coder, one invert bit per lane.
//
// The coder owns the registers that drive the off-chip data lines
// (bus_o, mem_dataout_o) and the invert lines (inv_o, mem_invertbits_o). When
// load_i is high, every lane selected by lane_en_i compares its new data with
// what its lines carry now. Following the classic bus-invert rule, the number of
// lines that would toggle if the data went out as is (the data bits that
// differ, plus the invert line if it is now 1) is counted; if it exceeds
// LANE_W/2 the lane goes out inverted with its invert bit set, otherwise
// unchanged with its invert bit clear. Lanes not selected keep their lines as
// they are, so a byte or halfword write toggles nothing on the idle lanes and
// each lane's invert bit always belongs to that lane's data.
//
// With INVERT_EN = 0 the coder is bypassed: data goes out as is and the invert
// bits stay 0 (the "low power off" reference configuration).
//
// Timing: the coded value appears on bus_o/inv_o one clock after load_i.
// Reset clears the lines to 0.
//
// Coding each byte lane with its own invert bit, and leaving idle lanes
// alone, follow the design. The exact decision rule (invert line counted,
// a tie of 4 sent plain), the reset value and the bypass parameter are this
// implementation's choices.
module bus_invert_encoder #(
  parameter int unsigned N_LANES   = 4,
  parameter int unsigned LANE_W    = 8,
  parameter bit          INVERT_EN = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load_i,
  input  logic [N_LANES-1:0]        lane_en_i,
  input  logic [N_LANES*LANE_W-1:0] data_i,
  output logic [N_LANES*LANE_W-1:0] bus_o,
  output logic [N_LANES-1:0]        inv_o
);

  localparam int unsigned CNT_W = $clog2(LANE_W + 2);

  logic [N_LANES*LANE_W-1:0] bus_d;
  logic [N_LANES-1:0]        inv_d;

  always_comb begin
    for (int l = 0; l < int'(N_LANES); l++) begin
      logic [LANE_W-1:0] diff;
      logic [CNT_W-1:0]  toggles;
      diff    = data_i[l*LANE_W +: LANE_W] ^ bus_o[l*LANE_W +: LANE_W];
      toggles = CNT_W'(inv_o[l]);
      for (int b = 0; b < int'(LANE_W); b++)
        toggles = toggles + CNT_W'(diff[b]);
      inv_d[l] = INVERT_EN && (toggles > CNT_W'(LANE_W / 2));
      bus_d[l*LANE_W +: LANE_W] = data_i[l*LANE_W +: LANE_W] ^ {LANE_W{inv_d[l]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_o <= '0;
      inv_o <= '0;
    end else if (load_i) begin
      for (int l = 0; l < int'(N_LANES); l++) begin
        if (lane_en_i[l]) begin
          bus_o[l*LANE_W +: LANE_W] <= bus_d[l*LANE_W +: LANE_W];
          inv_o[l]                  <= inv_d[l];
        end
      end
    end
  end

endmodule
