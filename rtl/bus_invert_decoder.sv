// bus_invert_decoder: read-path bus-invert decoder.
//
// Each LANE_W-bit lane of the data coming back from the external memory is
// passed through unchanged when its invert bit is 0 and inverted when it is 1.
// This is the conditional inverter the design calls for on the read path; it
// needs no state, since the invert bit stored with each byte says how that
// byte was written. Purely combinational, no latency.
//
//   data_i[N_LANES*LANE_W-1:0]  coded data from memory (mem_data_i)
//   inv_i [N_LANES-1:0]         invert bit per lane (mem_invertbits_i)
//   data_o                      decoded data
module bus_invert_decoder #(
  parameter int unsigned N_LANES = 4,
  parameter int unsigned LANE_W  = 8
) (
  input  logic [N_LANES*LANE_W-1:0] data_i,
  input  logic [N_LANES-1:0]        inv_i,
  output logic [N_LANES*LANE_W-1:0] data_o
);

  always_comb begin
    for (int l = 0; l < int'(N_LANES); l++)
      data_o[l*LANE_W +: LANE_W] = data_i[l*LANE_W +: LANE_W] ^ {LANE_W{inv_i[l]}};
  end

endmodule
