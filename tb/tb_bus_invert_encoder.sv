// tb_bus_invert_encoder: self-checking test of the write-path bus-invert coder.
//
// Drives random data with random lane enables into two coders, one with
// coding and one bypassed, and compares both with a reference model: per
// lane, count the lines that would toggle (differing data bits plus a set
// invert line); invert when that count exceeds 4. Also checks that the coded
// lines decode back to the data, that idle lanes do not move, that the
// result appears one clock after load, and that coding never toggles more
// lines than half the lane's 9 lines.
module tb_bus_invert_encoder;
  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [3:0]  lane_en = '0;
  logic [31:0] data = '0;
  logic [31:0] bus, bus_off;
  logic [3:0]  inv, inv_off;
  int checks = 0, failures = 0;
  int inverted_lanes = 0;

  bus_invert_encoder dut (.clk, .rst_n, .load_i(load), .lane_en_i(lane_en), .data_i(data),
                          .bus_o(bus), .inv_o(inv));
  bus_invert_encoder #(.INVERT_EN(1'b0)) dut_off (.clk, .rst_n, .load_i(load), .lane_en_i(lane_en),
                          .data_i(data), .bus_o(bus_off), .inv_o(inv_off));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] exp_bus, exp_off, prev_bus;
  logic [3:0]  exp_inv, prev_inv;
  int tog_coded;

  initial begin
    exp_bus = '0; exp_inv = '0; exp_off = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(bus == 0 && inv == 0, "reset value");
    tog_coded = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      data    = $urandom;
      lane_en = (i % 4 == 0) ? 4'hF : 4'($urandom);
      load    = (i % 7 != 3);
      prev_bus = bus; prev_inv = inv;
      if (load) begin
        for (int l = 0; l < 4; l++) begin
          if (lane_en[l]) begin
            int hd;
            hd = $countones(data[l*8 +: 8] ^ exp_bus[l*8 +: 8]) + int'(exp_inv[l]);
            exp_inv[l] = (hd > 4);
            exp_bus[l*8 +: 8] = exp_inv[l] ? ~data[l*8 +: 8] : data[l*8 +: 8];
            exp_off[l*8 +: 8] = data[l*8 +: 8];
          end
        end
      end
      @(negedge clk);
      check(bus == exp_bus && inv == exp_inv, "coded lines match reference");
      check(bus_off == exp_off && inv_off == 4'b0, "bypassed coder passes data");
      for (int l = 0; l < 4; l++)
        if (load && lane_en[l]) begin
          check((bus[l*8 +: 8] ^ {8{inv[l]}}) == data[l*8 +: 8], "lane decodes to data");
          check($countones(bus[l*8 +: 8] ^ prev_bus[l*8 +: 8]) + int'(inv[l] != prev_inv[l]) <= 4,
                "at most 4 of the 9 lane lines toggle");
          if (inv[l]) inverted_lanes++;
        end else begin
          check(bus[l*8 +: 8] == prev_bus[l*8 +: 8] && inv[l] == prev_inv[l], "idle lane holds");
        end
      tog_coded += $countones(bus ^ prev_bus) + $countones(inv ^ prev_inv);
      load = 1'b0;
    end
    check(inverted_lanes > 100, "inversion happens");
    $display("inverted lanes %0d, coded line toggles %0d", inverted_lanes, tog_coded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
