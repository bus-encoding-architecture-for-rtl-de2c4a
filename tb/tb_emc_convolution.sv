// tb_emc_convolution: image-processing workload for the bus-invert coding.
//
// A 3x3 convolution (kernel 1 2 1 / 2 4 2 / 1 2 1, divided by 16) runs over
// a 32x32 image of 8-bit pixels held in the external memory, four pixels per
// word. The image is synthetic: a smooth gradient with a little noise, as
// neighbouring pixels of natural images are correlated. The processor is
// played by this testbench: for an access size of B bytes (1, 2 or 4) it
// produces B output pixels at a time from nine B-byte reads (three per
// image row) and one B-byte write to the output image. The same traffic goes
// to a system with bus-invert coding and one without; the testbench checks
// the output image of both against its own convolution and reports the
// transitions on the external data and invert lines for each access size.
// Coding must lower the total for 32-bit accesses. For 8 and 16-bit accesses
// it raises it on this image: the invert bits stored with each byte were
// chosen when the image was written, so reading neighbouring pixels back
// flips whole lanes. Those counts are reported, not checked.
module tb_emc_convolution;
  import emc_pkg::*;

  logic        hclk = 1'b0, hreset_n = 1'b0;
  logic        hsel_reg;
  logic [3:0]  hsel_mem;
  logic [31:0] haddr, hwdata;
  logic [1:0]  htrans;
  logic        hwrite;
  logic [2:0]  hsize;
  logic        hready_mem, hready_reg, hready_mem_off, hready_reg_off;
  logic [1:0]  hresp_mem, hresp_reg, hresp_mem_off, hresp_reg_off;
  logic [31:0] hrdata_mem, hrdata_reg, hrdata_mem_off, hrdata_reg_off;
  logic        oen_on, oen_off;
  logic [31:0] dout_on, dout_off, addr_on, addr_off;
  logic [3:0]  inv_on, inv_off, be_on, be_off, oe_on, oe_off, we_on, we_off, ce_on, ce_off;
  int checks = 0, failures = 0;

  `include "tb_ahb_tasks.svh"

  emc_system dut_on (
    .hclk, .hreset_n, .hsel_reg, .hsel_mem, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hready_reg, .hresp_reg, .hrdata_reg, .hready_mem, .hresp_mem, .hrdata_mem,
    .mem_dataout_en_o(oen_on), .mem_dataout_o(dout_on), .mem_invertbits_o(inv_on),
    .mem_address_o(addr_on), .mem_byte_enabled_n_o(be_on), .mem_output_enabled_n_o(oe_on),
    .mem_write_enabled_n_o(we_on), .mem_chip_enabled_n_o(ce_on),
    .ext_data_i('0), .ext_invertbits_i('0)
  );

  emc_system #(.INVERT_EN(1'b0)) dut_off (
    .hclk, .hreset_n, .hsel_reg, .hsel_mem, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hready_reg(hready_reg_off), .hresp_reg(hresp_reg_off), .hrdata_reg(hrdata_reg_off),
    .hready_mem(hready_mem_off), .hresp_mem(hresp_mem_off), .hrdata_mem(hrdata_mem_off),
    .mem_dataout_en_o(oen_off), .mem_dataout_o(dout_off), .mem_invertbits_o(inv_off),
    .mem_address_o(addr_off), .mem_byte_enabled_n_o(be_off), .mem_output_enabled_n_o(oe_off),
    .mem_write_enabled_n_o(we_off), .mem_chip_enabled_n_o(ce_off),
    .ext_data_i('0), .ext_invertbits_i('0)
  );

  always #5 hclk = ~hclk;

  initial begin
    repeat (200000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // transition counters on the off-chip lines
  int dt_on = 0, it_on = 0, dt_off = 0, it_off = 0, bad_lane = 0;
  logic [31:0] pd_on = '0, pd_off = '0, pr_on = '0, pr_off = '0;
  logic [3:0]  pi_on = '0, pi_off = '0, pri_on = '0;
  always @(posedge hclk) if (hreset_n) begin
    dt_on  += $countones(dout_on ^ pd_on)   + $countones(dut_on.mem_data ^ pr_on);
    dt_off += $countones(dout_off ^ pd_off) + $countones(dut_off.mem_data ^ pr_off);
    it_on  += $countones(inv_on ^ pi_on)    + $countones(dut_on.mem_invbits ^ pri_on);
    it_off += $countones(inv_off ^ pi_off);
    for (int l = 0; l < 4; l++)
      if ($countones(dout_on[l*8 +: 8] ^ pd_on[l*8 +: 8]) + int'(inv_on[l] != pi_on[l]) > 4) bad_lane++;
    pd_on <= dout_on; pd_off <= dout_off; pr_on <= dut_on.mem_data; pr_off <= dut_off.mem_data;
    pi_on <= inv_on;  pi_off <= inv_off;  pri_on <= dut_on.mem_invbits;
  end

  localparam int W = 32, H = 32;
  localparam logic [31:0] IMG = 32'h0000_0000, OUT = 32'h0000_1000;
  logic [7:0] img [H][W];
  logic [7:0] res [H][W];

  function automatic logic [7:0] conv(input int x, input int y);
    int acc;
    acc = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        acc += int'(img[y+dy][x+dx]) * ((dx == 0 ? 2 : 1) * (dy == 0 ? 2 : 1));
    return 8'(acc / 16);
  endfunction

  initial begin
    ahb_idle(); haddr = '0; hsize = 3'd2; hwdata = '0;
    repeat (2) @(negedge hclk);
    hreset_n = 1'b1;
    @(negedge hclk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = 8'(40 + 3 * x + 4 * y + $urandom_range(0, 15));
    // load the image with word writes
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 4) begin
        wbuf[0] = {img[y][x+3], img[y][x+2], img[y][x+1], img[y][x]};
        ahb_run(1'b1, IMG + 32'(y * W + x), 3'd2, 1, 4'b0001);
      end
    for (int s = 0; s < 3; s++) begin
      int B;
      int d0_on, i0_on, d0_off;
      logic [2:0] sz;
      sz = 3'(s);
      B = 1 << s;
      d0_on = dt_on; i0_on = it_on; d0_off = dt_off;
      for (int y = 1; y < H - 1; y++)
        for (int x0 = B; x0 + 2 * B <= W; x0 += B) begin
          logic [7:0] win [3][3*4];
          // three B-byte groups per row: x0-B, x0, x0+B
          for (int r = 0; r < 3; r++)
            for (int g = 0; g < 3; g++) begin
              logic [31:0] a;
              a = IMG + 32'((y - 1 + r) * W + x0 + (g - 1) * B);
              ahb_run(1'b0, a, sz, 1, 4'b0001);
              for (int k = 0; k < B; k++) begin
                win[r][g*B + k] = rbuf[0][(int'(a[1:0]) + k) * 8 +: 8];
                checks++;
                if (win[r][g*B + k] != img[y - 1 + r][x0 + (g - 1) * B + k] ||
                    hrdata_mem_off[(int'(a[1:0]) + k) * 8 +: 8] != win[r][g*B + k]) begin
                  failures++; $display("FAIL pixel read at %0t", $time);
                end
              end
            end
          wbuf[0] = '0;
          for (int k = 0; k < B; k++) begin
            int acc;
            acc = 0;
            for (int dy = 0; dy < 3; dy++)
              for (int dx = 0; dx < 3; dx++)
                acc += int'(win[dy][B + k + dx - 1]) * ((dx == 1 ? 2 : 1) * (dy == 1 ? 2 : 1));
            res[y][x0 + k] = 8'(acc / 16);
            wbuf[0][(((x0 + k) % 4) * 8) +: 8] = res[y][x0 + k];
          end
          ahb_run(1'b1, OUT + 32'(y * W + x0), sz, 1, 4'b0001);
        end
      // read the output image back from both systems
      for (int y = 1; y < H - 1; y++)
        for (int x = 4; x < W - 4; x += 4) begin
          ahb_run(1'b0, OUT + 32'(y * W + x), 3'd2, 1, 4'b0001);
          for (int k = 0; k < 4; k++)
            check(rbuf[0][k*8 +: 8] == conv(x + k, y) && hrdata_mem_off[k*8 +: 8] == conv(x + k, y),
                  "output pixel");
        end
      $display("%0d-bit accesses: coding off: data %0d | coding on: data %0d, invert %0d, total %0d",
               8 << s, dt_off - d0_off, dt_on - d0_on, it_on - i0_on, dt_on - d0_on + it_on - i0_on);
      if (B == 4)
        check(dt_on - d0_on + it_on - i0_on < dt_off - d0_off, "32-bit accesses: coding lowers total transitions");
    end
    check(bad_lane == 0, "no lane toggles more than 4 of its 9 lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
