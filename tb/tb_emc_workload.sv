// tb_emc_workload: switching-activity workload for the bus-invert coding.
//
// Two complete systems, one with bus-invert coding and one without, get
// the same traffic: for each transfer size (8, 16 and 32 bits), 1000 writes
// of random data to random addresses, then 1000 reads of the same addresses.
// The testbench counts transitions on the external data lines (write and
// read buses) and on the invert lines of both systems. It checks that both
// systems return the written data, that with coding no byte lane ever
// toggles more than 4 of its 9 lines, and that for each size the coded
// system makes fewer data-line transitions and fewer transitions in total
// (data plus invert lines) than the uncoded one.
module tb_emc_workload;
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

  localparam int N = 1000;

  initial begin
    ahb_idle(); haddr = '0; hsize = 3'd2; hwdata = '0;
    repeat (2) @(negedge hclk);
    hreset_n = 1'b1;
    @(negedge hclk);
    for (int s = 0; s < 3; s++) begin
      logic [2:0]  sz;
      logic [31:0] addrs [N];
      logic [31:0] datas [N];
      int d0_on, i0_on, d0_off, i0_off;
      sz = 3'(s);
      d0_on = dt_on; i0_on = it_on; d0_off = dt_off; i0_off = it_off;
      for (int i = 0; i < N; i++) begin
        addrs[i] = (32'(i) << 2) | (32'($urandom_range(0, 3)) & ~((32'd1 << sz) - 1));
        datas[i] = $urandom;
        wbuf[0] = datas[i];
        ahb_run(1'b1, addrs[i], sz, 1, 4'b0001);
      end
      for (int i = 0; i < N; i++) begin
        ahb_run(1'b0, addrs[i], sz, 1, 4'b0001);
        for (int l = 0; l < 4; l++) if (tb_lanes(sz, addrs[i][1:0])[l])
          check(rbuf[0][l*8 +: 8] == datas[i][l*8 +: 8] &&
                hrdata_mem_off[l*8 +: 8] == datas[i][l*8 +: 8], "both systems read back");
      end
      $display("%0d-bit transfers: coding off: data %0d | coding on: data %0d, invert %0d, total %0d",
               8 << s, dt_off - d0_off, dt_on - d0_on, it_on - i0_on, dt_on - d0_on + it_on - i0_on);
      check(it_off - i0_off == 0, "uncoded system never drives invert lines");
      check(dt_on - d0_on < dt_off - d0_off, "coding lowers data-line transitions");
      check(dt_on - d0_on + it_on - i0_on < dt_off - d0_off, "coding lowers total transitions");
    end
    check(bad_lane == 0, "no lane toggles more than 4 of its 9 lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
