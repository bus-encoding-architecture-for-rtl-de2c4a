// tb_external_memory_controller: self-checking test of the complete EMC
// (register slave plus memory-controller slave). The wait states, enable and
// read_only are programmed over AHB through hsel_reg and their effect is
// checked on hsel_mem transfers: data phase length (wait + 3 cycles), the
// ERROR reply for a write while read_only and for any access while disabled,
// and data round trips through a behavioural four-bank memory that stores
// the coded lines, whose contents must decode to the written bytes.
module tb_external_memory_controller;
  import emc_pkg::*;

  logic        hclk = 1'b0, hreset_n = 1'b0;
  logic        hsel_reg;
  logic [3:0]  hsel_mem;
  logic [31:0] haddr, hwdata;
  logic [1:0]  htrans;
  logic        hwrite;
  logic [2:0]  hsize;
  logic        hready_mem, hready_reg;
  logic [1:0]  hresp_mem, hresp_reg;
  logic [31:0] hrdata_mem, hrdata_reg;
  logic        mem_dataout_en_o;
  logic [31:0] mem_dataout_o, mem_address_o, mem_data_i = '0;
  logic [3:0]  mem_invertbits_o, mem_byte_enabled_n_o, mem_output_enabled_n_o;
  logic [3:0]  mem_write_enabled_n_o, mem_chip_enabled_n_o, mem_invertbits_i = '0;
  int checks = 0, failures = 0;

  `include "tb_ahb_tasks.svh"

  external_memory_controller dut (.*);

  always #5 hclk = ~hclk;

  initial begin
    repeat (100000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // behavioural four-bank memory storing {invert, byte} per lane
  logic [8:0] ext [4][logic [29:0]][4];
  int dataout_en_cycles = 0;
  always @(posedge hclk) if (hreset_n) begin
    if (mem_dataout_en_o) dataout_en_cycles++;
    for (int b = 0; b < 4; b++) if (!mem_chip_enabled_n_o[b])
      for (int l = 0; l < 4; l++) if (!mem_byte_enabled_n_o[l]) begin
        if (!mem_write_enabled_n_o[b])
          ext[b][mem_address_o[31:2]][l] <= {mem_invertbits_o[l], mem_dataout_o[l*8 +: 8]};
        else if (!mem_output_enabled_n_o[b]) begin
          mem_data_i[l*8 +: 8] <= ext[b][mem_address_o[31:2]][l][7:0];
          mem_invertbits_i[l]  <= ext[b][mem_address_o[31:2]][l][8];
        end
      end
  end

  task automatic reg_wr(input logic [31:0] a, input logic [31:0] d);
    wbuf[0] = d;
    ahb_run(1'b1, a, 3'd2, 1, 4'b0000);
  endtask

  initial begin
    logic [15:0] rw, ww;
    logic [31:0] data [16];
    ahb_idle(); haddr = '0; hsize = 3'd2; hwdata = '0;
    repeat (2) @(negedge hclk);
    hreset_n = 1'b1;
    @(negedge hclk);
    for (int it = 0; it < 40; it++) begin
      rw = 16'($urandom); ww = 16'($urandom);
      reg_wr(32'h4, {16'b0, rw});
      reg_wr(32'h8, {16'b0, ww});
      for (int b = 0; b < 4; b++) begin
        int n;
        logic [31:0] a;
        n = $urandom_range(1, 4);
        a = $urandom & 32'h7F0;
        for (int i = 0; i < n; i++) begin data[i] = $urandom; wbuf[i] = data[i]; end
        ahb_run(1'b1, a, 3'd2, n, 4'b1 << b);
        for (int i = 0; i < n; i++) begin
          logic [8:0] raw;
          check(rresp[i] == HRESP_OKAY && lat[i] == int'(ww[b*4 +: 4]) + 3, "write: programmed wait states");
          for (int l = 0; l < 4; l++) begin
            raw = ext[b][(a >> 2) + 30'(i)][l];
            check((raw[7:0] ^ {8{raw[8]}}) == data[i][l*8 +: 8], "stored lane decodes");
          end
        end
        ahb_run(1'b0, a, 3'd2, n, 4'b1 << b);
        for (int i = 0; i < n; i++) begin
          check(rbuf[i] == data[i], "read back");
          check(rresp[i] == HRESP_OKAY && lat[i] == int'(rw[b*4 +: 4]) + 3, "read: programmed wait states");
        end
      end
    end
    // read_only set through the register slave
    reg_wr(32'h0, 32'h3);
    wbuf[0] = 32'hDEAD_BEEF;
    ahb_run(1'b1, 32'h0, 3'd2, 1, 4'b0001);
    check(rresp[0] == HRESP_ERROR && lat[0] == 2, "write while read_only: ERROR");
    ahb_run(1'b0, 32'h0, 3'd2, 1, 4'b0001);
    check(rresp[0] == HRESP_OKAY, "read while read_only: OKAY");
    // disabled
    reg_wr(32'h0, 32'h0);
    ahb_run(1'b0, 32'h0, 3'd2, 1, 4'b0010);
    check(rresp[0] == HRESP_ERROR && lat[0] == 2, "read while disabled: ERROR");
    reg_wr(32'h0, 32'h1);
    ahb_run(1'b0, 32'h0, 3'd2, 1, 4'b0010);
    check(rresp[0] == HRESP_OKAY, "re-enabled");
    check(dataout_en_cycles > 0, "data output enable driven on writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
