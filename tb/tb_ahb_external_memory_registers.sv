// tb_ahb_external_memory_registers: self-checking test of the EMC
// configuration slave. Checks reset values, writes and read-back of the
// three registers over AHB, the decoded enable, read_only and per-bank wait
// state outputs, that unmapped offsets read 0, that transfers not selected
// or of type IDLE/BUSY change nothing, and that the slave never waits.
module tb_ahb_external_memory_registers;
  import emc_pkg::*;
  logic        hclk = 1'b0, hreset_n = 1'b0;
  logic        hsel_reg;
  logic [3:0]  hsel_mem;
  logic [31:0] haddr, hwdata;
  logic [1:0]  htrans;
  logic        hwrite;
  logic [2:0]  hsize;
  logic        hready_reg, hready_mem = 1'b1;
  logic [1:0]  hresp_reg, hresp_mem = 2'b00;
  logic [31:0] hrdata_reg, hrdata_mem = '0;
  logic        enable, read_only;
  wait_t [3:0] read_wait_state, write_wait_state;
  int checks = 0, failures = 0;

  `include "tb_ahb_tasks.svh"

  ahb_external_memory_registers dut (.*);

  always #5 hclk = ~hclk;

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic reg_wr(input logic [31:0] a, input logic [31:0] d);
    wbuf[0] = d;
    ahb_run(1'b1, a, 3'd2, 1, 4'b0000);
    check(rresp[0] == 2'b00 && lat[0] == 1, "register write OKAY, no wait");
  endtask

  task automatic reg_rd(input logic [31:0] a, output logic [31:0] d);
    ahb_run(1'b0, a, 3'd2, 1, 4'b0000);
    check(rresp[0] == 2'b00 && lat[0] == 1, "register read OKAY, no wait");
    d = rbuf[0];
  endtask

  initial begin
    logic [31:0] d, ctrl, rw, ww;
    ahb_idle(); haddr = '0; hsize = 3'd2; hwdata = '0;
    repeat (2) @(negedge hclk);
    hreset_n = 1'b1;
    @(negedge hclk);
    check(enable == 1'b1 && read_only == 1'b0, "reset: enabled, writable");
    check(read_wait_state == '0 && write_wait_state == '0, "reset: zero wait states");
    reg_rd(32'h0, d); check(d == 32'h1, "CTRL reads 1 after reset");
    for (int i = 0; i < 200; i++) begin
      ctrl = $urandom; rw = $urandom; ww = $urandom;
      reg_wr(32'h0, ctrl);
      reg_wr(32'h4, rw);
      reg_wr(32'h8, ww);
      check(enable == ctrl[0] && read_only == ctrl[1], "enable / read_only outputs");
      for (int b = 0; b < 4; b++) begin
        check(read_wait_state[b] == rw[b*4 +: 4], "read_wait_state<b>");
        check(write_wait_state[b] == ww[b*4 +: 4], "write_wait_state<b>");
      end
      reg_rd(32'h0, d); check(d == {30'b0, ctrl[1:0]}, "CTRL read back");
      reg_rd(32'h4, d); check(d == {16'b0, rw[15:0]}, "RD_WAIT read back");
      reg_rd(32'h8, d); check(d == {16'b0, ww[15:0]}, "WR_WAIT read back");
      reg_rd(32'hC, d); check(d == 0, "unmapped offset reads 0");
      // a write to another slave must not touch the registers
      @(negedge hclk);
      hsel_reg = 1'b0; htrans = 2'b10; hwrite = 1'b1; haddr = 32'h4;
      @(negedge hclk);
      ahb_idle(); hwdata = ~rw;
      // a BUSY to the registers must not write either
      hsel_reg = 1'b1; htrans = 2'b01; hwrite = 1'b1; haddr = 32'h4;
      @(negedge hclk);
      ahb_idle(); hwdata = ~rw;
      @(negedge hclk);
      reg_rd(32'h4, d); check(d == {16'b0, rw[15:0]}, "unselected / BUSY write ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
