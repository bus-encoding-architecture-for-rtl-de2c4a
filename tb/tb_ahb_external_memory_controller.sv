// tb_ahb_external_memory_controller: self-checking test of the AHB memory
// controller slave on its own.
//
// The configuration inputs are driven directly and the four external banks
// are a behavioural memory in this testbench that stores exactly what
// appears on the data and invert lines. Checked: data written with 8, 16 and
// 32-bit transfers and bursts reads back; what reaches memory decodes to the
// written data and never toggles more than 4 of a lane's 9 lines; idle lanes
// keep their lines; each bank is selected by its own chip enable; the data
// phase lasts wait + 3 cycles; strobes stay active for wait + 1 cycles; a
// write while read_only, or any access while disabled, gets the two-cycle
// ERROR reply and no memory cycle.
module tb_ahb_external_memory_controller;
  import emc_pkg::*;

  logic        hclk = 1'b0, hreset_n = 1'b0;
  logic        hsel_reg;
  logic [3:0]  hsel_mem;
  logic [31:0] haddr, hwdata;
  logic [1:0]  htrans;
  logic        hwrite;
  logic [2:0]  hsize;
  logic        hready_mem, hready_reg = 1'b1;
  logic [1:0]  hresp_mem, hresp_reg = 2'b00;
  logic [31:0] hrdata_mem, hrdata_reg = '0;
  logic        enable = 1'b1, read_only = 1'b0;
  wait_t [3:0] rws = '0, wws = '0;
  logic        mem_dataout_en_o;
  logic [31:0] mem_dataout_o, mem_address_o, mem_data_i = '0;
  logic [3:0]  mem_invertbits_o, mem_byte_enabled_n_o, mem_output_enabled_n_o;
  logic [3:0]  mem_write_enabled_n_o, mem_chip_enabled_n_o, mem_invertbits_i = '0;

  int checks = 0, failures = 0;

  `include "tb_ahb_tasks.svh"

  ahb_external_memory_controller dut (
    .hclk, .hreset_n, .hsel_mem, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hready_mem, .hresp_mem, .hrdata_mem, .enable, .read_only,
    .read_wait_state(rws), .write_wait_state(wws),
    .mem_dataout_en_o, .mem_dataout_o, .mem_invertbits_o, .mem_address_o,
    .mem_byte_enabled_n_o, .mem_output_enabled_n_o, .mem_write_enabled_n_o,
    .mem_chip_enabled_n_o, .mem_data_i, .mem_invertbits_i
  );

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

  // behavioural external memory: [bank][word] -> lanes of {invert, byte}
  logic [8:0] ext [4][logic [29:0]][4];
  int strobe_cycles = 0, mem_writes = 0, mem_reads = 0, bad_toggle = 0;
  logic [31:0] last_out = '0;
  logic [3:0]  last_inv = '0;

  always @(posedge hclk) if (hreset_n) begin
    int nce;
    nce = 0;
    for (int b = 0; b < 4; b++) if (!mem_chip_enabled_n_o[b]) nce++;
    if (nce > 1) begin failures++; $display("FAIL two chip enables"); end
    for (int b = 0; b < 4; b++) begin
      if (!mem_chip_enabled_n_o[b]) begin
        strobe_cycles++;
        for (int l = 0; l < 4; l++) if (!mem_byte_enabled_n_o[l]) begin
          if (!mem_write_enabled_n_o[b])
            ext[b][mem_address_o[31:2]][l] <= {mem_invertbits_o[l], mem_dataout_o[l*8 +: 8]};
          else if (!mem_output_enabled_n_o[b]) begin
            mem_data_i[l*8 +: 8] <= ext[b][mem_address_o[31:2]][l][7:0];
            mem_invertbits_i[l]  <= ext[b][mem_address_o[31:2]][l][8];
          end
        end
      end
    end
    for (int l = 0; l < 4; l++)
      if ($countones(mem_dataout_o[l*8 +: 8] ^ last_out[l*8 +: 8]) + int'(mem_invertbits_o[l] != last_inv[l]) > 4)
        bad_toggle++;
    last_out <= mem_dataout_o;
    last_inv <= mem_invertbits_o;
  end

  logic [7:0] model [logic [31:0]];   // byte address -> byte, reference

  task automatic wr(input logic [31:0] a, input logic [2:0] sz, input int n, input int bank, input bit busy = 0);
    for (int i = 0; i < n; i++) begin
      logic [31:0] ba;
      wbuf[i] = $urandom;
      ba = a + (32'(i) << sz);
      for (int l = 0; l < 4; l++) if (tb_lanes(sz, ba[1:0])[l])
        model[{bank[1:0], ba[29:2], 2'(l)}] = wbuf[i][l*8 +: 8];
    end
    ahb_run(1'b1, a, sz, n, 4'b1 << bank, busy);
  endtask

  task automatic rd_check(input logic [31:0] a, input logic [2:0] sz, input int n, input int bank);
    ahb_run(1'b0, a, sz, n, 4'b1 << bank);
    for (int i = 0; i < n; i++) begin
      logic [31:0] ba;
      ba = a + (32'(i) << sz);
      for (int l = 0; l < 4; l++) if (tb_lanes(sz, ba[1:0])[l])
        check(rbuf[i][l*8 +: 8] == model[{bank[1:0], ba[29:2], 2'(l)}], "read data");
      check(rresp[i] == HRESP_OKAY, "read OKAY");
      check(lat[i] == int'(rws[bank]) + 3, "read data phase = wait + 3 cycles");
    end
  endtask

  initial begin
    ahb_idle(); haddr = '0; hsize = 3'd2; hwdata = '0;
    repeat (3) @(negedge hclk);
    hreset_n = 1'b1;
    @(negedge hclk);
    // words, no wait states, all banks
    for (int b = 0; b < 4; b++) begin
      wr(32'h100 * b, 3'd2, 1, b);
      check(lat[0] == 3, "write data phase = 3 cycles at zero wait");
      rd_check(32'h100 * b, 3'd2, 1, b);
    end
    // wait states per bank
    rws = {4'd1, 4'd5, 4'd2, 4'd0};
    wws = {4'd3, 4'd0, 4'd4, 4'd1};
    for (int b = 0; b < 4; b++) begin
      int s0;
      s0 = strobe_cycles;
      wr(32'h40, 3'd2, 1, b);
      check(lat[0] == int'(wws[b]) + 3, "write data phase = wait + 3 cycles");
      check(strobe_cycles - s0 == int'(wws[b]) + 1, "write strobes last wait + 1 cycles");
      s0 = strobe_cycles;
      rd_check(32'h40, 3'd2, 1, b);
      check(strobe_cycles - s0 == int'(rws[b]) + 1, "read strobes last wait + 1 cycles");
    end
    // random sizes, bursts, with and without BUSY
    for (int i = 0; i < 150; i++) begin
      logic [2:0]  sz;
      logic [31:0] a;
      int n, b;
      logic [31:0] before_out;
      logic [3:0]  before_inv;
      sz = 3'($urandom_range(0, 2));
      n  = (i % 3 == 0) ? $urandom_range(2, 8) : 1;
      b  = $urandom_range(0, 3);
      a  = ($urandom & 32'h3FC) | (32'($urandom_range(0, 3)) & ~((32'd1 << sz) - 1));
      if (n == 1) begin
        before_out = mem_dataout_o; before_inv = mem_invertbits_o;
      end
      wr(a, sz, n, b, (i % 5 == 0));
      if (n == 1)
        for (int l = 0; l < 4; l++) if (!tb_lanes(sz, a[1:0])[l])
          check(mem_dataout_o[l*8 +: 8] == before_out[l*8 +: 8] && mem_invertbits_o[l] == before_inv[l],
                "idle lane keeps its lines");
      rd_check(a, sz, n, b);
    end
    // stored lines decode to the data
    foreach (model[k]) begin
      logic [8:0] raw;
      raw = ext[k[31:30]][{2'b0, k[29:2]}][k[1:0]];
      check((raw[7:0] ^ {8{raw[8]}}) == model[k], "stored lane decodes to written byte");
    end
    check(bad_toggle == 0, "no lane toggles more than 4 of its 9 lines");
    // read_only: write gets ERROR and does not reach memory
    rws = '0; wws = '0;
    read_only = 1'b1;
    begin
      int s0;
      logic [31:0] keep;
      keep = {model[32'h0000_0203], model[32'h0000_0202], model[32'h0000_0201], model[32'h0000_0200]};
      s0 = strobe_cycles;
      wbuf[0] = ~keep;
      ahb_run(1'b1, 32'h200, 3'd2, 1, 4'b0001);
      check(rresp[0] == HRESP_ERROR && lat[0] == 2, "write while read_only: two-cycle ERROR");
      check(strobe_cycles == s0, "no memory cycle on ERROR");
      ahb_run(1'b0, 32'h200, 3'd2, 1, 4'b0001);
      check(rresp[0] == HRESP_OKAY, "read allowed while read_only");
      read_only = 1'b0;
      enable = 1'b0;
      ahb_run(1'b0, 32'h200, 3'd2, 1, 4'b0001);
      check(rresp[0] == HRESP_ERROR && lat[0] == 2, "access while disabled: ERROR");
      enable = 1'b1;
    end
    check(busy_cycles > 0, "BUSY cycles issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
