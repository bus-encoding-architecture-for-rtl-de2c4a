// tb_emc_system: end-to-end test of the EMC with its data and invert-bit
// memories, at the default sizes (2k-word memories).
//
// Programs the EMC over its register slave, then runs a random mix of 8, 16
// and 32-bit single transfers and incrementing bursts (some with a BUSY
// cycle) through the memory slave, with varying wait states, and checks all
// read data against a reference byte array. It also fills and reads back the
// whole memory, checks that every stored lane (data memory byte plus
// invert-bit memory bit) decodes to the written byte, reads bank 1 through
// the external-bank inputs, and exercises the read_only and disabled ERROR
// replies. Each mechanism is counted and must happen at least once:
// inverted lane writes, non-inverted lane writes, idle lanes left untouched
// by narrow writes, wait states, bursts, BUSY cycles, ERROR replies, the
// external bank path.
module tb_emc_system;
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
  logic [31:0] mem_dataout_o, mem_address_o;
  logic [3:0]  mem_invertbits_o, mem_byte_enabled_n_o, mem_output_enabled_n_o;
  logic [3:0]  mem_write_enabled_n_o, mem_chip_enabled_n_o;
  logic [31:0] ext_data_i = '0;
  logic [3:0]  ext_invertbits_i = '0;
  int checks = 0, failures = 0;

  `include "tb_ahb_tasks.svh"

  emc_system dut (.*);

  localparam int DEPTH = 2048;

  always #5 hclk = ~hclk;

  initial begin
    repeat (400000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int n_inv_lane = 0, n_plain_lane = 0, n_idle_hold = 0, n_wait = 0, n_burst = 0;
  int n_error = 0, n_ext_bank = 0, n_narrow = 0;

  // watch the lines going to bank 0: count coded lanes and keep a copy of
  // what is written, {invert bit, data byte} per lane
  logic [8:0] lines [DEPTH][4];
  always @(posedge hclk) if (hreset_n && !mem_chip_enabled_n_o[0] && !mem_write_enabled_n_o[0]) begin
    for (int l = 0; l < 4; l++) if (!mem_byte_enabled_n_o[l]) begin
      lines[mem_address_o[12:2]][l] <= {mem_invertbits_o[l], mem_dataout_o[l*8 +: 8]};
      if ($past(mem_write_enabled_n_o[0])) begin
        if (mem_invertbits_o[l]) n_inv_lane++; else n_plain_lane++;
      end
    end
  end

  logic [7:0] model [DEPTH*4];

  task automatic reg_wr(input logic [31:0] a, input logic [31:0] d);
    wbuf[0] = d;
    ahb_run(1'b1, a, 3'd2, 1, 4'b0000);
  endtask

  task automatic mem_wr(input logic [31:0] a, input logic [2:0] sz, input int n, input bit busy);
    logic [31:0] before_out;
    logic [3:0]  before_inv;
    before_out = mem_dataout_o; before_inv = mem_invertbits_o;
    for (int i = 0; i < n; i++) begin
      logic [31:0] ba;
      ba = a + (32'(i) << sz);
      wbuf[i] = $urandom;
      for (int l = 0; l < 4; l++) if (tb_lanes(sz, ba[1:0])[l])
        model[{ba[12:2], 2'(l)}] = wbuf[i][l*8 +: 8];
    end
    ahb_run(1'b1, a, sz, n, 4'b0001, busy);
    for (int i = 0; i < n; i++) check(rresp[i] == HRESP_OKAY, "write OKAY");
    if (n > 1) n_burst++;
    if (lat[0] > 3) n_wait++;
    if (n == 1 && sz != 3'd2) begin
      n_narrow++;
      for (int l = 0; l < 4; l++) if (!tb_lanes(sz, a[1:0])[l]) begin
        check(mem_dataout_o[l*8 +: 8] == before_out[l*8 +: 8] && mem_invertbits_o[l] == before_inv[l],
              "idle lane lines unchanged");
        n_idle_hold++;
      end
    end
  endtask

  task automatic mem_rd(input logic [31:0] a, input logic [2:0] sz, input int n);
    ahb_run(1'b0, a, sz, n, 4'b0001);
    for (int i = 0; i < n; i++) begin
      logic [31:0] ba;
      ba = a + (32'(i) << sz);
      check(rresp[i] == HRESP_OKAY, "read OKAY");
      for (int l = 0; l < 4; l++) if (tb_lanes(sz, ba[1:0])[l])
        check(rbuf[i][l*8 +: 8] == model[{ba[12:2], 2'(l)}], "read data");
    end
    if (n > 1) n_burst++;
    if (lat[0] > 3) n_wait++;
  endtask

  initial begin
    ahb_idle(); haddr = '0; hsize = 3'd2; hwdata = '0;
    repeat (2) @(negedge hclk);
    hreset_n = 1'b1;
    @(negedge hclk);
    // fill the whole memory with words, then read it back as bursts of 16
    for (int w = 0; w < DEPTH; w += 16) mem_wr(32'(w * 4), 3'd2, 16, 1'b0);
    for (int w = 0; w < DEPTH; w += 16) mem_rd(32'(w * 4), 3'd2, 16);
    // every stored lane decodes to its byte
    for (int w = 0; w < DEPTH; w++)
      for (int l = 0; l < 4; l++)
        check((lines[w][l][7:0] ^ {8{lines[w][l][8]}}) == model[w*4 + l],
              "lane written to memory decodes to the byte");
    // random traffic with changing wait states
    for (int it = 0; it < 600; it++) begin
      logic [2:0]  sz;
      logic [31:0] a;
      int n;
      if (it % 50 == 0) begin
        reg_wr(32'h4, 32'($urandom_range(0, 3)));
        reg_wr(32'h8, 32'($urandom_range(0, 3)));
      end
      sz = 3'($urandom_range(0, 2));
      n  = (it % 4 == 0) ? $urandom_range(2, 8) : 1;
      a  = (32'($urandom_range(0, DEPTH - 9)) << 2) | (32'($urandom_range(0, 3)) & ~((32'd1 << sz) - 1));
      mem_wr(a, sz, n, (it % 8 == 0));
      mem_rd(a, sz, n);
    end
    // a random re-read of earlier data
    for (int it = 0; it < 200; it++) mem_rd(32'($urandom_range(0, DEPTH - 1)) << 2, 3'd2, 1);
    // bank 1 has no memory here: its read data comes from the external inputs
    ext_data_i = 32'h12FF_0055; ext_invertbits_i = 4'b0101;
    ahb_run(1'b0, 32'h40, 3'd2, 1, 4'b0010);
    check(rbuf[0] == 32'h1200_00AA, "bank 1 read decoded from external inputs");
    n_ext_bank++;
    mem_rd(32'h0, 3'd2, 1);   // back to bank 0
    // read_only and disable
    reg_wr(32'h0, 32'h3);
    wbuf[0] = 32'hCAFE_F00D;
    ahb_run(1'b1, 32'h0, 3'd2, 1, 4'b0001);
    check(rresp[0] == HRESP_ERROR, "write while read_only refused");
    if (rresp[0] == HRESP_ERROR) n_error++;
    mem_rd(32'h0, 3'd2, 1);
    reg_wr(32'h0, 32'h0);
    ahb_run(1'b0, 32'h0, 3'd2, 1, 4'b0001);
    check(rresp[0] == HRESP_ERROR, "read while disabled refused");
    if (rresp[0] == HRESP_ERROR) n_error++;
    reg_wr(32'h0, 32'h1);
    mem_rd(32'h0, 3'd2, 1);

    $display("mechanisms: inverted lanes %0d, plain lanes %0d, idle-lane holds %0d, waited %0d, bursts %0d, BUSY %0d, narrow %0d, errors %0d, external bank %0d",
             n_inv_lane, n_plain_lane, n_idle_hold, n_wait, n_burst, busy_cycles, n_narrow, n_error, n_ext_bank);
    check(n_inv_lane > 0, "inverted lane writes happened");
    check(n_plain_lane > 0, "non-inverted lane writes happened");
    check(n_idle_hold > 0, "idle lanes held");
    check(n_wait > 0, "wait states used");
    check(n_burst > 0, "bursts run");
    check(busy_cycles > 0, "BUSY cycles run");
    check(n_narrow > 0, "8/16-bit transfers run");
    check(n_error == 2, "ERROR replies");
    check(n_ext_bank > 0, "external bank path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
