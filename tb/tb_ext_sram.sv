// tb_ext_sram: self-checking test of the external memory as the
// 4 x 8bit x 2k data memory. Random lane-masked writes and reads over the
// whole depth are compared with a reference array; checks that reads appear
// one clock after the strobes, that lanes not enabled keep the previous read
// value, and that nothing happens without chip enable or with output enable
// high.
module tb_ext_sram;
  localparam int LANES = 4, W = 8, DEPTH = 2048;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_n = 1'b1, oe_n = 1'b1, we_n = 1'b1;
  logic [LANES-1:0]   be_n = '1;
  logic [10:0]        addr = '0;
  logic [LANES*W-1:0] wdata = '0, rdata;
  logic [LANES*W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  ext_sram #(.N_LANES(LANES), .LANE_W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [LANES*W-1:0] prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(rdata == 0, "read data reset");
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ce_n = 1'b0; we_n = 1'b0; oe_n = 1'b1; be_n = '0; addr = 11'(a); wdata = $urandom;
      ref_mem[a] = wdata;
    end
    @(negedge clk); ce_n = 1'b1; we_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      int op;
      op = $urandom_range(0, 9);
      @(negedge clk);
      addr = 11'($urandom); be_n = 4'($urandom); wdata = $urandom;
      prev = rdata;
      ce_n = (op == 9); we_n = !(op < 4); oe_n = (op == 8);
      if (op < 4 && !ce_n)
        for (int l = 0; l < LANES; l++) if (!be_n[l]) ref_mem[addr][l*W +: W] = wdata[l*W +: W];
      @(negedge clk);
      for (int l = 0; l < LANES; l++)
        if (!ce_n && !oe_n && we_n && !be_n[l])
          check(rdata[l*W +: W] == ref_mem[addr][l*W +: W], "read lane one clock after strobes");
        else
          check(rdata[l*W +: W] == prev[l*W +: W], "idle lane holds");
      ce_n = 1'b1; we_n = 1'b1; oe_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
