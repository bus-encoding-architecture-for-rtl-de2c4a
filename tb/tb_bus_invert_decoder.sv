// tb_bus_invert_decoder: self-checking test of the read-path decoder. Every
// invert pattern is tried with random data; each lane must be inverted exactly
// when its invert bit is set.
module tb_bus_invert_decoder;
  logic [31:0] din, dout;
  logic [3:0]  inv;
  int checks = 0, failures = 0;

  bus_invert_decoder dut (.data_i(din), .inv_i(inv), .data_o(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] exp;
      din = $urandom;
      inv = 4'(i);
      #1;
      for (int l = 0; l < 4; l++)
        exp[l*8 +: 8] = inv[l] ? ~din[l*8 +: 8] : din[l*8 +: 8];
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL din=%h inv=%b dout=%h exp=%h", din, inv, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
