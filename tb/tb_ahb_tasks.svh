// tb_ahb_tasks.svh: AHB master tasks shared by the EMC testbenches.
//
// Included inside a testbench module that declares hclk, haddr, htrans,
// hwrite, hsize, hwdata, hsel_reg, hsel_mem (4 bits), and the slave replies
// hready_reg/hresp_reg/hrdata_reg and hready_mem/hresp_mem/hrdata_mem. It adds
// the AHB reply multiplexer (with a default slave that answers OKAY with no
// wait) and a pipelined master: ahb_run() issues one burst of n beats (a
// single transfer when n = 1), overlapping each beat's address phase with the
// previous beat's data phase, optionally with a BUSY cycle after the first
// beat. Signals are driven just after the falling edge and sampled just
// before the rising edge. Write data is taken from wbuf[], read data lands in
// rbuf[], the reply of each beat in rresp[] and the length of each beat's data
// phase in cycles in lat[].

logic [31:0] wbuf [64];
logic [31:0] rbuf [64];
logic [1:0]  rresp [64];
int          lat [64];
int          busy_cycles = 0;

// AHB reply multiplexer, selected by the slave that owns the data phase
logic        dsel_reg_q = 1'b0, dsel_mem_q = 1'b0;
logic        hready;
logic [1:0]  hresp;
logic [31:0] hrdata;

always_ff @(posedge hclk)
  if (hready) begin
    dsel_reg_q <= hsel_reg;
    dsel_mem_q <= |hsel_mem;
  end

always_comb begin
  hready = 1'b1; hresp = 2'b00; hrdata = '0;
  if (dsel_mem_q) begin
    hready = hready_mem; hresp = hresp_mem; hrdata = hrdata_mem;
  end else if (dsel_reg_q) begin
    hready = hready_reg; hresp = hresp_reg; hrdata = hrdata_reg;
  end
end

task automatic ahb_idle();
  htrans = 2'b00; hsel_mem = '0; hsel_reg = 1'b0; hwrite = 1'b0;
endtask

// bank_sel: one-hot hsel_mem for a memory access, 0 for the register slave
task automatic ahb_run(input bit wr, input logic [31:0] addr, input logic [2:0] size,
                       input int n, input logic [3:0] bank_sel, input bit with_busy = 1'b0);
  logic [1:0]  tr [$];
  logic [31:0] ad [$];
  int          bt [$];
  int          nslots;
  for (int i = 0; i < n; i++) begin
    if (with_busy && i == 1) begin
      tr.push_back(2'b01); ad.push_back(addr + (32'(i) << size)); bt.push_back(-1);
    end
    tr.push_back(i == 0 ? 2'b10 : 2'b11); ad.push_back(addr + (32'(i) << size)); bt.push_back(i);
  end
  nslots = tr.size();
  for (int k = 0; k <= nslots; k++) begin
    int cyc;
    if (k < nslots) begin
      htrans = tr[k]; haddr = ad[k]; hwrite = wr; hsize = size;
      hsel_mem = bank_sel; hsel_reg = (bank_sel == 0);
      if (tr[k] == 2'b01) busy_cycles++;
    end else begin
      ahb_idle();
    end
    if (k > 0 && bt[k-1] >= 0 && wr) hwdata = wbuf[bt[k-1]];
    else if (k > 0 && bt[k-1] < 0) hwdata = $urandom;
    #1;
    cyc = 1;
    while (!hready) begin
      @(negedge hclk); #1;
      cyc++;
    end
    if (k > 0 && bt[k-1] >= 0) begin
      if (!wr) rbuf[bt[k-1]] = hrdata;
      rresp[bt[k-1]] = hresp;
      lat[bt[k-1]] = cyc;
    end
    @(negedge hclk);
  end
endtask

// lanes addressed by a transfer (little-endian)
function automatic logic [3:0] tb_lanes(input logic [2:0] size, input logic [1:0] a);
  case (size)
    3'd0:    return 4'b0001 << a;
    3'd1:    return a[1] ? 4'b1100 : 4'b0011;
    default: return 4'b1111;
  endcase
endfunction
