// apb_slave: generic APB register slave.
//
// N_REGS 32-bit registers, selected by PADDR[5:2], stand for a peripheral's
// source/target registers. A write takes effect on the clock edge that ends
// the ENABLE cycle (PSEL and PENABLE and PWRITE high); a read returns the
// addressed register combinationally, and the bridge samples it at the end
// of ENABLE. So a register is updated exactly two cycles after the SETUP
// cycle began, which is the APB transfer time. The two-stage access follows
// the APB protocol; the register file is this design's stand-in for a
// peripheral. Only PADDR[5:2] is decoded: the bridge has already chosen the
// slave, and byte offsets within a word are not used.
module apb_slave
  import amba_pkg::*;
#(
  parameter int unsigned N_REGS = 16,
  localparam int unsigned RW = (N_REGS > 1) ? $clog2(N_REGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [ADDR_W-1:0] paddr,
  input  logic [DATA_W-1:0] pwdata,
  output logic [DATA_W-1:0] prdata
);

  logic [DATA_W-1:0] regs [N_REGS];
  logic [RW-1:0]     idx;

  assign idx    = paddr[2 +: RW];
  assign prdata = regs[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_REGS); i++) regs[i] <= '0;
    end else if (psel && penable && pwrite) begin
      regs[idx] <= pwdata;
    end
  end

  // ENABLE only ever follows SETUP to the same slave
  a_enable_after_setup: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable) |-> $past(psel && !penable));

endmodule
