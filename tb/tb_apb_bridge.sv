// tb_apb_bridge: self-checking test of the AHB-to-APB bridge.
// The bench is a pipelined AHB master sending random reads and writes to
// four APB slave models, sometimes back to back, sometimes with idle cycles
// between. It checks the APB stages (SETUP with PSEL of the addressed slave
// and PENABLE low, then ENABLE with everything stable, then SETUP or IDLE),
// that each APB transfer takes exactly two cycles, that the AHB data phase
// takes two cycles (one wait state), and that data moves correctly both ways.
module tb_apb_bridge;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hsel, hready;
  ahb_ctl_t ctl;
  logic [31:0] hwdata;
  ahb_rsp_t rsp;
  apb_state_e state;
  logic [31:0] paddr, pwdata;
  logic [3:0] psel;
  logic penable, pwrite;
  logic [31:0] prdata [4];
  logic [31:0] apb_mem [4][16];
  int checks = 0, failures = 0;
  int n_b2b = 0, n_idle = 0, n_rd = 0, n_wr = 0;

  apb_bridge #(.N_APB(4)) dut (.*);
  assign hready = rsp.hready;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // APB slave models
  for (genvar p = 0; p < 4; p++) begin : g_apb
    assign prdata[p] = apb_mem[p][paddr[5:2]];
  end
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++)
      if (psel[p] && penable && pwrite) apb_mem[p][paddr[5:2]] <= pwdata;
  end

  // transfer records
  typedef struct { logic wr; logic [31:0] addr; logic [31:0] data; } xfer_t;
  xfer_t aph, dph;     // in address phase / in data phase
  logic aph_v, dph_v;
  logic [31:0] ref_mem [4][16];
  int dph_cycles;
  apb_state_e prev_state;
  logic [31:0] prev_paddr;
  logic [3:0] prev_psel;

  function automatic xfer_t new_xfer();
    xfer_t x;
    x.wr = 1'($urandom);
    // bridge window, APB slave in bits [13:12], register in bits [5:2]
    x.addr = {4'hF, 14'h0, 2'($urandom), 6'h0, 4'($urandom), 2'b00};
    x.data = $urandom;
    return x;
  endfunction

  always_comb begin
    hsel = aph_v;
    ctl  = '{aph_v ? HTRANS_NSQ : HTRANS_IDLE, BURST_SINGLE, aph.wr, aph.addr};
    hwdata = dph.data;
  end

  int cyc = 0, done_n = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // APB protocol
    if (state == APB_SETUP) begin
      check(psel == 4'(1 << paddr[13:12]) && !penable, "SETUP: one PSEL, PENABLE low");
    end
    if (state == APB_ENABLE) begin
      check(prev_state == APB_SETUP, "ENABLE follows SETUP");
      check(penable && psel == prev_psel && paddr == prev_paddr, "ENABLE: stable, PENABLE high");
    end
    if (state == APB_IDLE) check(psel == 0 && !penable, "IDLE: no PSEL");
    if (prev_state == APB_ENABLE && state == APB_SETUP) n_b2b++;
    if (prev_state == APB_ENABLE && state == APB_IDLE) n_idle++;
    prev_state <= state; prev_paddr <= paddr; prev_psel <= psel;

    // AHB data phase
    if (dph_v) begin
      dph_cycles++;
      if (hready) begin
        int p, r;
        p = dph.addr[13:12]; r = dph.addr[5:2];
        check(rsp.hresp == HRESP_OK, "bridge answers OK");
        check(dph_cycles == 2, $sformatf("AHB data phase %0d cycles", dph_cycles));
        if (dph.wr) begin ref_mem[p][r] = dph.data; n_wr++; end
        else begin check(rsp.hrdata == ref_mem[p][r], "read data"); n_rd++; end
        dph_v <= 1'b0;
        done_n++;
      end
    end
    if (hready) begin
      if (aph_v) begin dph <= aph; dph_v <= 1'b1; dph_cycles = 0; end
      aph_v <= ($urandom_range(0, 2) != 0);
      aph   <= new_xfer();
    end
  end

  initial begin
    aph_v = 0; dph_v = 0; dph_cycles = 0; aph = new_xfer(); dph = new_xfer();
    prev_state = APB_IDLE; prev_paddr = 0; prev_psel = 0;
    foreach (apb_mem[a, b]) begin apb_mem[a][b] = 0; ref_mem[a][b] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (done_n < 2000) @(posedge clk);
    @(posedge clk);
    // the APB memories hold what the AHB side wrote
    foreach (apb_mem[a, b]) check(apb_mem[a][b] == ref_mem[a][b], "APB memory contents");
    check(n_b2b > 0 && n_idle > 0 && n_rd > 0 && n_wr > 0, "back-to-back and idle cases seen");
    $display("reads %0d writes %0d back-to-back %0d to-idle %0d", n_rd, n_wr, n_b2b, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
