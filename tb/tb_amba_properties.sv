// tb_amba_properties: directed system-level scenarios for the bus properties
// the design is built to meet, run on the full default system.
//   1. A zero-wait SINGLE transfer ends READY/OK in the cycle after its NSQ:
//      2 cycles from NSQ to completion, for a write and for a read.
//   2. A 16-beat INC burst whose slave asks for 2 wait states on every beat
//      (cut to the 16-per-burst budget) and which has one BUSY takes exactly
//      1 + 16 + 16 + 1 = 34 cycles.
//   3. Arbitration: while master 2 runs a burst, master 7's request waits; it
//      is granted in the cycle after the bus first shows IDLE. Masters 4, 6
//      and 7 requesting together while master 1 holds the bus are served
//      7, 6, 4 once it lets go.
//   4. Split: a SPLIT to master 7 masks it; master 6 gets the bus while 7 is
//      masked; the slave's HSPLIT unmasks 7, which then restarts and
//      completes its transfer.
//   5. APB: a write through the bridge updates the APB register exactly two
//      cycles after SETUP begins (not earlier), and a burst to the APB runs
//      its transfers back to back (ENABLE followed directly by SETUP).
//   6. A transfer can always be started: on an otherwise idle bus every
//      master, the default master 0 included, gets the bus and completes a
//      transfer to an AHB slave and one to an APB slave within 12 cycles of
//      the command (request, grant, hand-over, address and data phases).
module tb_amba_properties;
  import amba_pkg::*;
  localparam int NM = 8, NS = 16, NAPB = 4;

  logic clk = 0, rst_n = 0;
  master_cmd_t cmd [NM];
  logic [NM-1:0] cmd_ready, busy_req, rvalid, done, done_err;
  logic [31:0] wdata [NM], rdata [NM];
  logic [3:0] wbeat [NM], rbeat [NM];
  slave_ctl_t slv_ctl [NS];
  logic [NM-1:0] hgrant, hbusreq, mask, hsplit;
  logic [2:0] hmaster;
  ahb_ctl_t bus_ctl;
  ahb_rsp_t bus_rsp;
  apb_state_e apb_state;
  logic [NAPB-1:0] psel;
  logic penable, pwrite;
  logic [31:0] paddr, pwdata;

  amba_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  logic [31:0] pat [NM];
  for (genvar m = 0; m < NM; m++) begin : g_wd
    assign wdata[m] = pat[m] ^ {28'h0, wbeat[m]};
  end

  // per-master NSQ cycle and completion
  int nsq_cyc [NM], done_cyc [NM], n_done [NM];
  int waits_seen, busy_seen;
  int nsq_order [$];
  always @(posedge clk) if (rst_n) begin
    if (bus_rsp.hready && bus_ctl.htrans == HTRANS_NSQ) begin
      nsq_cyc[hmaster] = cycle;
      nsq_order.push_back(int'(hmaster));
    end
    if (!bus_rsp.hready && bus_rsp.hresp == HRESP_OK) waits_seen++;
    if (bus_rsp.hready && bus_ctl.htrans == HTRANS_BUSY) busy_seen++;
    for (int m = 0; m < NM; m++) if (done[m]) begin done_cyc[m] = cycle; n_done[m]++; end
  end

  int target [NM];

  task automatic start(input int m, input logic wr, input hburst_e b, input int beats,
                       input logic [31:0] addr, input logic busy);
    @(posedge clk);
    target[m] = n_done[m] + 1;
    pat[m] <= $urandom;
    busy_req[m] <= busy;
    cmd[m] <= '{1'b1, wr, b, BEAT_W'(beats), addr};
    @(posedge clk);
    cmd[m].valid <= 1'b0;
  endtask

  task automatic finish(input int m);
    while (n_done[m] < target[m]) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic int lat(input int m);
    return done_cyc[m] - nsq_cyc[m];
  endfunction

  int idle_cyc, grant_cyc;
  logic [31:0] old_val, d;
  int setup_cyc, n_b2b;
  apb_state_e prev_apb;

  always @(posedge clk) begin
    if (prev_apb == APB_ENABLE && apb_state == APB_SETUP) n_b2b++;
    prev_apb <= apb_state;
  end

  initial begin
    foreach (cmd[i]) begin cmd[i] = '0; pat[i] = 0; nsq_cyc[i] = 0; done_cyc[i] = 0; n_done[i] = 0; end
    busy_req = '0;
    foreach (slv_ctl[i]) slv_ctl[i] = '{'0, HRESP_OK, 1'b0};
    waits_seen = 0; busy_seen = 0; n_b2b = 0; prev_apb = APB_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. two-cycle SINGLE
    start(3, 1, BURST_SINGLE, 1, 32'h2000_0010, 0);
    finish(3);
    check(lat(3) == 2, $sformatf("SINGLE write took %0d cycles", lat(3)));
    check(dut.g_slave[2].g_generic.u_slave.regs[4] == pat[3], "SINGLE write data");
    start(3, 0, BURST_SINGLE, 1, 32'h2000_0010, 0);
    fork
      begin @(posedge clk iff rvalid[3]); d = rdata[3]; end
      finish(3);
    join
    check(lat(3) == 2, $sformatf("SINGLE read took %0d cycles", lat(3)));
    check(d == dut.g_slave[2].g_generic.u_slave.regs[4], "SINGLE read data");

    // 2. worst-case burst: 34 cycles
    slv_ctl[1].waits = 2;
    waits_seen = 0; busy_seen = 0;
    start(5, 1, BURST_INC, 16, 32'h1000_0000, 1);
    finish(5);
    slv_ctl[1].waits = 0;
    check(waits_seen == 16 && busy_seen == 1, $sformatf("waits %0d busy %0d", waits_seen, busy_seen));
    check(lat(5) == 34, $sformatf("16-beat burst took %0d cycles", lat(5)));
    for (int i = 0; i < 16; i++)
      check(dut.g_slave[1].g_generic.u_slave.regs[i] == (pat[5] ^ 32'(i)), "burst data");

    // 3a. master 7 waits for master 2's burst, then is granted right after IDLE
    slv_ctl[3].waits = 1;
    start(2, 1, BURST_INC, 8, 32'h3000_0000, 0);
    repeat (3) @(posedge clk);
    start(7, 1, BURST_SINGLE, 1, 32'h4000_0000, 0);
    check(!hgrant[7], "master 7 not granted during master 2's burst");
    idle_cyc = -1; grant_cyc = -1;
    while (grant_cyc < 0) begin
      @(posedge clk);
      if (idle_cyc < 0 && bus_ctl.htrans == HTRANS_IDLE) idle_cyc = cycle;
      if (hgrant[7]) grant_cyc = cycle;
    end
    check(grant_cyc == idle_cyc + 1, $sformatf("master 7 granted %0d cycles after IDLE", grant_cyc - idle_cyc));
    finish(7);
    finish(2);
    slv_ctl[3].waits = 0;

    // 3b. priority order 7, 6, 4
    slv_ctl[5].waits = 3;                     // keep master 1 on the bus meanwhile
    nsq_order.delete();
    start(1, 1, BURST_INC, 4, 32'h5000_0000, 0);
    fork
      start(4, 1, BURST_SINGLE, 1, 32'h6000_0000, 0);
      start(6, 1, BURST_SINGLE, 1, 32'h7000_0000, 0);
      start(7, 1, BURST_SINGLE, 1, 32'h4000_0004, 0);
    join
    finish(4);
    check(nsq_order.size() == 4 && nsq_order[0] == 1 && nsq_order[1] == 7 && nsq_order[2] == 6 &&
          nsq_order[3] == 4,
          $sformatf("service order %p", nsq_order));
    finish(1);
    slv_ctl[5].waits = 0;

    // 4. split on master 7
    slv_ctl[0].resp = HRESP_SPLIT;
    start(7, 1, BURST_SINGLE, 1, 32'h0000_0020, 0);
    @(posedge clk iff mask[7]);
    slv_ctl[0].resp = HRESP_OK;
    start(6, 1, BURST_SINGLE, 1, 32'h7000_0004, 0);
    finish(6);
    check(mask[7] && !done[7] && hbusreq[7], "master 7 still masked and requesting");
    #1 slv_ctl[0].unsplit = 1'b1;
    @(posedge clk iff hsplit[7]);
    #1 slv_ctl[0].unsplit = 1'b0;
    @(posedge clk); #1;
    check(!mask[7], "HSPLIT unmasked master 7");
    finish(7);
    check(!done_err[7] && dut.g_slave[0].g_generic.u_slave.regs[8] == pat[7], "split transfer completed");

    // 5a. APB register updated exactly two cycles after SETUP
    old_val = dut.g_apb[2].u_apb_slave.regs[5];
    start(1, 1, BURST_SINGLE, 1, 32'hF000_2014, 0);
    do begin @(posedge clk); #1; end while (apb_state != APB_SETUP);   // first SETUP cycle
    check(psel == 4'b0100 && !penable, "SETUP selects APB slave 2");
    check(dut.g_apb[2].u_apb_slave.regs[5] == old_val, "not written when SETUP starts");
    @(posedge clk); #1;
    check(apb_state == APB_ENABLE && penable, "ENABLE after SETUP");
    check(dut.g_apb[2].u_apb_slave.regs[5] == old_val, "not written after one cycle");
    @(posedge clk); #1;
    check(dut.g_apb[2].u_apb_slave.regs[5] == pat[1], "written two cycles after SETUP");
    finish(1);

    // 5b. back-to-back APB transfers
    n_b2b = 0;
    start(1, 1, BURST_INC, 4, 32'hF000_1000, 0);
    finish(1);
    check(n_b2b == 3, $sformatf("%0d back-to-back APB transfers, expected 3", n_b2b));
    for (int i = 0; i < 4; i++)
      check(dut.g_apb[1].u_apb_slave.regs[i] == (pat[1] ^ 32'(i)), "APB burst data");

    // 6. every master can start and finish a transfer
    for (int m = 0; m < NM; m++) begin
      int t0;
      t0 = cycle;
      start(m, 1, BURST_SINGLE, 1, 32'h6000_0000 + 32'(4 * m), 0);
      finish(m);
      check(cycle - t0 <= 12 && !done_err[m], $sformatf("master %0d AHB transfer in %0d cycles", m, cycle - t0));
      check(dut.g_slave[6].g_generic.u_slave.regs[m] == pat[m], "idle-bus transfer data");
      t0 = cycle;
      start(m, 1, BURST_SINGLE, 1, 32'hF000_3000 + 32'(4 * m), 0);
      finish(m);
      check(cycle - t0 <= 12 && !done_err[m], $sformatf("master %0d APB transfer in %0d cycles", m, cycle - t0));
      check(dut.g_apb[3].u_apb_slave.regs[m] == pat[m], "idle-bus APB data");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
