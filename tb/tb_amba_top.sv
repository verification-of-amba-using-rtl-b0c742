// tb_amba_top: end-to-end test of the whole AMBA system at its default size
// (8 masters, 16 AHB slave slots with the APB bridge in slot 15, 4 APB
// slaves).
//
// Each master repeatedly writes a random SINGLE or INC burst into a region
// that only it uses, then reads it back and compares every read beat with
// what it wrote. A master's regions are: all 16 registers of AHB slot m
// (SPLIT-capable), all 16 registers of slot 8+m (not SPLIT-capable, masters
// 0..6), and 8 registers of APB slave m%4 behind the bridge. Masters pause a
// random number of cycles between commands. The slaves' environment picks
// random wait states, RETRY, SPLIT (a non-capable slave turns it into
// RETRY), ERROR (only for reads, so a region's contents stay known) and
// random split releases.
//
// Checked: read data; that every command ends (OK, or done_err after an
// ERROR); that every zero-wait OK SINGLE transfer to a generic slave
// completes in the cycle after its NSQ (the two-cycle latency) and in general
// that a SINGLE data phase lasts waits+1 cycles for OK and waits+2 for a
// two-cycle response, 2 cycles at the bridge; that a masked master is never
// granted unless it is master 0; that every command no RETRY, SPLIT or ERROR
// touched ends within 34 cycles of its NSQ (1 + 16 beats + 16 waits + 1
// BUSY). Every mechanism of the design is counted
// and must occur at least once: wait states, RETRY, SPLIT, ERROR, BUSY,
// SINGLE and INC transfers, masking and HSPLIT release, ownership handover,
// default-master grant, APB transfers and back-to-back APB transfers. Once a
// burst has started, the next NSQ of its master must start at the command's
// first address (a restart after RETRY/SPLIT): no burst is cut in two.
module tb_amba_top;
  import amba_pkg::*;
  localparam int NM = 8, NS = 16, NAPB = 4, BRIDGE = 15;
  localparam int RUN_CYCLES = 30000;

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
    repeat (RUN_CYCLES + 40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // ---------------- slave environment ----------------
  logic [WAIT_W-1:0] r_waits [NS];
  hresp_e            r_resp  [NS];
  logic              r_unsplit [NS];
  always @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      int k;
      k = $urandom_range(0, 99);
      r_waits[s]   <= ($urandom_range(0, 3) == 0) ? WAIT_W'($urandom_range(1, 3)) : '0;
      r_resp[s]    <= (k < 4) ? HRESP_RETRY : (k < 8) ? HRESP_SPLIT : (k < 11) ? HRESP_ERROR : HRESP_OK;
      r_unsplit[s] <= ($urandom_range(0, 15) == 0);
    end
  end
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      slv_ctl[s].waits   = r_waits[s];
      slv_ctl[s].resp    = (r_resp[s] == HRESP_ERROR && bus_ctl.hwrite) ? HRESP_OK : r_resp[s];
      slv_ctl[s].unsplit = r_unsplit[s];
    end
  end

  // ---------------- masters' users ----------------
  logic [31:0] pat [NM];
  logic [31:0] rexp [NM][16];
  logic [31:0] base [NM];
  int n_cmds [NM];
  logic stop_issuing = 0;

  for (genvar m = 0; m < NM; m++) begin : g_user
    assign wdata[m] = pat[m] ^ {28'h0, wbeat[m]};

    always @(posedge clk) if (rst_n && rvalid[m])
      check(rdata[m] == rexp[m][rbeat[m]],
            $sformatf("master %0d read beat %0d: %h expected %h", m, rbeat[m], rdata[m], rexp[m][rbeat[m]]));

    initial begin : user
      cmd[m] = '0; busy_req[m] = 0; pat[m] = 0; n_cmds[m] = 0; base[m] = 0;
      @(posedge rst_n);
      while (!stop_issuing) begin
        int region, beats, off;
        hburst_e b;
        logic [31:0] addr;
        repeat ($urandom_range(0, 40)) @(posedge clk);
        region = $urandom_range(0, (m < 7) ? 2 : 1);
        b = hburst_e'($urandom_range(0, 1));
        if (region == 2) begin                       // slot 8+m, no SPLIT
          beats = (b == BURST_INC) ? $urandom_range(1, 16) : 1;
          off = $urandom_range(0, 16 - beats);
          addr = {4'(8 + m), 28'(off * 4)};
        end else if (region == 1) begin              // APB slave m%4 via the bridge
          beats = (b == BURST_INC) ? $urandom_range(1, 8) : 1;
          off = (m / 4) * 8 + $urandom_range(0, 8 - beats);
          addr = {4'(BRIDGE), 14'h0, 2'(m % 4), 6'h0, 4'(off), 2'b00};
        end else begin                               // slot m, SPLIT-capable
          beats = (b == BURST_INC) ? $urandom_range(1, 16) : 1;
          off = $urandom_range(0, 16 - beats);
          addr = {4'(m), 28'(off * 4)};
        end
        // write
        @(posedge clk);
        pat[m] <= $urandom;
        base[m] <= addr;
        busy_req[m] <= 1'($urandom);
        cmd[m] <= '{1'b1, 1'b1, b, BEAT_W'(beats), addr};
        @(posedge clk);
        cmd[m].valid <= 1'b0;
        while (!done[m]) @(posedge clk);
        check(!done_err[m], $sformatf("master %0d write ended without error", m));
        for (int i = 0; i < beats; i++) rexp[m][i] = pat[m] ^ 32'(i);
        // read back
        @(posedge clk);
        busy_req[m] <= 1'($urandom);
        cmd[m] <= '{1'b1, 1'b0, b, BEAT_W'(beats), addr};
        @(posedge clk);
        cmd[m].valid <= 1'b0;
        while (!done[m]) @(posedge clk);
        n_cmds[m]++;
      end
    end
  end

  // ---------------- monitors ----------------
  int n_wait = 0, n_retry = 0, n_split = 0, n_error = 0, n_busy = 0, n_single = 0, n_inc = 0;
  int n_mask = 0, n_hsplit = 0, n_handover = 0, n_default = 0, n_apb = 0, n_apb_b2b = 0;
  int n_resume = 0, n_err_done = 0, n_lat2 = 0;
  logic [2:0] prev_hmaster;
  apb_state_e prev_apb;

  // NSQ-to-end latency of every command that no RETRY/SPLIT/ERROR touched
  int nsq_cyc [NM];
  logic [NM-1:0] touched;
  int n_burst_lat = 0, max_lat = 0;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) begin
      if (bus_rsp.hready && bus_ctl.htrans == HTRANS_NSQ && hmaster == 3'(m)) begin
        nsq_cyc[m] = cycle; touched[m] = 1'b0;
      end
      if (bus_rsp.hresp != HRESP_OK && dut.hmaster_data == 3'(m)) touched[m] = 1'b1;
      if (done[m] && !touched[m]) begin
        // done is registered, so done_cycle - nsq_cycle = cycles from NSQ to the last READY
        check(cycle - nsq_cyc[m] <= 1 + MAX_BEATS + MAX_WAITS + 1,
              $sformatf("master %0d transfer took %0d cycles", m, cycle - nsq_cyc[m]));
        if (cycle - nsq_cyc[m] > max_lat) max_lat = cycle - nsq_cyc[m];
        n_burst_lat++;
      end
    end
  end

  // data-phase length of SINGLE transfers
  logic        sp_valid;
  int          sp_cycles, sp_exp_ok, sp_slot;
  logic [3:0]  sp_waits;

  always @(posedge clk) if (rst_n) begin
    if (!bus_rsp.hready && bus_rsp.hresp == HRESP_OK) n_wait++;
    if (!bus_rsp.hready && bus_rsp.hresp == HRESP_RETRY) n_retry++;
    if (!bus_rsp.hready && bus_rsp.hresp == HRESP_SPLIT) n_split++;
    if (!bus_rsp.hready && bus_rsp.hresp == HRESP_ERROR) n_error++;
    if (bus_ctl.htrans == HTRANS_BUSY && bus_rsp.hready) n_busy++;
    if (mask != 0) n_mask++;
    if (hsplit != 0) n_hsplit++;
    if (hmaster != prev_hmaster) n_handover++;
    if (hgrant[0] && hbusreq == 0) n_default++;
    if (penable) n_apb++;
    if (prev_apb == APB_ENABLE && apb_state == APB_SETUP) n_apb_b2b++;
    n_err_done += $countones(done & done_err);
    prev_hmaster <= hmaster;
    prev_apb <= apb_state;

    // a masked master other than the default one never holds the grant
    for (int m = 1; m < NM; m++)
      if (mask[m] && hgrant[m] && $past(mask[m])) check(1'b0, $sformatf("masked master %0d granted", m));

    // SINGLE data-phase length
    if (sp_valid) begin
      sp_cycles++;
      if (bus_rsp.hready) begin
        if (sp_slot == BRIDGE) check(sp_cycles == 2, "bridge SINGLE takes 2 data cycles");
        else if (bus_rsp.hresp == HRESP_OK) begin
          check(sp_cycles == sp_waits + 1, $sformatf("SINGLE OK data phase %0d cycles, waits %0d", sp_cycles, sp_waits));
          if (sp_waits == 0) n_lat2++;
        end else
          check(sp_cycles == sp_waits + 2, "SINGLE two-cycle response length");
        sp_valid <= 1'b0;
      end
    end
    if (bus_rsp.hready && is_active(bus_ctl.htrans)) begin
      if (bus_ctl.hburst == BURST_SINGLE) begin
        sp_valid <= 1'b1; sp_cycles = 0; sp_slot = int'(bus_ctl.haddr[31:28]);
        sp_waits <= slv_ctl[bus_ctl.haddr[31:28]].waits[3:0];
        n_single++;
      end else if (bus_ctl.htrans == HTRANS_NSQ) begin
        n_inc++;
        if (bus_ctl.haddr != base[hmaster]) begin n_resume++; if (n_resume < 4) $display("cut: cycle %0d m %0d addr %h base %h", cycle, hmaster, bus_ctl.haddr, base[hmaster]); end
      end
    end
  end

  initial begin
    touched = '1; foreach (nsq_cyc[i]) nsq_cyc[i] = 0;
    sp_valid = 0; sp_cycles = 0; prev_hmaster = 7; prev_apb = APB_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (RUN_CYCLES) @(posedge clk);
    stop_issuing = 1;
    // let every master finish its command
    begin
      int waited = 0;
      while (cmd_ready != '1 && waited < 20000) begin @(posedge clk); waited++; end
      check(cmd_ready == '1, "all masters finished their commands");
    end
    repeat (50) @(posedge clk);
    for (int m = 0; m < NM; m++)
      check(n_cmds[m] > 0, $sformatf("master %0d completed commands", m));
    check(n_wait > 0,     "wait states happened");
    check(n_retry > 0,    "RETRY happened");
    check(n_split > 0,    "SPLIT happened");
    check(n_error > 0,    "ERROR happened");
    check(n_err_done > 0, "a command ended with ERROR");
    check(n_busy > 0,     "BUSY happened");
    check(n_single > 0,   "SINGLE transfers happened");
    check(n_inc > 0,      "INC bursts happened");
    check(n_mask > 0,     "a master was masked");
    check(n_hsplit > 0,   "HSPLIT released a master");
    check(n_handover > 0, "bus ownership changed hands");
    check(n_default > 0,  "default master held the grant");
    check(n_apb > 0,      "APB transfers happened");
    check(n_apb_b2b > 0,  "back-to-back APB transfers happened");
    check(n_resume == 0,  "no burst was cut by a new NSQ before it ended");
    check(n_lat2 > 0,     "two-cycle SINGLE transfers happened");
    $display("commands per master: %0d %0d %0d %0d %0d %0d %0d %0d", n_cmds[0], n_cmds[1],
             n_cmds[2], n_cmds[3], n_cmds[4], n_cmds[5], n_cmds[6], n_cmds[7]);
    $display("waits %0d retry %0d split %0d error %0d (aborted %0d) busy %0d single %0d inc %0d",
             n_wait, n_retry, n_split, n_error, n_err_done, n_busy, n_single, n_inc);
    $display("masked %0d hsplit %0d handover %0d default %0d apb %0d apb-b2b %0d cut bursts %0d lat2 %0d",
             n_mask, n_hsplit, n_handover, n_default, n_apb, n_apb_b2b, n_resume, n_lat2);
    $display("transfers timed %0d, longest %0d cycles (bound 34)", n_burst_lat, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
