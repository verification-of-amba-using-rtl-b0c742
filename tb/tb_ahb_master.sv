// tb_ahb_master: self-checking test of the generic AHB master.
// The bench plays the arbiter (it drives hgrant) and a memory slave whose
// wait states and responses it chooses per beat. It checks:
//   * protocol: the first beat is NSQ, later beats SEQ at +4, addresses are
//     only driven while the master owns the bus, HBUSREQ is held until the
//     last address phase, at most one BUSY per burst and never on beat 0;
//   * data: written words land in the slave memory, read beats return the
//     memory contents in beat order;
//   * latency: from the NSQ cycle to the last READY/OK cycle a clean transfer
//     takes exactly 1 + beats + wait states + BUSY cycles, i.e. 2 for a
//     zero-wait SINGLE and at most 34 for a 16-beat burst;
//   * RETRY and SPLIT restart the command at its first beat; ERROR aborts it
//     with done_err; a master that loses the grant mid-burst resumes with NSQ.
module tb_ahb_master;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  master_cmd_t cmd;
  logic cmd_ready, busy_req, rvalid, done, done_err, hbusreq, hgrant;
  logic [31:0] wdata, rdata, hwdata;
  logic [3:0] wbeat, rbeat;
  ahb_ctl_t ctl;
  ahb_rsp_t rsp;
  int checks = 0, failures = 0;
  int cycle = 0;

  ahb_master dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---------------- slave model ----------------
  logic [31:0] mem [logic [31:0]];
  logic [31:0] pattern;
  int max_waits;          // random wait states per beat, 0..max_waits
  int bad_beat;           // accepted-beat number that gets bad_resp (-1: none)
  hresp_e bad_resp;
  int accepted;           // beats accepted in the current command
  int waits_seen, busy_seen;
  int budget;

  logic dp_valid, dp_write, dp_second;
  logic [31:0] dp_addr;
  int dp_wait;
  hresp_e dp_resp;

  assign wdata = pattern ^ 32'(wbeat);

  always_comb begin
    rsp = '{1'b1, HRESP_OK, 32'h0};
    if (dp_valid) begin
      rsp.hrdata = mem.exists(dp_addr) ? mem[dp_addr] : 32'h0;
      if (dp_wait > 0) rsp.hready = 1'b0;
      else if (dp_resp != HRESP_OK) begin rsp.hresp = dp_resp; rsp.hready = dp_second; end
    end
  end

  // reference of ownership and protocol state
  logic owner_ref;
  logic [31:0] last_addr;
  logic in_burst;

  always @(posedge clk) if (rst_n) begin
    // protocol checks on the address phase
    if (ctl.htrans != HTRANS_IDLE) check(owner_ref, "address driven only by the owner");
    if (ctl.htrans == HTRANS_SEQ) check(in_burst && ctl.haddr == last_addr + 4, "SEQ continues at +4");
    if (ctl.htrans == HTRANS_BUSY) check(in_burst && ctl.hburst == BURST_INC, "BUSY only inside a burst");
    // data phase
    if (dp_valid) begin
      if (dp_wait > 0) begin dp_wait--; waits_seen++; end
      else if (dp_resp == HRESP_OK) begin
        if (dp_write) mem[dp_addr] = hwdata;
        dp_valid <= 1'b0;
      end else if (!dp_second) dp_second <= 1'b1;
      else begin dp_second <= 1'b0; dp_valid <= 1'b0; in_burst <= 1'b0; end
    end
    if (rsp.hready) begin
      if (ctl.htrans == HTRANS_BUSY) busy_seen++;
      if (is_active(ctl.htrans)) begin
        int w;
        if (ctl.htrans == HTRANS_NSQ) budget = MAX_WAITS;
        w = $urandom_range(0, max_waits);
        if (w > budget) w = budget;
        budget -= w;
        dp_valid <= 1'b1; dp_write <= ctl.hwrite; dp_addr <= ctl.haddr;
        dp_wait  <= w;    dp_second <= 1'b0;
        dp_resp  <= (accepted == bad_beat) ? bad_resp : HRESP_OK;
        accepted++;
        last_addr <= ctl.haddr;
        in_burst  <= 1'b1;
      end
      owner_ref <= hgrant;
    end
    if (!owner_ref) in_burst <= 1'b0;   // a new ownership starts with NSQ
  end

  // ---------------- command driver ----------------
  int rbeats_seen;
  logic [31:0] rexp [16];
  always @(posedge clk) if (rst_n && rvalid) begin
    check(rdata == rexp[rbeat], $sformatf("read beat %0d data %h expected %h", rbeat, rdata, rexp[rbeat]));
    rbeats_seen++;
  end

  int nsq_cycle, ready_cycle;
  always @(posedge clk) begin
    if (ctl.htrans == HTRANS_NSQ && rsp.hready && nsq_cycle < 0) nsq_cycle = cycle;
    if (dp_valid && rsp.hready && rsp.hresp == HRESP_OK) ready_cycle = cycle;
  end

  // Runs one command; returns the cycles from NSQ to the last READY/OK
  task automatic run(input logic wr, input hburst_e b, input int beats, input logic [31:0] addr,
                     input logic busy, output int lat, output logic err);
    cmd <= '{1'b1, wr, b, BEAT_W'(beats), addr};
    busy_req <= busy;
    pattern <= $urandom;
    accepted = 0; waits_seen = 0; busy_seen = 0; rbeats_seen = 0; nsq_cycle = -1;
    @(posedge clk);
    cmd.valid <= 1'b0;
    while (!done) @(posedge clk);
    err = done_err;
    lat = ready_cycle - nsq_cycle + 1;
    check(busy_seen <= 1, "at most one BUSY");
    busy_req <= 1'b0;
    @(posedge clk);
  endtask

  int lat, beats;
  logic err;
  logic [31:0] base, pat;
  int n_retry = 0, n_split = 0, n_err = 0, n_loss = 0, n_busy = 0;

  initial begin
    cmd = '0; busy_req = 0; hgrant = 1; max_waits = 0; bad_beat = -1; bad_resp = HRESP_OK;
    dp_valid = 0; dp_second = 0; dp_wait = 0; owner_ref = 0; in_burst = 0; budget = MAX_WAITS;
    pattern = 0; ready_cycle = 0; nsq_cycle = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    // zero-wait SINGLE: 2 cycles
    run(1, BURST_SINGLE, 1, 32'h100, 0, lat, err);
    check(lat == 2 && !err, $sformatf("SINGLE latency %0d", lat));

    // 16-beat burst with a full wait budget and one BUSY: 34 cycles
    max_waits = 3;
    begin
      run(1, BURST_INC, 16, 32'h200, 1, lat, err);
      check(lat == 1 + 16 + waits_seen + busy_seen && lat <= 1 + MAX_BEATS + MAX_WAITS + 1,
            $sformatf("burst latency %0d waits %0d busy %0d", lat, waits_seen, busy_seen));
      check(busy_seen == 1, "BUSY inserted");
      n_busy += busy_seen;
    end
    // every beat with the most wait states: exactly 34 cycles
    max_waits = 16;
    for (int i = 0; i < 16; i++) rexp[i] = mem[32'h200 + 4 * i];
    run(0, BURST_INC, 16, 32'h200, 1, lat, err);
    check(waits_seen == MAX_WAITS && lat == 34, $sformatf("worst-case burst latency %0d", lat));

    // random clean writes then read-back
    for (int n = 0; n < 60; n++) begin
      hburst_e b;
      b = hburst_e'($urandom_range(0, 1));
      beats = (b == BURST_SINGLE) ? 1 : $urandom_range(1, 16);
      base = {20'h0, 6'($urandom), 6'h0};
      max_waits = $urandom_range(0, 4);
      run(1, b, beats, base, $urandom_range(0, 1), lat, err);
      check(!err && lat == 1 + beats + waits_seen + busy_seen, $sformatf("write latency %0d", lat));
      n_busy += busy_seen;
      pat = pattern;
      for (int i = 0; i < beats; i++) begin
        check(mem[base + 4 * i] == (pat ^ 32'(i)), "write data in memory");
        rexp[i] = mem[base + 4 * i];
      end
      run(0, b, beats, base, $urandom_range(0, 1), lat, err);
      check(!err && rbeats_seen == beats, "all read beats returned");
      check(lat == 1 + beats + waits_seen + busy_seen, $sformatf("read latency %0d", lat));
      n_busy += busy_seen;
    end

    // RETRY / SPLIT on a random beat: restart from scratch
    for (int n = 0; n < 30; n++) begin
      beats = $urandom_range(2, 16);
      base = {20'h1, 6'($urandom), 6'h0};
      max_waits = $urandom_range(0, 2);
      bad_beat = $urandom_range(0, beats - 1);
      bad_resp = (n % 2) ? HRESP_SPLIT : HRESP_RETRY;
      fork
        run(1, BURST_INC, beats, base, 0, lat, err);
        begin
          // a split master is kept off the bus for a while, as the mask would
          if (bad_resp == HRESP_SPLIT) begin
            while (!(dp_valid && rsp.hresp == HRESP_SPLIT)) @(posedge clk);
            #1 hgrant = 0;
            repeat (5) begin
              @(posedge clk); #1;
              check(hbusreq, "split master keeps requesting");
            end
            hgrant = 1;
          end
        end
      join
      check(!err && accepted == bad_beat + 1 + beats, $sformatf("restarted from the first beat (%0d accepted)", accepted));
      bad_beat = -1;
      pat = pattern;
      for (int i = 0; i < beats; i++) check(mem[base + 4 * i] == (pat ^ 32'(i)), "data after restart");
      if (n % 2) n_split++; else n_retry++;
    end

    // ERROR aborts
    for (int n = 0; n < 10; n++) begin
      beats = $urandom_range(2, 16);
      base = {20'h2, 6'($urandom), 6'h0};
      bad_beat = $urandom_range(0, beats - 1);
      bad_resp = HRESP_ERROR;
      run(1, BURST_INC, beats, base, 0, lat, err);
      check(err, "done_err after ERROR");
      check(accepted == bad_beat + 1, "no beats after the ERROR");
      bad_beat = -1;
      n_err++;
    end

    // loss of the grant in the middle of a burst
    for (int n = 0; n < 10; n++) begin
      beats = 16;
      base = {20'h3, 6'($urandom), 6'h0};
      max_waits = 0;
      fork
        run(1, BURST_INC, beats, base, 0, lat, err);
        begin
          repeat ($urandom_range(3, 8)) @(posedge clk);
          #1 hgrant = 0;
          repeat (4) @(posedge clk);
          #1 hgrant = 1;
        end
      join
      pat = pattern;
      check(!err, "no error");
      for (int i = 0; i < beats; i++) check(mem[base + 4 * i] == (pat ^ 32'(i)), "data after losing the bus");
      n_loss++;
    end

    $display("busy %0d retry %0d split %0d error %0d bus-loss %0d", n_busy, n_retry, n_split, n_err, n_loss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
