// tb_ahb_slave: self-checking test of the generic AHB slave.
// Two slaves share one bus: slave 0 can SPLIT, slave 1 cannot. The bench
// plays the master side and checks, against values it works out itself:
// register writes and reads, the number of data-phase cycles (1 + wait
// states for OK, 2 + wait states for ERROR/RETRY/SPLIT), the two-cycle
// response shape, the per-burst wait budget, SPLIT turning into RETRY at a
// slave that cannot split or already holds a split, and HSPLIT being raised
// once, only for the master that was split.
module tb_ahb_slave;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] hsel;
  ahb_ctl_t ctl;
  logic [31:0] hwdata;
  logic hready;
  logic [2:0] hmaster;
  slave_ctl_t env;
  ahb_rsp_t rsp [2];
  logic [7:0] hsplit [2];
  logic cur;                      // slave of the current data phase
  logic [31:0] shadow [2][16];
  int checks = 0, failures = 0;

  ahb_slave #(.N_MASTERS(8), .N_REGS(16), .SPLIT_CAPABLE(1'b1)) s0 (
    .clk, .rst_n, .hsel(hsel[0]), .ctl, .hwdata, .hready, .hmaster, .ctl_env(env),
    .rsp(rsp[0]), .hsplit(hsplit[0]));
  ahb_slave #(.N_MASTERS(8), .N_REGS(16), .SPLIT_CAPABLE(1'b0)) s1 (
    .clk, .rst_n, .hsel(hsel[1]), .ctl, .hwdata, .hready, .hmaster, .ctl_env(env),
    .rsp(rsp[1]), .hsplit(hsplit[1]));

  assign hready = rsp[cur].hready;
  always_ff @(posedge clk) if (hready) cur <= hsel[1];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One transfer: address phase, then the data phase until HREADY.
  task automatic xfer(input int s, input htrans_e t, input logic wr, input int r,
                      input logic [31:0] d, input int waits, input hresp_e resp,
                      input int m, input hresp_e exp_resp, input int exp_cycles,
                      output logic [31:0] rd);
    int cyc;
    hsel <= 2'(1 << s);
    ctl  <= '{htrans: t, hburst: BURST_INC, hwrite: wr, haddr: 32'(r) << 2};
    hmaster <= 3'(m);
    env  <= '{waits: WAIT_W'(waits), resp: resp, unsplit: 1'b0};
    @(posedge clk);
    ctl.htrans <= HTRANS_IDLE;
    hsel <= '0;
    hwdata <= d;
    env <= '{waits: '0, resp: HRESP_OK, unsplit: 1'b0};
    cyc = 0;
    forever begin
      #1;
      cyc++;
      if (exp_resp != HRESP_OK && cyc > waits)
        check(rsp[s].hresp == exp_resp && rsp[s].hready == (cyc == waits + 2),
              $sformatf("two-cycle response %s cycle %0d", exp_resp.name(), cyc));
      if (exp_resp == HRESP_OK || cyc <= waits)
        check(rsp[s].hresp == HRESP_OK, "OK during waits");
      if (hready) break;
      @(posedge clk);
    end
    rd = rsp[s].hrdata;
    check(cyc == exp_cycles, $sformatf("data phase took %0d cycles, expected %0d", cyc, exp_cycles));
    @(posedge clk);
  endtask

  logic [31:0] rd;
  int seen_split;

  initial begin
    hsel = '0; ctl = '{HTRANS_IDLE, BURST_SINGLE, 1'b0, 32'h0}; hwdata = 0; hmaster = 0;
    env = '{'0, HRESP_OK, 1'b0}; cur = 0;
    foreach (shadow[a, b]) shadow[a][b] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // writes and reads with wait states on both slaves
    for (int n = 0; n < 60; n++) begin
      int s, r, w;
      logic [31:0] d;
      s = $urandom_range(0, 1); r = $urandom_range(0, 15); w = $urandom_range(0, 5);
      d = $urandom;
      xfer(s, HTRANS_NSQ, 1, r, d, w, HRESP_OK, 0, HRESP_OK, w + 1, rd);
      shadow[s][r] = d;
      r = $urandom_range(0, 15); w = $urandom_range(0, 3);
      xfer(s, HTRANS_NSQ, 0, r, 0, w, HRESP_OK, 0, HRESP_OK, w + 1, rd);
      check(rd == shadow[s][r], "read data");
    end

    // wait budget: 16 per burst, renewed by NSQ
    xfer(0, HTRANS_NSQ, 1, 1, 32'h11, 10, HRESP_OK, 0, HRESP_OK, 11, rd);
    xfer(0, HTRANS_SEQ, 1, 2, 32'h22, 10, HRESP_OK, 0, HRESP_OK, 7, rd);
    xfer(0, HTRANS_SEQ, 1, 3, 32'h33, 4, HRESP_OK, 0, HRESP_OK, 1, rd);
    xfer(0, HTRANS_NSQ, 1, 4, 32'h44, 4, HRESP_OK, 0, HRESP_OK, 5, rd);
    shadow[0][1] = 32'h11; shadow[0][2] = 32'h22; shadow[0][3] = 32'h33; shadow[0][4] = 32'h44;

    // ERROR and RETRY leave the register alone
    xfer(1, HTRANS_NSQ, 1, 5, 32'hdead, 2, HRESP_ERROR, 0, HRESP_ERROR, 4, rd);
    xfer(1, HTRANS_NSQ, 0, 5, 0, 0, HRESP_OK, 0, HRESP_OK, 1, rd);
    check(rd == shadow[1][5], "ERROR did not write");
    xfer(0, HTRANS_NSQ, 1, 6, 32'hbeef, 0, HRESP_RETRY, 0, HRESP_RETRY, 2, rd);
    xfer(0, HTRANS_NSQ, 0, 6, 0, 0, HRESP_OK, 0, HRESP_OK, 1, rd);
    check(rd == shadow[0][6], "RETRY did not write");

    // SPLIT at a slave that cannot split becomes RETRY
    xfer(1, HTRANS_NSQ, 1, 7, 32'h1, 1, HRESP_SPLIT, 2, HRESP_RETRY, 3, rd);
    check(hsplit[1] == '0, "non-capable slave never raises HSPLIT");

    // SPLIT on master 3, then a second SPLIT request becomes RETRY
    xfer(0, HTRANS_NSQ, 1, 8, 32'h2, 0, HRESP_SPLIT, 3, HRESP_SPLIT, 2, rd);
    xfer(0, HTRANS_NSQ, 1, 8, 32'h2, 0, HRESP_SPLIT, 5, HRESP_RETRY, 2, rd);
    repeat (3) @(posedge clk);
    check(hsplit[0] == '0, "no HSPLIT before release");
    env.unsplit <= 1'b1;
    seen_split = 0;
    for (int c = 0; c < 4; c++) begin
      @(posedge clk); #1;
      env.unsplit <= 1'b0;
      if (hsplit[0] != '0) begin
        seen_split++;
        check(hsplit[0] == 8'b0000_1000, "HSPLIT only for master 3");
      end
    end
    check(seen_split == 1, "HSPLIT pulsed once");
    // after the release a new SPLIT is allowed again
    xfer(0, HTRANS_NSQ, 1, 8, 32'h2, 0, HRESP_SPLIT, 6, HRESP_SPLIT, 2, rd);

    // IDLE and BUSY get an immediate OK and do not write
    xfer(0, HTRANS_IDLE, 1, 9, 32'h77, 3, HRESP_ERROR, 0, HRESP_OK, 1, rd);
    xfer(0, HTRANS_BUSY, 1, 9, 32'h77, 3, HRESP_ERROR, 0, HRESP_OK, 1, rd);
    xfer(0, HTRANS_NSQ, 0, 9, 0, 0, HRESP_OK, 0, HRESP_OK, 1, rd);
    check(rd == shadow[0][9], "IDLE/BUSY did not write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
