// ahb_slave: generic AHB register slave with wait states, RETRY, SPLIT and ERROR.
//
// The slave holds N_REGS 32-bit registers addressed by HADDR[5:2] (its
// source/target registers). It samples an address phase when it is selected,
// HREADY is high and the transfer is NSQ or SEQ; IDLE and BUSY transfers get
// an immediate OK with no data phase. How it answers a transfer is chosen by
// its environment through ctl_env, sampled together with the address phase:
//   * OK after ctl_env.waits wait states (HREADY low, HRESP OK), at most
//     MAX_WAITS per burst, counted from the burst's NSQ beat; writes update
//     the register on the completing edge, reads return it in that cycle;
//   * ERROR, RETRY or SPLIT as a two-cycle response: HREADY low in the first
//     cycle, high in the second, HRESP held in both. The register is left
//     alone.
// A SPLIT-capable slave remembers the one master it split on (HMASTER of
// the address phase) and, when ctl_env.unsplit is high, raises that master's
// HSPLIT bit for one cycle and forgets it; the release waits until the
// two-cycle SPLIT response is over, so the arbiter has masked the master.
// It never raises HSPLIT for any other master. A slave that is not
// SPLIT-capable, or that already holds a split, answers RETRY where SPLIT
// was asked for. HBURST is not read: a register slave behaves the same for
// SINGLE and INC transfers, and the NSQ/SEQ kind alone marks a new burst.
// The response kinds, their two-cycle form, the one-split limit and the
// HSPLIT rule follow the modelled protocol; the register file, the per-burst
// wait budget and the environment port are this design's choices.
module ahb_slave
  import amba_pkg::*;
#(
  parameter int unsigned N_MASTERS     = 8,
  parameter int unsigned N_REGS        = 16,
  parameter bit          SPLIT_CAPABLE = 1'b1,
  localparam int unsigned MW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1,
  localparam int unsigned RW = (N_REGS > 1) ? $clog2(N_REGS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hsel,
  input  ahb_ctl_t             ctl,
  input  logic [DATA_W-1:0]    hwdata,
  input  logic                 hready,
  input  logic [MW-1:0]        hmaster,
  input  slave_ctl_t           ctl_env,
  output ahb_rsp_t             rsp,
  output logic [N_MASTERS-1:0] hsplit
);

  logic [DATA_W-1:0] regs [N_REGS];

  logic              dvalid;     // a data phase of ours is in progress
  logic              dwrite;
  logic [RW-1:0]     didx;
  hresp_e            dresp;
  logic [WAIT_W-1:0] wcnt;       // wait states still to insert
  logic              second;     // second cycle of a two-cycle response
  logic [WAIT_W:0]   budget;     // wait states left in this burst
  logic              split_valid;
  logic              split_told;  // the SPLIT response has been given
  logic [MW-1:0]     split_master;

  logic              take;
  logic [WAIT_W:0]   budget_now;
  logic [WAIT_W-1:0] waits_now;
  hresp_e            resp_now;

  assign take = hsel && hready && is_active(ctl.htrans);

  always_comb begin
    budget_now = (ctl.htrans == HTRANS_NSQ) ? (WAIT_W+1)'(MAX_WAITS) : budget;
    waits_now  = ((WAIT_W+1)'(ctl_env.waits) > budget_now) ? budget_now[WAIT_W-1:0]
                                                            : ctl_env.waits;
    resp_now   = ctl_env.resp;
    if (resp_now == HRESP_SPLIT && (!SPLIT_CAPABLE || split_valid))
      resp_now = HRESP_RETRY;
  end

  always_comb begin
    rsp.hready = 1'b1;
    rsp.hresp  = HRESP_OK;
    rsp.hrdata = regs[didx];
    if (dvalid) begin
      if (wcnt != '0) begin
        rsp.hready = 1'b0;
      end else if (dresp != HRESP_OK) begin
        rsp.hresp  = dresp;
        rsp.hready = second;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvalid <= 1'b0; dwrite <= 1'b0; didx <= '0; dresp <= HRESP_OK;
      wcnt <= '0; second <= 1'b0; budget <= (WAIT_W+1)'(MAX_WAITS);
      split_valid <= 1'b0; split_told <= 1'b0; split_master <= '0; hsplit <= '0;
      for (int i = 0; i < int'(N_REGS); i++) regs[i] <= '0;
    end else begin
      hsplit <= '0;
      if (split_valid && split_told && ctl_env.unsplit) begin
        hsplit[split_master] <= 1'b1;
        split_valid          <= 1'b0;
        split_told           <= 1'b0;
      end

      if (dvalid) begin
        if (wcnt != '0) begin
          wcnt <= wcnt - WAIT_W'(1);
        end else if (dresp == HRESP_OK) begin
          if (dwrite) regs[didx] <= hwdata;
          dvalid <= 1'b0;
        end else if (!second) begin
          second <= 1'b1;
        end else begin
          second <= 1'b0;
          dvalid <= 1'b0;
          if (dresp == HRESP_SPLIT) split_told <= 1'b1;
        end
      end

      if (take) begin
        dvalid <= 1'b1;
        dwrite <= ctl.hwrite;
        didx   <= ctl.haddr[2 +: RW];
        dresp  <= resp_now;
        wcnt   <= waits_now;
        second <= 1'b0;
        budget <= budget_now - (WAIT_W+1)'(waits_now);
        if (resp_now == HRESP_SPLIT) begin
          split_valid  <= 1'b1;
          split_master <= hmaster;
        end
      end
    end
  end

  // Two-cycle responses: the first cycle has HREADY low
  a_two_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    (rsp.hresp != HRESP_OK && rsp.hready) |-> ($past(rsp.hresp) == rsp.hresp) && !$past(rsp.hready));

  // Only one master is split on at a time, and only that one is released
  a_hsplit_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(hsplit));

endmodule
