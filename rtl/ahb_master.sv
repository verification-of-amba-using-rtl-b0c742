// ahb_master: generic AHB bus master.
//
// The master carries out one command at a time: a SINGLE transfer or an INC
// burst of up to MAX_BEATS 32-bit beats at incrementing word addresses. It
// raises HBUSREQ, waits until it owns the address bus (grant sampled on a
// clock edge with HREADY high), then drives one address phase per beat: NSQ
// for the first beat, SEQ for the following ones. Data follows one cycle
// later in the data phase, so the address of beat k+1 overlaps the data of
// beat k. A low HREADY (wait state) holds both phases. On request
// (busy_req) it inserts one BUSY cycle inside a burst. When it has no
// transfer to make, or while it is not the owner, it drives IDLE.
//
// Slave responses: RETRY and SPLIT restart the whole command from its first
// beat after re-requesting the bus (a split master is held off by the
// arbiter's mask until the slave releases it); ERROR aborts the command. In
// the first cycle of one of these two-cycle responses the master switches its
// address phase to IDLE. It starts a transfer (NSQ) only while it owns the
// bus and is still granted, so the arbiter cannot take the bus away in the
// middle of a burst; should it lose the bus anyway, it re-requests and
// resumes with an NSQ beat.
//
// User side: cmd/cmd_ready take a command. Write data for the beat numbered
// wbeat is read combinationally from wdata during that beat's data phase.
// Each read beat appears one cycle after it completes on rvalid/rdata/rbeat;
// done pulses (with done_err for ERROR) one cycle after the last beat.
//
// What follows the modelled protocol: request/grant, NSQ then SEQ, the single
// BUSY, restart from scratch on RETRY, suspension on SPLIT, abort on ERROR.
// This design's own choices: the user interface, word-sized beats, dropping
// HBUSREQ after the last address phase, resuming a burst after losing the bus.
module ahb_master
  import amba_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // user side
  input  master_cmd_t       cmd,
  output logic              cmd_ready,
  input  logic              busy_req,
  input  logic [DATA_W-1:0] wdata,
  output logic [3:0]        wbeat,
  output logic              rvalid,
  output logic [DATA_W-1:0] rdata,
  output logic [3:0]        rbeat,
  output logic              done,
  output logic              done_err,
  // AHB side
  output logic              hbusreq,
  input  logic              hgrant,
  output ahb_ctl_t          ctl,
  output logic [DATA_W-1:0] hwdata,
  input  ahb_rsp_t          rsp
);

  logic              active;
  logic              write_q;
  hburst_e           burst_q;
  logic [BEAT_W-1:0] beats_q;
  logic [ADDR_W-1:0] base_q;
  logic [BEAT_W-1:0] abeat;       // next beat to put in an address phase
  logic              need_nsq;
  logic              busy_used;
  logic              owner;
  logic              abort;       // drive IDLE in 2nd cycle of ERROR/RETRY/SPLIT
  logic              dvalid;      // one of our beats is in its data phase
  logic [BEAT_W-1:0] dbeat;
  logic              dwrite;

  logic can_issue, busy_now, bad_rsp;
  logic [BEAT_W-1:0] cmd_beats;

  // A transfer is only started (NSQ) while the grant is still ours, so that a
  // grant that has already moved on cannot cut the burst after one beat
  assign can_issue = active && owner && !abort && (abeat < beats_q)
                     && (hgrant || !need_nsq);
  assign busy_now  = can_issue && (burst_q == BURST_INC) && busy_req && !busy_used
                     && (abeat != '0) && !need_nsq;
  assign bad_rsp   = dvalid && (rsp.hresp != HRESP_OK);

  always_comb begin
    ctl.hburst = burst_q;
    ctl.hwrite = write_q;
    ctl.haddr  = base_q + ADDR_W'({abeat, 2'b00});
    if (!can_issue)    ctl.htrans = HTRANS_IDLE;
    else if (busy_now) ctl.htrans = HTRANS_BUSY;
    else if (need_nsq) ctl.htrans = HTRANS_NSQ;
    else               ctl.htrans = HTRANS_SEQ;
  end

  assign hbusreq   = active && !abort && (abeat < beats_q);
  assign cmd_ready = !active;
  assign hwdata    = wdata;
  assign wbeat     = dbeat[3:0];

  always_comb begin
    cmd_beats = cmd.beats;
    if (cmd.burst == BURST_SINGLE || cmd.beats == '0) cmd_beats = BEAT_W'(1);
    else if (cmd.beats > BEAT_W'(MAX_BEATS))          cmd_beats = BEAT_W'(MAX_BEATS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;  write_q <= 1'b0;  burst_q <= BURST_SINGLE;
      beats_q <= '0;   base_q <= '0;     abeat <= '0;
      need_nsq <= 1'b1; busy_used <= 1'b0; owner <= 1'b0; abort <= 1'b0;
      dvalid <= 1'b0;  dbeat <= '0;      dwrite <= 1'b0;
      rvalid <= 1'b0;  rdata <= '0;      rbeat <= '0;
      done <= 1'b0;    done_err <= 1'b0;
    end else begin
      rvalid   <= 1'b0;
      done     <= 1'b0;
      done_err <= 1'b0;

      if (!active && cmd.valid) begin
        active    <= 1'b1;
        write_q   <= cmd.write;
        burst_q   <= cmd.burst;
        beats_q   <= cmd_beats;
        base_q    <= {cmd.addr[ADDR_W-1:2], 2'b00};
        abeat     <= '0;
        need_nsq  <= 1'b1;
        busy_used <= 1'b0;
      end

      // data phase of one of our beats
      if (bad_rsp && !rsp.hready) abort <= 1'b1;
      if (dvalid && rsp.hready) begin
        dvalid <= 1'b0;
        if (rsp.hresp == HRESP_OK) begin
          if (!dwrite) begin
            rvalid <= 1'b1;
            rdata  <= rsp.hrdata;
            rbeat  <= dbeat[3:0];
          end
          if (dbeat == beats_q - BEAT_W'(1)) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end else if (rsp.hresp == HRESP_ERROR) begin
          active   <= 1'b0;
          abort    <= 1'b0;
          done     <= 1'b1;
          done_err <= 1'b1;
        end else begin            // RETRY or SPLIT: start again from scratch
          abort     <= 1'b0;
          abeat     <= '0;
          need_nsq  <= 1'b1;
          busy_used <= 1'b0;
        end
      end

      // address phase accepted
      if (rsp.hready && can_issue) begin
        if (busy_now) begin
          busy_used <= 1'b1;
        end else begin
          dvalid   <= 1'b1;
          dbeat    <= abeat;
          dwrite   <= write_q;
          abeat    <= abeat + BEAT_W'(1);
          need_nsq <= 1'b0;
        end
      end

      if (rsp.hready) begin
        owner <= hgrant;
        if (!hgrant) need_nsq <= 1'b1;
      end
    end
  end

  // The address of a phase that is not accepted is held unchanged
  a_hold_addr: assert property (@(posedge clk) disable iff (!rst_n)
    (can_issue && !rsp.hready && !bad_rsp) |=> (ctl.haddr == $past(ctl.haddr)));

  // SEQ beats continue at the next word address
  a_seq_incr: assert property (@(posedge clk) disable iff (!rst_n)
    (ctl.htrans == HTRANS_SEQ) |-> (abeat != '0));

endmodule
