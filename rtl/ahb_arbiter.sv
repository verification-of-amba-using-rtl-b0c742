// ahb_arbiter: fixed-priority AHB arbiter with split masking.
//
// Masters are numbered 0..N_MASTERS-1 in increasing order of priority. While
// the shared bus shows an IDLE transfer, the next grant goes to the highest
// numbered master that requests the bus and is not masked; if none does, the
// grant falls back to master 0, the default master. While a transfer is on
// the bus (NSQ, SEQ or BUSY) the grant is held, so a burst keeps the bus.
// A grant is also held until its master has become the owner, so a master
// is never passed over between being granted and starting its transfer, and
// a burst is never cut by a new NSQ.
// The granted master becomes the address-phase owner (hmaster) on the next
// clock edge with HREADY high, and the address owner becomes the data-phase
// owner (hmaster_data) on the same kind of edge, which is how ownership
// follows the pipelined transfers.
//
// Split masking: in the first cycle of a SPLIT response (HRESP = SPLIT with
// HREADY low) the master that owns the data phase is masked, so its requests
// are ignored; a slave's HSPLIT bit for that master removes the mask again.
//
// Reset: master N_MASTERS-1 is granted and owns the bus, as in the model this
// design follows. The priority order, the idle condition and the mask rules
// follow that model; holding the grant while the bus is busy or until the
// granted master owns the bus, and masking the data-phase owner (rather than
// the address owner), are this design's choices.
// Timing: hgrant, hmaster and hmaster_data are registers.
module ahb_arbiter
  import amba_pkg::*;
#(
  parameter int unsigned N_MASTERS = 8,
  localparam int unsigned MW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MASTERS-1:0] hbusreq,
  input  logic                 bus_idle,     // HTRANS on the bus is IDLE
  input  logic                 hready,
  input  hresp_e               hresp,
  input  logic [N_MASTERS-1:0] hsplit,       // OR of all slaves' HSPLIT
  output logic [N_MASTERS-1:0] hgrant,
  output logic [MW-1:0]        hmaster,      // owner of the address phase
  output logic [MW-1:0]        hmaster_data, // owner of the data phase
  output logic [N_MASTERS-1:0] mask
);

  logic [MW-1:0] grant_q, grant_d;

  // Priority pick, highest index first, master 0 as the default
  always_comb begin
    grant_d = grant_q;
    if (bus_idle && grant_q == hmaster) begin
      grant_d = '0;
      for (int i = 1; i < int'(N_MASTERS); i++)
        if (hbusreq[i] && !mask[i]) grant_d = MW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_q      <= MW'(N_MASTERS - 1);
      hmaster      <= MW'(N_MASTERS - 1);
      hmaster_data <= MW'(N_MASTERS - 1);
      mask         <= '0;
    end else begin
      grant_q <= grant_d;
      if (hready) begin
        hmaster      <= grant_q;
        hmaster_data <= hmaster;
      end
      for (int i = 0; i < int'(N_MASTERS); i++) begin
        if (hresp == HRESP_SPLIT && !hready && hmaster_data == MW'(i))
          mask[i] <= 1'b1;
        else if (hsplit[i])
          mask[i] <= 1'b0;
      end
    end
  end

  always_comb begin
    hgrant = '0;
    hgrant[grant_q] = 1'b1;
  end

  // A masked master is never granted unless it is the default master
  a_mask_blocks_grant: assert property (@(posedge clk) disable iff (!rst_n)
    (bus_idle && grant_q == hmaster && grant_d != '0) |-> !mask[grant_d]);

endmodule
