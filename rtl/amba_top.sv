// amba_top: a complete AMBA 2.0 system of one AHB and one APB.
//
// The AHB has N_MASTERS generic masters (8 by default, numbered in
// increasing priority), a fixed-priority arbiter with split masking, an
// address decoder, the central multiplexer and N_SLAVES slave slots (16 by
// default). Slot BRIDGE_SLOT holds the AHB-to-APB bridge; every other slot
// holds a generic register slave, SPLIT-capable where SPLIT_CAPABLE has its
// bit set. The bridge is the single master of the APB, which connects
// N_APB generic register slaves.
//
// Address map: HADDR[31:28] picks the AHB slot; inside the bridge's window
// PADDR[13:12] picks the APB slave; bits [5:2] pick a register everywhere.
//
// The masters' users and the slaves' response choices are the environment
// of this system, so they are ports: a command per master (cmd, busy_req,
// wdata by beat) with its results (rvalid/rdata, done/done_err), and per
// slave slot the wait states, response kind and split release to use
// (slv_ctl; ignored for the bridge slot). The shared bus signals are brought
// out for observation. Everything runs on one clock with an asynchronous
// active-low reset.
// The structure (masters, arbiter, decoder, multiplexer, slaves, bridge,
// APB) follows the modelled system; slot assignment, the address map and
// which slaves can split are this design's choices.
module amba_top
  import amba_pkg::*;
#(
  parameter int unsigned N_MASTERS     = 8,
  parameter int unsigned N_SLAVES      = 16,
  parameter int unsigned BRIDGE_SLOT   = 15,
  parameter int unsigned N_APB         = 4,
  parameter logic [N_SLAVES-1:0] SPLIT_CAPABLE = N_SLAVES'(16'h00FF),
  localparam int unsigned MW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // masters' users
  input  master_cmd_t          cmd      [N_MASTERS],
  output logic [N_MASTERS-1:0] cmd_ready,
  input  logic [N_MASTERS-1:0] busy_req,
  input  logic [DATA_W-1:0]    wdata    [N_MASTERS],
  output logic [3:0]           wbeat    [N_MASTERS],
  output logic [N_MASTERS-1:0] rvalid,
  output logic [DATA_W-1:0]    rdata    [N_MASTERS],
  output logic [3:0]           rbeat    [N_MASTERS],
  output logic [N_MASTERS-1:0] done,
  output logic [N_MASTERS-1:0] done_err,
  // slaves' environment
  input  slave_ctl_t           slv_ctl  [N_SLAVES],
  // observation of the shared buses
  output logic [N_MASTERS-1:0] hgrant,
  output logic [MW-1:0]        hmaster,
  output logic [N_MASTERS-1:0] hbusreq,
  output logic [N_MASTERS-1:0] mask,
  output logic [N_MASTERS-1:0] hsplit,
  output ahb_ctl_t             bus_ctl,
  output ahb_rsp_t             bus_rsp,
  output apb_state_e           apb_state,
  output logic [N_APB-1:0]     psel,
  output logic                 penable,
  output logic                 pwrite,
  output logic [ADDR_W-1:0]    paddr,
  output logic [DATA_W-1:0]    pwdata
);

  ahb_ctl_t            m_ctl    [N_MASTERS];
  logic [DATA_W-1:0]   m_wdata  [N_MASTERS];
  ahb_rsp_t            s_rsp    [N_SLAVES];
  logic [N_MASTERS-1:0] s_hsplit [N_SLAVES];
  logic [N_SLAVES-1:0] hsel;
  logic [MW-1:0]       hmaster_data;
  logic [DATA_W-1:0]   bus_wdata;
  logic [DATA_W-1:0]   prdata   [N_APB];

  // ---------------- masters ----------------
  for (genvar m = 0; m < N_MASTERS; m++) begin : g_master
    ahb_master u_master (
      .clk, .rst_n,
      .cmd      (cmd[m]),
      .cmd_ready(cmd_ready[m]),
      .busy_req (busy_req[m]),
      .wdata    (wdata[m]),
      .wbeat    (wbeat[m]),
      .rvalid   (rvalid[m]),
      .rdata    (rdata[m]),
      .rbeat    (rbeat[m]),
      .done     (done[m]),
      .done_err (done_err[m]),
      .hbusreq  (hbusreq[m]),
      .hgrant   (hgrant[m]),
      .ctl      (m_ctl[m]),
      .hwdata   (m_wdata[m]),
      .rsp      (bus_rsp)
    );
  end

  // ---------------- arbiter, decoder, multiplexer ----------------
  always_comb begin
    hsplit = '0;
    for (int s = 0; s < int'(N_SLAVES); s++) hsplit |= s_hsplit[s];
  end

  ahb_arbiter #(.N_MASTERS(N_MASTERS)) u_arbiter (
    .clk, .rst_n,
    .hbusreq,
    .bus_idle    (bus_ctl.htrans == HTRANS_IDLE),
    .hready      (bus_rsp.hready),
    .hresp       (bus_rsp.hresp),
    .hsplit,
    .hgrant,
    .hmaster,
    .hmaster_data,
    .mask
  );

  ahb_decoder #(.N_SLAVES(N_SLAVES), .ADDR_W(ADDR_W)) u_decoder (
    .haddr(bus_ctl.haddr),
    .hsel
  );

  ahb_mux #(.N_MASTERS(N_MASTERS), .N_SLAVES(N_SLAVES)) u_mux (
    .clk, .rst_n,
    .m_ctl, .m_wdata, .hmaster, .hmaster_data, .hsel, .s_rsp,
    .bus_ctl, .bus_wdata, .bus_rsp
  );

  // ---------------- slaves and the bridge ----------------
  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    if (s == BRIDGE_SLOT) begin : g_bridge
      apb_bridge #(.N_APB(N_APB)) u_bridge (
        .clk, .rst_n,
        .hsel   (hsel[s]),
        .ctl    (bus_ctl),
        .hwdata (bus_wdata),
        .hready (bus_rsp.hready),
        .rsp    (s_rsp[s]),
        .state  (apb_state),
        .paddr, .psel, .penable, .pwrite, .pwdata,
        .prdata
      );
      assign s_hsplit[s] = '0;
    end else begin : g_generic
      ahb_slave #(.N_MASTERS(N_MASTERS), .SPLIT_CAPABLE(SPLIT_CAPABLE[s])) u_slave (
        .clk, .rst_n,
        .hsel   (hsel[s]),
        .ctl    (bus_ctl),
        .hwdata (bus_wdata),
        .hready (bus_rsp.hready),
        .hmaster,
        .ctl_env(slv_ctl[s]),
        .rsp    (s_rsp[s]),
        .hsplit (s_hsplit[s])
      );
    end
  end

  // ---------------- APB slaves ----------------
  for (genvar p = 0; p < N_APB; p++) begin : g_apb
    apb_slave u_apb_slave (
      .clk, .rst_n,
      .psel   (psel[p]),
      .penable,
      .pwrite,
      .paddr,
      .pwdata,
      .prdata (prdata[p])
    );
  end

  // Exactly one master is granted at any time
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(hgrant));

endmodule
