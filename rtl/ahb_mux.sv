// ahb_mux: central AHB multiplexer.
//
// Every master drives its own address/control bundle; the one owned by the
// arbiter's current address owner (hmaster) is routed to all slaves. The
// write data of the data phase comes from the data-phase owner
// (hmaster_data). In the other direction the response (HREADY, HRESP,
// HRDATA) of the slave selected in the previous, accepted address phase is
// routed back to all masters. That slave select is registered on each clock
// edge with HREADY high; after reset no slave owns a data phase and the bus
// answers READY/OK. The master-to-slave routing follows the model this design
// is based on; the registered response select is standard AHB practice.
module ahb_mux
  import amba_pkg::*;
#(
  parameter int unsigned N_MASTERS = 8,
  parameter int unsigned N_SLAVES  = 16,
  localparam int unsigned MW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ahb_ctl_t                m_ctl   [N_MASTERS],
  input  logic [DATA_W-1:0]       m_wdata [N_MASTERS],
  input  logic [MW-1:0]           hmaster,
  input  logic [MW-1:0]           hmaster_data,
  input  logic [N_SLAVES-1:0]     hsel,
  input  ahb_rsp_t                s_rsp   [N_SLAVES],
  output ahb_ctl_t                bus_ctl,
  output logic [DATA_W-1:0]       bus_wdata,
  output ahb_rsp_t                bus_rsp
);

  logic [N_SLAVES-1:0] hsel_data;   // slave of the current data phase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             hsel_data <= '0;
    else if (bus_rsp.hready) hsel_data <= hsel;
  end

  assign bus_ctl   = m_ctl[hmaster];
  assign bus_wdata = m_wdata[hmaster_data];

  always_comb begin
    bus_rsp = '{hready: 1'b1, hresp: HRESP_OK, hrdata: '0};
    for (int s = 0; s < int'(N_SLAVES); s++)
      if (hsel_data[s]) bus_rsp = s_rsp[s];
  end

endmodule
