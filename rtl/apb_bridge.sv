// apb_bridge: AHB slave that is the single APB master.
//
// Every AHB transfer addressed to the bridge becomes one APB transfer of two
// cycles. The APB side has three stages:
//   IDLE   - no transfer, all PSEL low (state after reset);
//   SETUP  - PSEL of the addressed APB slave goes high with PADDR, PWRITE
//            and PWDATA; always lasts one cycle;
//   ENABLE - PENABLE high, everything else stable; lasts one cycle, then
//            SETUP if the AHB has already put the next transfer to the
//            bridge on the bus, IDLE otherwise.
// The AHB address phase moves the bridge from IDLE (or ENABLE) to SETUP. On
// the AHB side the bridge drives HREADY low during SETUP, so the AHB data
// phase lasts two cycles and ends together with ENABLE, when PRDATA is
// returned as HRDATA. PWDATA is HWDATA, which the AHB master holds through
// the whole data phase. The bridge always answers OK.
// The APB slave is chosen by PADDR[SEL_LSB +: log2(N_APB)]. HBURST is not
// read: each beat of a burst is simply one more APB transfer.
// The three stages and the two-cycle APB transfer follow the protocol; the
// slave-select bits and the one-wait-state AHB timing are this design's
// choices.
module apb_bridge
  import amba_pkg::*;
#(
  parameter int unsigned N_APB   = 4,
  parameter int unsigned SEL_LSB = 12,
  localparam int unsigned PW = (N_APB > 1) ? $clog2(N_APB) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // AHB slave side
  input  logic              hsel,
  input  ahb_ctl_t          ctl,
  input  logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  output ahb_rsp_t          rsp,
  // APB master side
  output apb_state_e        state,
  output logic [ADDR_W-1:0] paddr,
  output logic [N_APB-1:0]  psel,
  output logic              penable,
  output logic              pwrite,
  output logic [DATA_W-1:0] pwdata,
  input  logic [DATA_W-1:0] prdata [N_APB]
);

  logic          take;
  logic [PW-1:0] sel;

  assign take = hsel && hready && is_active(ctl.htrans);
  assign sel  = (N_APB > 1) ? paddr[SEL_LSB +: PW] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= APB_IDLE;
      paddr  <= '0;
      pwrite <= 1'b0;
    end else begin
      unique case (state)
        APB_IDLE, APB_ENABLE: state <= take ? APB_SETUP : APB_IDLE;
        APB_SETUP:            state <= APB_ENABLE;
        default:              state <= APB_IDLE;
      endcase
      if (take) begin
        paddr  <= ctl.haddr;
        pwrite <= ctl.hwrite;
      end
    end
  end

  always_comb begin
    psel = '0;
    if (state != APB_IDLE && int'(sel) < int'(N_APB)) psel[sel] = 1'b1;
  end

  assign penable = (state == APB_ENABLE);
  assign pwdata  = hwdata;

  assign rsp.hready = (state != APB_SETUP);
  assign rsp.hresp  = HRESP_OK;
  assign rsp.hrdata = (int'(sel) < int'(N_APB)) ? prdata[sel] : '0;

  // SETUP always lasts exactly one cycle and is followed by ENABLE
  a_setup_enable: assert property (@(posedge clk) disable iff (!rst_n)
    (state == APB_SETUP) |=> (state == APB_ENABLE));
  // Address and control are stable from SETUP into ENABLE
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state == APB_SETUP) |=> $stable(paddr) && $stable(pwrite) && $stable(psel));

endmodule
