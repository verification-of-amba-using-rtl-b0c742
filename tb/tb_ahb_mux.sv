// tb_ahb_mux: self-checking test of the central multiplexer.
// Random master bundles, owners, slave selects and slave responses. Checks
// every cycle that the address/control on the bus is that of hmaster, the
// write data that of hmaster_data, and the response that of the slave
// selected at the last clock edge with HREADY high (READY/OK after reset).
module tb_ahb_mux;
  import amba_pkg::*;
  localparam int NM = 8, NS = 16;
  logic clk = 0, rst_n = 0;
  ahb_ctl_t m_ctl [NM];
  logic [31:0] m_wdata [NM];
  logic [2:0] hmaster, hmaster_data;
  logic [NS-1:0] hsel;
  ahb_rsp_t s_rsp [NS];
  ahb_ctl_t bus_ctl;
  logic [31:0] bus_wdata;
  ahb_rsp_t bus_rsp;
  int checks = 0, failures = 0;

  ahb_mux #(.N_MASTERS(NM), .N_SLAVES(NS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int dsel;   // reference: data-phase slave, -1 = none
  initial begin
    dsel = -1;
    hmaster = 0; hmaster_data = 0; hsel = 1;
    foreach (m_ctl[i]) begin m_ctl[i] = '0; m_wdata[i] = 0; end
    foreach (s_rsp[i]) s_rsp[i] = '{1'b1, HRESP_OK, 32'h0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      int s;
      foreach (m_ctl[i]) begin
        m_ctl[i] = '{htrans_e'($urandom_range(0, 3)), hburst_e'($urandom_range(0, 1)),
                     1'($urandom), $urandom};
        m_wdata[i] = $urandom;
      end
      foreach (s_rsp[i]) s_rsp[i] = '{1'($urandom_range(0, 3) != 0), hresp_e'($urandom_range(0, 3)), $urandom};
      hmaster = 3'($urandom); hmaster_data = 3'($urandom);
      s = $urandom_range(0, NS - 1);
      hsel = 16'(1 << s);
      #1;
      check(bus_ctl == m_ctl[hmaster], "address/control from hmaster");
      check(bus_wdata == m_wdata[hmaster_data], "write data from hmaster_data");
      if (dsel < 0) check(bus_rsp == '{1'b1, HRESP_OK, 32'h0}, "idle response");
      else          check(bus_rsp == s_rsp[dsel], "response from data-phase slave");
      if (bus_rsp.hready) dsel = s;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
