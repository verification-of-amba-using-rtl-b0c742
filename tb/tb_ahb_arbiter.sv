// tb_ahb_arbiter: self-checking test of the priority arbiter.
// Random requests, bus-idle flags, HREADY, responses and HSPLIT pulses drive
// the arbiter; a reference model in the bench, written from the rules
// (highest unmasked requester wins while the bus is IDLE and the granted
// master already owns it, master 0 by default, grant held otherwise; ownership passes on HREADY; the data-phase
// owner is masked by the first SPLIT cycle and unmasked by its HSPLIT) is
// compared with the arbiter every cycle. Also checks the reset state
// (master 7 granted and owner) and that the top master, when unmasked, is
// granted in the cycle after it requests on an idle bus.
module tb_ahb_arbiter;
  import amba_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] hbusreq, hsplit, hgrant, mask;
  logic bus_idle, hready;
  hresp_e hresp;
  logic [2:0] hmaster, hmaster_data;
  int checks = 0, failures = 0;
  int n_split = 0, n_unmask = 0, n_hold = 0, n_default = 0, n_top = 0;

  ahb_arbiter #(.N_MASTERS(N)) dut (.*);

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

  // reference state
  int g, own, down;
  logic [N-1:0] msk;

  initial begin
    hbusreq = 0; hsplit = 0; bus_idle = 1; hready = 1; hresp = HRESP_OK;
    g = N - 1; own = N - 1; down = N - 1; msk = 0;
    repeat (2) @(posedge clk);
    #1;
    check(hgrant == 8'h80 && hmaster == 3'd7 && hmaster_data == 3'd7 && mask == 0, "reset state");
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int ng, nown, ndown;
      logic [N-1:0] nmsk;
      // drive random inputs after the edge
      hbusreq  = 8'($urandom);
      bus_idle = ($urandom_range(0, 2) != 0);
      hready   = ($urandom_range(0, 3) != 0);
      hresp    = ($urandom_range(0, 5) == 0) ? HRESP_SPLIT : hresp_e'($urandom_range(0, 2));
      hsplit   = ($urandom_range(0, 3) == 0) ? 8'(1 << $urandom_range(0, 7)) : '0;
      #1;
      // reference next state
      ng = g;
      if (bus_idle && g == own) begin
        ng = 0;
        for (int i = N - 1; i >= 1; i--)
          if (hbusreq[i] && !msk[i]) begin ng = i; break; end
        if (ng == 0) n_default++;
        if (hbusreq[N-1] && !msk[N-1]) n_top++;
      end else n_hold++;
      nown  = hready ? g : own;
      ndown = hready ? own : down;
      nmsk  = msk;
      for (int i = 0; i < N; i++) begin
        if (hresp == HRESP_SPLIT && !hready && down == i) begin nmsk[i] = 1; n_split++; end
        else if (hsplit[i]) begin if (msk[i]) n_unmask++; nmsk[i] = 0; end
      end
      @(posedge clk);
      g = ng; own = nown; down = ndown; msk = nmsk;
      #1;
      check(hgrant == 8'(1 << g), $sformatf("grant %b expected %0d", hgrant, g));
      check(hmaster == 3'(own), "hmaster");
      check(hmaster_data == 3'(down), "hmaster_data");
      check(mask == msk, "mask");
    end
    check(n_split > 0 && n_unmask > 0 && n_hold > 0 && n_default > 0 && n_top > 0, "all cases seen");
    $display("split masks %0d unmasks %0d holds %0d default grants %0d top requests %0d",
             n_split, n_unmask, n_hold, n_default, n_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
