// tb_apb_slave: self-checking test of the generic APB register slave.
// Performs APB writes (SETUP then ENABLE) to random registers, checks that a
// register changes only at the end of ENABLE, i.e. two cycles after SETUP
// began, and that reads return the last value written. An unselected cycle
// and a SETUP cycle alone never write.
module tb_apb_slave;
  import amba_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  apb_slave #(.N_REGS(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apb_write(input int r, input logic [31:0] d);
    // SETUP
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= 32'(r) << 2; pwdata <= d;
    @(posedge clk); #1;
    check(prdata, shadow[r], "register unchanged after SETUP");
    // ENABLE
    penable <= 1;
    @(posedge clk); #1;
    shadow[r] = d;
    check(prdata, d, "register written after ENABLE");
    psel <= 0; penable <= 0;
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      int r;
      r = $urandom_range(0, 15);
      if ($urandom_range(0, 2) != 0) apb_write(r, $urandom);
      else begin
        // read: SETUP, ENABLE with pwrite low; value must not change
        psel <= 1; penable <= 0; pwrite <= 0; paddr <= 32'(r) << 2; pwdata <= $urandom;
        @(posedge clk); penable <= 1;
        @(posedge clk); #1;
        check(prdata, shadow[r], "read data");
        psel <= 0; penable <= 0;
      end
      // an idle cycle with pwrite and penable high but psel low writes nothing
      pwrite <= 1; penable <= 1; pwdata <= ~shadow[r];
      @(posedge clk); #1;
      check(prdata, shadow[r], "no write without PSEL");
      penable <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
