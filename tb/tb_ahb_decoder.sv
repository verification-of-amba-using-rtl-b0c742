// tb_ahb_decoder: self-checking test of the AHB address decoder.
// Drives every slave number and random low address bits, and checks that
// exactly the slave named by the top four address bits is selected.
module tb_ahb_decoder;
  logic [31:0] haddr;
  logic [15:0] hsel;
  int checks = 0, failures = 0;

  ahb_decoder #(.N_SLAVES(16), .ADDR_W(32)) dut (.haddr, .hsel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [3:0] s;
      s = 4'(n % 16);
      haddr = {s, 28'($urandom)};
      #1;
      checks++;
      if (hsel !== (16'h1 << s)) begin
        failures++;
        $display("FAIL addr %h hsel %b", haddr, hsel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
