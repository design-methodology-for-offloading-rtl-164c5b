// ahb_decoder_tb -- self-checking test of the AHB address decoder.
//
// Random addresses with and without the FPGA select: exactly the slave whose
// region HADDR[17:16] names must be selected (none for region 3 or when the
// FPGA is not selected); all other address bits must not matter.
module ahb_decoder_tb;
  logic hsel_fpga; logic [31:0] haddr; logic [2:0] hsel;
  int checks = 0, failures = 0;

  ahb_decoder dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [2:0] exp_sel;
      hsel_fpga = (n % 5 != 0); haddr = $urandom;
      case (haddr[17:16])
        2'd0: exp_sel = 3'b001;
        2'd1: exp_sel = 3'b010;
        2'd2: exp_sel = 3'b100;
        default: exp_sel = 3'b000;
      endcase
      if (!hsel_fpga) exp_sel = 0;
      #1;
      checks++;
      if (hsel != exp_sel) begin
        failures++; $display("FAIL: addr %h sel %b exp %b", haddr, hsel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
