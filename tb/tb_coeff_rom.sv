// tb_coeff_rom: reads every word of a 40-word coefficient ROM of layer 2,
// neuron 3, and compares it with the reference contents formula.
module tb_coeff_rom;
  import tb_ref_pkg::*;
  logic [5:0] addr = '0;
  logic signed [7:0] coeff;
  int checks = 0, failures = 0;

  coeff_rom #(.DEPTH(40), .LAYER(2), .NEURON(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nz;
    nz = 0;
    for (int a = 0; a < 40; a++) begin
      addr = 6'(a);
      #1;
      checks++;
      if (int'(coeff) != ref_coeff(2, 3, a)) begin
        failures++;
        $display("addr %0d got %0d expected %0d", a, coeff, ref_coeff(2, 3, a));
      end
      if (coeff != 0) nz++;
    end
    checks++;
    if (nz < 20) begin failures++; $display("ROM nearly empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
