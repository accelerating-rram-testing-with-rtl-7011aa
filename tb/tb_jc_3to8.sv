// Self-checking testbench of the 3-to-8 Johnson code generator: every step
// code in test mode must give the thermometer code with that many low ones
// (the published address-selection table), and normal mode all ones.
module tb_jc_3to8;
  logic       ten;
  logic [2:0] te;
  logic [7:0] taa;
  int checks = 0, failures = 0;

  jc_3to8 dut (.ten, .te, .taa);

  // Expected codes, written out as in the address-selection table.
  logic [7:0] exp_tab [8] = '{8'b00000000, 8'b00000001, 8'b00000011, 8'b00000111,
                              8'b00001111, 8'b00011111, 8'b00111111, 8'b01111111};

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int k = 0; k < 8; k++) begin
        ten = m[0]; te = 3'(k);
        #1;
        checks++;
        if (taa !== (ten ? exp_tab[k] : 8'hFF)) begin
          failures++;
          $display("FAIL ten=%0d te=%0d taa=%b", ten, te, taa);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
