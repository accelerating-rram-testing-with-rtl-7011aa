// Self-checking testbench of the reference-generator control. For every
// operand count it compares the dummy wordlines and MEN* enables with the
// configuration table, and checks the Test0/Test1 gating of Tq/Tp, the
// dummy cell T wordline and the wl_en gating.
module tb_ref_gen_ctrl;
  import rram_dft_pkg::*;
  logic            wl_en, test0, test1;
  logic [3:0]      nlog2;
  logic [TP_W-1:0] itp, tp;
  logic [TQ_W-1:0] itq, tq;
  logic [3:1]      wl_dm;
  logic            wl_dmt, men1, men21, men22, men3;
  int checks = 0, failures = 0;

  ref_gen_ctrl dut (.*);

  // Expected {wl_dm[3:1], men1, men21, men22, men3} per log2(N), from the
  // table (unused enables at 1).
  logic [6:0] exp_tab [9] = '{
    7'b001_0_11_1, 7'b001_0_11_1, 7'b001_0_11_1, 7'b001_0_11_1, // N = 1..8
    7'b011_0_00_1,                                               // 16
    7'b011_0_01_1,                                               // 32
    7'b011_0_10_1,                                               // 64
    7'b111_0_10_0,                                               // 128
    7'b111_1_11_1};                                              // 256

  initial begin
    wl_en = 1; test0 = 0; test1 = 0; itp = '0; itq = '0;
    for (int n = 0; n <= 8; n++) begin
      nlog2 = 4'(n); #1;
      checks++;
      if ({wl_dm, men1, men21, men22, men3} !== exp_tab[n] || wl_dmt !== 1'b0) begin
        failures++; $display("FAIL nlog2=%0d got %b", n, {wl_dm, men1, men21, men22, men3});
      end
    end
    for (int n = 0; n < 64; n++) begin
      {test0, test1} = 2'(n); itp = TP_W'($urandom); itq = TQ_W'($urandom);
      nlog2 = 4'($urandom_range(0, 8)); #1;
      checks++;
      if (tp !== (test1 ? itp : '0) || tq !== (test0 ? itq : '0) || wl_dmt !== test1) begin
        failures++; $display("FAIL shift gating t0=%0d t1=%0d", test0, test1);
      end
    end
    wl_en = 0; test1 = 1; #1; checks++;
    if (wl_dm !== 3'b000 || wl_dmt !== 1'b0) begin failures++; $display("FAIL wl_en gating"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
