// Self-checking testbench of the dummy-cell reference model: driven by the
// reference control for every operand count, the reference current must
// equal the generated values of the configuration table (50, 66, 82, 114,
// 178, 300 x I_OFF), each between the two critical currents N x I_OFF and
// (N - 1) x I_OFF + I_ON; Tp and Tq must shift it up and down.
module tb_ref_current_model;
  import rram_dft_pkg::*;
  logic            wl_en = 1, test0 = 0, test1 = 0;
  logic [3:0]      nlog2;
  logic [TP_W-1:0] itp = '0, tp;
  logic [TQ_W-1:0] itq = '0, tq;
  logic [3:1]      wl_dm;
  logic            wl_dmt, men1, men21, men22, men3;
  int              i_ref;
  int checks = 0, failures = 0;

  ref_gen_ctrl ctrl (.*);
  ref_current_model dut (.*);

  int exp_ref [9] = '{500, 500, 500, 500, 660, 820, 1140, 1780, 3000};

  initial begin
    for (int n = 0; n <= 8; n++) begin
      int lo, hi;
      nlog2 = 4'(n); #1;
      lo = (1 << n) * 10;
      hi = ((1 << n) - 1) * 10 + 1000;
      checks++;
      if (i_ref != exp_ref[n] || i_ref <= lo || i_ref >= hi) begin
        failures++; $display("FAIL N=%0d iref=%0d", 1 << n, i_ref);
      end
    end
    nlog2 = 4'd8; test1 = 1; itp = 3'd6; #1; checks++;
    if (i_ref != 3000 + 6 * 50) begin failures++; $display("FAIL Tp shift %0d", i_ref); end
    test1 = 0; test0 = 1; itq = 3'd5; #1; checks++;
    if (i_ref != 3000 - 5 * 50) begin failures++; $display("FAIL Tq shift %0d", i_ref); end
    wl_en = 0; #1; checks++;
    if (i_ref != 0) begin failures++; $display("FAIL idle current %0d", i_ref); end
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
