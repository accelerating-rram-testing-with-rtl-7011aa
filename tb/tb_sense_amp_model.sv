// Self-checking testbench of the sense amplifier model: above the margin
// it must resolve to (i_bl > i_ref) and flag margin_ok; below it the output
// must vary from run to run; without sae it must hold.
module tb_sense_amp_model;
  logic clk = 0, rst_n = 0, sae = 0;
  int   i_bl = 0, i_ref = 0, period = 0;
  logic q, margin_ok;
  int checks = 0, failures = 0, cycles = 0;

  sense_amp_model #(.K_MIN(1500)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic sense(int b, int r, int p);
    @(negedge clk); i_bl = b; i_ref = r; period = p; sae = 1;
    @(negedge clk); sae = 0;
  endtask

  initial begin
    int ones;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      int b, r, p;
      b = $urandom_range(0, 4000); r = $urandom_range(0, 4000); p = $urandom_range(1, 30);
      sense(b, r, p);
      if ((b > r ? b - r : r - b) * p >= 1500) begin
        checks++;
        if (q !== (b > r) || !margin_ok) begin failures++; $display("FAIL b=%0d r=%0d p=%0d", b, r, p); end
      end else begin
        checks++;
        if (margin_ok) begin failures++; $display("FAIL margin flag b=%0d r=%0d p=%0d", b, r, p); end
      end
    end
    // Exactly at the margin and just below it.
    sense(1100, 1000, 15); checks++;
    if (!margin_ok || q !== 1'b1) begin failures++; $display("FAIL at margin"); end
    ones = 0;
    for (int n = 0; n < 64; n++) begin sense(1010, 1000, 10); ones += int'(q); end
    checks++;
    if (ones == 0 || ones == 64) begin failures++; $display("FAIL below margin not random"); end
    // Hold without sae.
    sense(3000, 0, 10);
    @(negedge clk); i_bl = 0; i_ref = 3000; #1; checks++;
    if (q !== 1'b1) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
