// Self-checking testbench of the EMA period control: for every operation
// and every EMA code it measures the wordline pulse (base x (ema + 1) for
// reads and NORs, base for writes), the single sensing tick right after
// it and the total latency period + 1 from start to done.
module tb_ema_period_ctrl;
  import rram_dft_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0;
  mem_op_e    op = OP_READ;
  logic [2:0] ema = '0;
  logic       busy, wl_en, sae, done;
  logic [7:0] period;
  int checks = 0, failures = 0, cycles = 0;

  ema_period_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic run(mem_op_e o, int e);
    int wl_ticks, lat, exp_len, sae_ticks;
    bit sae_after_wl;
    exp_len = (o == OP_READ) ? 4 * (e + 1) : (o == OP_NOR) ? 7 * (e + 1) : 12;
    @(negedge clk); op = o; ema = 3'(e); start = 1;
    @(negedge clk); start = 0;
    wl_ticks = 0; lat = 1; sae_ticks = 0; sae_after_wl = 0;
    while (!done) begin
      if (wl_en) wl_ticks++;
      if (sae && wl_en) sae_ticks += 100;
      @(negedge clk); lat++;
    end
    sae_after_wl = sae && !wl_en;
    checks++;
    if (wl_ticks != exp_len || lat != exp_len + 1 || !sae_after_wl || sae_ticks != 0
        || period != 8'(exp_len)) begin
      failures++;
      $display("FAIL op=%0d ema=%0d wl=%0d lat=%0d exp=%0d", o, e, wl_ticks, lat, exp_len);
    end
    @(negedge clk);
    checks++;
    if (busy || sae) begin failures++; $display("FAIL not idle after op"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 8; e++) begin
      run(OP_READ, e);
      run(OP_NOR, e);
      run(OP_WRITE, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
