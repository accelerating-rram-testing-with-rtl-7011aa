// Self-checking testbench of the behavioural 1T1R array: bitline currents
// of single and multiple raised rows (N x I_OFF for all-RESET cells,
// (N - 1) x I_OFF + I_ON with one SET cell), the column multiplexer, the
// raised-wordline boost, and the write behaviour of injected defects.
module tb_rram_array_model;
  import rram_dft_pkg::*;
  localparam int R = 256, C = 256, M = 4, S = C / M;
  logic             clk = 0, rst_n = 0, hr = 0, we = 0, inj_en = 0;
  logic [R-1:0]     wl = '0;
  logic [1:0]       col_sel = '0;
  logic [S-1:0]     wdata = '0;
  logic [7:0]       inj_row = '0, inj_col = '0;
  cell_fault_e      inj_fault = FLT_NONE;
  int               i_bl [S];
  int checks = 0, failures = 0, cycles = 0;

  rram_array_model #(.ROWS(R), .COLS(C), .MUX(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Independent current figures: I_SCALE / (R_N + R), rounded.
  function automatic int cur(int r_kohm, int rn);
    return (10020 + (r_kohm + rn) / 2) / (r_kohm + rn);
  endfunction

  task automatic wr(int row, int cs, logic [S-1:0] d);
    @(negedge clk); wl = R'(1) << row; col_sel = 2'(cs); wdata = d; we = 1;
    @(negedge clk); we = 0; wl = '0;
  endtask

  task automatic inject(int row, int col, cell_fault_e f);
    @(negedge clk); inj_row = 8'(row); inj_col = 8'(col); inj_fault = f; inj_en = 1;
    @(negedge clk); inj_en = 0;
  endtask

  task automatic expect_i(int j, int e, string what);
    checks++;
    if (i_bl[j] != e) begin failures++; $display("FAIL %s: i_bl[%0d]=%0d exp %0d", what, j, i_bl[j], e); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // All rows raised, all RESET: 256 x I_OFF on every column.
    @(negedge clk); wl = '1; col_sel = 2'd1; #1;
    for (int j = 0; j < S; j += 9) expect_i(j, 256 * cur(1000, 2), "256(0)");
    // One SET cell at row 37, amplifier 5, column group 1.
    wr(37, 1, S'(1) << 5);
    @(negedge clk); wl = '1; col_sel = 2'd1; #1;
    expect_i(5, 255 * cur(1000, 2) + cur(8, 2), "256(1)");
    expect_i(6, 256 * cur(1000, 2), "neighbour column");
    col_sel = 2'd0; #1;
    expect_i(5, 256 * cur(1000, 2), "other column group");
    // Single row read and the wordline boost.
    wl = R'(1) << 37; col_sel = 2'd1; #1;
    expect_i(5, cur(8, 2), "read 1");
    hr = 1; #1;
    expect_i(5, cur(8, 1), "read 1 boosted");
    checks++;
    if (cur(8, 1) * cur(1000, 2) <= cur(8, 2) * cur(1000, 1)) begin
      failures++; $display("FAIL boost does not raise the ratio");
    end
    hr = 0;
    // Defects: stuck-at-1 ignores a write of 0, UWF1 writes into W1,
    // deep-H writes into H.
    inject(10, 3 * M + 2, FLT_SAF1);
    wr(10, 2, '0);
    @(negedge clk); wl = R'(1) << 10; col_sel = 2'd2; #1;
    expect_i(3, cur(8, 2), "SAF1");
    inject(11, 4 * M + 2, FLT_UWF1);
    wr(11, 2, '1);
    @(negedge clk); wl = R'(1) << 11; col_sel = 2'd2; #1;
    expect_i(4, cur(14, 2), "UWF1");
    expect_i(5, cur(8, 2), "fault-free write 1");
    inject(12, 4 * M + 2, FLT_DEEPH);
    wr(12, 2, '0);
    @(negedge clk); wl = R'(1) << 12; col_sel = 2'd2; #1;
    expect_i(4, cur(4000, 2), "deep H");
    inject(13, 1 * M + 0, FLT_UWF0);
    wr(13, 0, '0);
    @(negedge clk); wl = R'(1) << 13; col_sel = 2'd0; #1;
    expect_i(1, cur(40, 2), "UWF0");
    // Two rows raised add up.
    @(negedge clk); wl = (R'(1) << 11) | (R'(1) << 10); col_sel = 2'd2; #1;
    expect_i(3, 2 * cur(8, 2), "two SET rows");
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
