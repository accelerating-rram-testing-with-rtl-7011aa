// Self-checking testbench of the memory macro at its full 256 x 256, MUX4
// size. It checks normal writes and reads with their latency, the NOR over
// all rows (all-RESET gives 1, a stuck-at-1 cell gives 0 on its amplifier
// only), the halving multi-row selections of the binary search, and the
// hard-to-detect mechanisms: an undefined cell that a plain read or NOR
// resolves at random is read deterministically as faulty with extended
// time plus a shifted reference, with and without the wordline boost.
module tb_rram_cim_macro;
  import rram_dft_pkg::*;
  localparam int R = 256, C = 256, M = 4, S = C / M;
  logic          clk = 0, rst_n = 0, req = 0, ten = 0, inj_en = 0;
  mem_op_e       op = OP_READ;
  logic [7:0]    row = '0, inj_row = '0, inj_col = '0;
  logic [1:0]    col_sel = '0;
  logic [S-1:0]  wdata = '0, rdata, margin_ok;
  logic [2:0]    te = '0;
  logic [3:0]    nlog2 = '0;
  xcfg_t         xcfg = XCFG_PLAIN;
  logic          busy, rsp_valid;
  cell_fault_e   inj_fault = FLT_NONE;
  int checks = 0, failures = 0, cycles = 0, lat;

  rram_cim_macro dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic do_op(mem_op_e o, int r, int cs, logic [S-1:0] d, logic t, int step,
                       int nl, xcfg_t x);
    @(negedge clk);
    op = o; row = 8'(r); col_sel = 2'(cs); wdata = d; ten = t; te = 3'(step);
    nlog2 = 4'(nl); xcfg = x; req = 1;
    @(negedge clk); req = 0; lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rdata=%h margin=%h lat=%0d", what, rdata, margin_ok, lat); end
  endtask

  task automatic inject(int r, int c, cell_fault_e f);
    @(negedge clk); inj_row = 8'(r); inj_col = 8'(c); inj_fault = f; inj_en = 1;
    @(negedge clk); inj_en = 0;
  endtask

  xcfg_t et_w1, hret_w1, et_w0, hret_w0;
  logic [S-1:0] pat [8];

  initial begin
    et_w1   = '{test0: 0, test1: 1, itp: 3'd6, itq: 3'd0, ema: 3'd3, hr: 0};
    hret_w1 = '{test0: 0, test1: 1, itp: 3'd6, itq: 3'd0, ema: 3'd2, hr: 1};
    et_w0   = '{test0: 1, test1: 0, itp: 3'd0, itq: 3'd6, ema: 3'd3, hr: 0};
    hret_w0 = '{test0: 1, test1: 0, itp: 3'd0, itq: 3'd6, ema: 3'd2, hr: 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Normal writes and reads.
    for (int k = 0; k < 8; k++) begin
      pat[k] = {$urandom, $urandom};
      do_op(OP_WRITE, 17 * k + 3, k % 4, pat[k], 0, 0, 0, XCFG_PLAIN);
      chk(lat == 12 + 2, "write latency");
    end
    for (int k = 0; k < 8; k++) begin
      do_op(OP_READ, 17 * k + 3, k % 4, '0, 0, 0, 0, XCFG_PLAIN);
      chk(rdata == pat[k] && margin_ok == '1, "read back");
      chk(lat == 4 + 2, "read latency");
    end
    for (int k = 0; k < 8; k++) do_op(OP_WRITE, 17 * k + 3, k % 4, '0, 0, 0, 0, XCFG_PLAIN);
    // NOR over all 256 rows of an all-RESET column group.
    do_op(OP_NOR, 255, 1, '0, 1, 0, 8, XCFG_PLAIN);
    chk(rdata == '1 && margin_ok == '1, "0NOR256 1");
    chk(lat == 7 + 2, "NOR latency");
    // Stuck-at-1 at row 215, amplifier 9, column group 1.
    inject(215, 9 * M + 1, FLT_SAF1);
    do_op(OP_NOR, 255, 1, '0, 1, 0, 8, XCFG_PLAIN);
    chk(rdata == ~(S'(1) << 9), "SAF1 in NOR256");
    do_op(OP_NOR, 255, 2, '0, 1, 0, 8, XCFG_PLAIN);
    chk(rdata == '1, "other column group clean");
    // Binary-search selections: step k raises rows matching AA on k bits.
    for (int k = 1; k < 8; k++) begin
      do_op(OP_NOR, 215 | (255 << k), 1, '0, 1, k, 8 - k, XCFG_PLAIN);
      chk(rdata == ~(S'(1) << 9) && margin_ok == '1, "step containing the fault");
      do_op(OP_NOR, (215 ^ (1 << (k - 1))) | (255 << k), 1, '0, 1, k, 8 - k, XCFG_PLAIN);
      chk(rdata == '1 && margin_ok == '1, "step without the fault");
    end
    do_op(OP_READ, 215, 1, '0, 0, 0, 0, XCFG_PLAIN);
    chk(rdata == (S'(1) << 9), "final read");
    // Weak 1: a write of 1 leaves the cell undefined.
    inject(40, 20 * M + 3, FLT_UWF1);
    do_op(OP_WRITE, 40, 3, '1, 0, 0, 0, XCFG_PLAIN);
    do_op(OP_READ, 40, 3, '0, 0, 0, 0, XCFG_PLAIN);
    chk(margin_ok == ~(S'(1) << 20) && (rdata | (S'(1) << 20)) == '1, "weak 1 below margin");
    do_op(OP_READ, 40, 3, '0, 0, 0, 0, et_w1);
    chk(rdata == ~(S'(1) << 20) && margin_ok == '1, "weak 1 detected with ET");
    chk(lat == 16 + 2, "ET read latency");
    do_op(OP_READ, 40, 3, '0, 0, 0, 0, hret_w1);
    chk(rdata == ~(S'(1) << 20) && margin_ok == '1, "weak 1 detected with HR-ET");
    chk(lat == 12 + 2, "HR-ET read latency");
    // Weak 0 inside a 256-operand NOR.
    inject(100, 33 * M + 0, FLT_UWF0);
    do_op(OP_WRITE, 100, 0, '0, 0, 0, 0, XCFG_PLAIN);
    do_op(OP_NOR, 255, 0, '0, 1, 0, 8, XCFG_PLAIN);
    chk(margin_ok == ~(S'(1) << 33), "weak 0 below margin in NOR");
    do_op(OP_NOR, 255, 0, '0, 1, 0, 8, et_w0);
    chk(rdata == ~(S'(1) << 33) && margin_ok == '1, "weak 0 detected with ET-NOR");
    do_op(OP_NOR, 255, 0, '0, 1, 0, 8, hret_w0);
    chk(rdata == ~(S'(1) << 33) && margin_ok == '1, "weak 0 detected with HR-ET-NOR");
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
