// End-to-end testbench of the RRAM test DFT at full size (256 x 256 array,
// MUX4, 64 sense amplifiers, default parameters). It uses the normal port,
// then runs the NOR-accelerated march test in detection and in location
// mode on a fault-free array and with injected defects:
//   - a stuck-at-1 cell, found by the NOR elements and located by binary
//     search at its row and column group;
//   - a cell whose write of 0 leaves it in the undefined weak-0 state,
//     caught by NORs with extended time and a lowered reference, with and
//     without the wordline boost;
//   - a cell whose write of 1 leaves it in the weak-1 state, caught by the
//     read-1 with boosted wordline, extended time and a raised reference,
//     but only by chance with a plain read.
// It checks the test lengths 6N + 8 MUX and 6N + 8 MUX (log2 rows + 1)
// (N = 1024 words) and counts how often each mechanism happened: multi-row
// NOR, binary-search location, stretched period, wordline boost, upward
// and downward reference shift, below-margin sensing, the switch from test
// mode to a normal-mode read, and normal-port accesses. A mechanism that
// never happened is a failure.
module tb_rram_dft_top;
  import rram_dft_pkg::*;
  localparam int R = 256, M = 4, S = 64, N = R * M;
  logic          clk = 0, rst_n = 0, start = 0, locate = 0;
  xcfg_t         xcfg_nor [4];
  xcfg_t         xcfg_r1;
  logic          busy, done, loc_valid;
  logic [15:0]   fail_count;
  logic [2:0]    first_phase;
  logic [9:0]    first_addr;
  logic [1:0]    first_x, loc_x;
  logic [7:0]    loc_row;
  logic [1:0]    loc_col;
  logic [31:0]   oplen;
  logic [S-1:0]  margin_ok;
  logic          ext_req = 0, ext_we = 0, ext_busy, ext_rsp_valid;
  logic [7:0]    ext_row = '0;
  logic [1:0]    ext_col = '0;
  logic [S-1:0]  ext_wdata = '0, ext_rdata;
  logic          inj_en = 0;
  logic [7:0]    inj_row = '0, inj_col = '0;
  cell_fault_e   inj_fault = FLT_NONE;
  int checks = 0, failures = 0, cycles = 0;

  rram_dft_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Mechanism counters, sampled when the macro answers.
  int n_multirow = 0, n_located = 0, n_ema = 0, n_hr = 0, n_tp = 0, n_tq = 0;
  int n_random = 0, n_modesw = 0, n_ext = 0;
  logic prev_ten = 0;
  logic [255:0] wl_seen;

  always @(posedge clk) begin
    if (dut.u_mem.u_ema.wl_en) wl_seen = dut.u_mem.wl;
    if (dut.u_mem.rsp_valid) begin
      if (dut.u_mem.op_q == OP_NOR && $countones(wl_seen) > 1) n_multirow++;
      if (dut.u_mem.op_q != OP_WRITE && dut.u_mem.xcfg_q.ema != 0) n_ema++;
      if (dut.u_mem.op_q != OP_WRITE && dut.u_mem.xcfg_q.hr) n_hr++;
      if (dut.u_mem.op_q != OP_WRITE && dut.u_mem.tp != 0 && dut.u_mem.xcfg_q.test1) n_tp++;
      if (dut.u_mem.op_q != OP_WRITE && dut.u_mem.xcfg_q.test0 && dut.u_mem.xcfg_q.itq != 0) n_tq++;
      if (dut.u_mem.op_q != OP_WRITE && margin_ok != '1) n_random++;
      if (prev_ten && !dut.u_mem.ten_q && dut.u_mem.op_q == OP_READ && busy) n_modesw++;
      prev_ten = dut.u_mem.ten_q;
    end
    if (dut.u_march.u_bs.done && dut.u_march.u_bs.found) n_located++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: fails=%0d phase=%0d addr=%0d x=%0d loc=%0d/%0d/%0d len=%0d", what,
               fail_count, first_phase, first_addr, first_x, loc_valid, loc_row, loc_col, oplen);
    end
  endtask

  task automatic ext_op(bit w, int r, int c, logic [S-1:0] d);
    @(negedge clk);
    while (ext_busy) @(negedge clk);
    ext_we = w; ext_row = 8'(r); ext_col = 2'(c); ext_wdata = d; ext_req = 1;
    @(negedge clk); ext_req = 0;
    while (!ext_rsp_valid) @(negedge clk);
    n_ext++;
  endtask

  task automatic run(bit loc);
    int t0;
    @(negedge clk); locate = loc; start = 1;
    @(negedge clk); start = 0;
    t0 = cycles;
    while (!done) @(negedge clk);
    $display("march %s: %0d operations, %0d cycles, %0d failing", loc ? "locate" : "detect",
             oplen, cycles - t0, fail_count);
  endtask

  task automatic inject(int r, int c, cell_fault_e f);
    @(negedge clk); inj_row = 8'(r); inj_col = 8'(c); inj_fault = f; inj_en = 1;
    @(negedge clk); inj_en = 0;
  endtask

  localparam int LEN_DETECT = 6 * N + 8 * M;
  localparam int LEN_LOCATE = 6 * N + 8 * M * (8 + 1);

  initial begin
    logic [S-1:0] pat;
    // x = 0: plain NOR; 1: extended time, lowered reference; 2: raised
    // reference; 3: boosted wordline, extended time, lowered reference.
    // One reference shift serves every step of a search (NOR^256 down to
    // the read), so it is chosen to clear the margin for all of them.
    xcfg_nor[0] = XCFG_PLAIN;
    xcfg_nor[1] = '{test0: 1, test1: 0, itp: 3'd0, itq: 3'd7, ema: 3'd3, hr: 0};
    xcfg_nor[2] = '{test0: 0, test1: 1, itp: 3'd2, itq: 3'd0, ema: 3'd3, hr: 0};
    xcfg_nor[3] = '{test0: 1, test1: 0, itp: 3'd0, itq: 3'd7, ema: 3'd3, hr: 1};
    xcfg_r1     = '{test0: 0, test1: 1, itp: 3'd6, itq: 3'd0, ema: 3'd2, hr: 1};
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Normal port.
    pat = {$urandom, $urandom};
    ext_op(1, 77, 2, pat);
    ext_op(0, 77, 2, '0);
    chk(ext_rdata == pat, "normal write / read");

    // Fault-free array.
    run(0);
    chk(fail_count == 0 && oplen == LEN_DETECT, "fault-free detection");
    run(1);
    chk(fail_count == 0 && !loc_valid && oplen == LEN_LOCATE, "fault-free location");

    // Stuck-at-1 at row 215, amplifier 9, column group 1.
    inject(215, 9 * M + 1, FLT_SAF1);
    run(0);
    chk(fail_count == 8 && first_phase == 3'd1 && first_addr == 10'd1, "SAF1 detection");
    run(1);
    chk(fail_count == 8 && loc_valid && loc_row == 8'd215 && loc_col == 2'd1
        && oplen == LEN_LOCATE, "SAF1 location");
    inject(215, 9 * M + 1, FLT_NONE);

    // Weak 0 at row 100, amplifier 33, column group 0.
    inject(100, 33 * M + 0, FLT_UWF0);
    run(0);
    chk(fail_count >= 4 && fail_count <= 6, "weak-0 detection");
    run(1);
    chk(loc_valid && loc_row == 8'd100 && loc_col == 2'd0 && loc_x == 2'd3, "weak-0 location");
    inject(100, 33 * M + 0, FLT_NONE);

    // Weak 1 at row 40, amplifier 20, column group 3.
    inject(40, 20 * M + 3, FLT_UWF1);
    run(0);
    chk(fail_count == 1 && first_phase == 3'd3 && first_addr == 10'(40 * M + 3), "weak-1 detection");
    xcfg_r1 = XCFG_PLAIN;
    run(0);
    chk(fail_count <= 1, "weak-1 plain read");
    inject(40, 20 * M + 3, FLT_NONE);

    // Every mechanism must have happened.
    chk(n_multirow > 0, "multi-row NOR");
    chk(n_located > 0, "binary-search location");
    chk(n_ema > 0, "stretched period");
    chk(n_hr > 0, "wordline boost");
    chk(n_tp > 0, "raised reference");
    chk(n_tq > 0, "lowered reference");
    chk(n_random > 0, "below-margin sensing");
    chk(n_modesw > 0, "test-to-normal mode switch");
    chk(n_ext > 0, "normal-port access");
    $display("mechanisms: multirow=%0d located=%0d ema=%0d hr=%0d tp=%0d tq=%0d random=%0d modesw=%0d ext=%0d",
             n_multirow, n_located, n_ema, n_hr, n_tp, n_tq, n_random, n_modesw, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
