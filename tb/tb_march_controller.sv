// Self-checking testbench of the march test sequencer on a reduced memory
// (16 rows, 2 column groups, 4 amplifiers). A bit-level memory model in
// the testbench answers writes, reads and multi-row NORs. The testbench
// builds the expected operation list of the detection march independently
// and compares every request with it, checks the test lengths 6N + 8 MUX
// and 6N + 8 MUX (log2 rows + 1), and checks that stuck-at faults are
// reported in the right march element and located at the right row.
module tb_march_controller;
  import rram_dft_pkg::*;
  localparam int AW = 4, M = 2, MW = 1, SA = 4, ROWS = 1 << AW, N = ROWS * M;
  logic          clk = 0, rst_n = 0, start = 0, locate = 0;
  xcfg_t         xcfg_nor [4];
  xcfg_t         xcfg_r1;
  logic          busy, done, mem_req, mem_ten, loc_valid;
  mem_op_e       mem_op;
  logic [AW-1:0] mem_row, loc_row;
  logic [MW-1:0] mem_col, loc_col;
  logic [SA-1:0] mem_wdata, mem_rdata = '0;
  logic [1:0]    mem_te;
  logic [3:0]    mem_nlog2;
  xcfg_t         mem_xcfg;
  logic          mem_rsp_valid = 0;
  logic [15:0]   fail_count;
  logic [2:0]    first_phase;
  logic [AW+MW-1:0] first_addr;
  logic [1:0]    first_x, loc_x;
  logic [31:0]   oplen;
  int checks = 0, failures = 0, cycles = 0;

  march_controller #(.ROW_W(AW), .MUX(M), .SA_N(SA)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Memory model with optional stuck cells.
  logic [SA-1:0] mem [ROWS][M];
  logic [SA-1:0] st1 [ROWS][M];   // stuck-at-1 mask
  logic [SA-1:0] st0 [ROWS][M];   // stuck-at-0 mask

  function automatic bit raised(int r, logic t, logic [1:0] e, logic [AW-1:0] aa);
    for (int i = 0; i < AW; i++) begin
      if (!t || i < int'(e)) begin
        if (r[i] != aa[i]) return 0;
      end else if (!aa[i] && r[i]) return 0;
    end
    return 1;
  endfunction

  // Expected detection sequence: {op, row, col, data-all-ones}.
  typedef struct { mem_op_e op; int row; int col; bit ones; int x; } step_t;
  step_t exp_q [$];
  bit    track;
  int    seq_err;

  task automatic build_detect();
    exp_q.delete();
    for (int a = 0; a < N; a++) repeat (2) exp_q.push_back('{OP_WRITE, a / M, a % M, 0, 0});
    for (int x = 0; x < 4; x++) for (int c = 0; c < M; c++) exp_q.push_back('{OP_NOR, ROWS - 1, c, 1, x});
    for (int a = 0; a < N; a++) repeat (2) exp_q.push_back('{OP_WRITE, a / M, a % M, 1, 0});
    for (int a = N - 1; a >= 0; a--) begin
      exp_q.push_back('{OP_READ, a / M, a % M, 1, -1});
      exp_q.push_back('{OP_WRITE, a / M, a % M, 0, 0});
    end
    for (int x = 0; x < 4; x++) for (int c = 0; c < M; c++) exp_q.push_back('{OP_NOR, ROWS - 1, c, 1, x});
  endtask

  always begin
    @(negedge clk);
    mem_rsp_valid = 0;
    if (mem_req) begin
      if (track) begin
        step_t e;
        if (exp_q.size() == 0) seq_err++;
        else begin
          e = exp_q.pop_front();
          if (e.op != mem_op || e.row != int'(mem_row) || e.col != int'(mem_col)
              || (e.op == OP_WRITE && mem_wdata != (e.ones ? '1 : '0))
              || (e.op == OP_NOR && (mem_xcfg != xcfg_nor[e.x] || !mem_ten || mem_te != 0
                                     || mem_nlog2 != 4'(AW)))
              || (e.op == OP_READ && mem_xcfg != xcfg_r1)) seq_err++;
        end
      end
      unique case (mem_op)
        OP_WRITE: mem[mem_row][mem_col] = (mem_wdata | st1[mem_row][mem_col]) & ~st0[mem_row][mem_col];
        OP_READ:  mem_rdata = mem[mem_row][mem_col];
        default: begin
          logic [SA-1:0] orv;
          orv = '0;
          for (int r = 0; r < ROWS; r++)
            if (raised(r, mem_ten, mem_te, mem_row)) orv |= mem[r][mem_col];
          mem_rdata = ~orv;
        end
      endcase
      repeat ($urandom_range(1, 4)) @(negedge clk);
      mem_rsp_valid = 1;
    end
  end

  task automatic run(bit loc);
    @(negedge clk); locate = loc; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic clear_faults();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < M; c++) begin
      st1[r][c] = '0; st0[r][c] = '0; mem[r][c] = SA'($urandom);
    end
  endtask

  initial begin
    for (int x = 0; x < 4; x++)
      xcfg_nor[x] = '{test0: x[0], test1: x[1], itp: 3'(x + 1), itq: 3'(x + 2), ema: 3'(x), hr: x[0]};
    xcfg_r1 = '{test0: 0, test1: 1, itp: 3'd6, itq: 3'd0, ema: 3'd3, hr: 0};
    clear_faults();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Fault-free detection march: exact sequence and length.
    build_detect(); track = 1; seq_err = 0;
    run(0);
    track = 0;
    checks++;
    if (seq_err != 0 || exp_q.size() != 0) begin failures++; $display("FAIL sequence errors=%0d left=%0d", seq_err, exp_q.size()); end
    checks++;
    if (oplen != 32'(6 * N + 8 * M) || fail_count != 0) begin
      failures++; $display("FAIL detect length %0d fails %0d", oplen, fail_count);
    end
    // Fault-free detection and location.
    run(1);
    checks++;
    if (oplen != 32'(6 * N + 8 * M * (AW + 1)) || fail_count != 0 || loc_valid) begin
      failures++; $display("FAIL locate length %0d fails %0d", oplen, fail_count);
    end
    // Stuck-at-1 at row 11, column group 1, bit 2: first seen by the first NOR.
    st1[11][1] = 4'b0100;
    run(0);
    checks++;
    if (fail_count == 0 || first_phase != 3'd1 || first_addr != 5'(1) || first_x != 2'd0) begin
      failures++; $display("FAIL SAF1 detect fails=%0d phase=%0d addr=%0d", fail_count, first_phase, first_addr);
    end
    run(1);
    checks++;
    if (!loc_valid || loc_row != 4'd11 || loc_col != 1'b1 || fail_count != 16'd8) begin
      failures++; $display("FAIL SAF1 locate valid=%0d row=%0d col=%0d fails=%0d", loc_valid, loc_row, loc_col, fail_count);
    end
    // Stuck-at-0 at row 6, column group 0: seen by the read-1 element.
    clear_faults();
    st0[6][0] = 4'b0001;
    run(0);
    checks++;
    if (fail_count != 16'd1 || first_phase != 3'd3 || first_addr != 5'(6 * M + 0)) begin
      failures++; $display("FAIL SAF0 detect fails=%0d phase=%0d addr=%0d", fail_count, first_phase, first_addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
