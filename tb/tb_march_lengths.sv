// Test-length check of the march sequencer with a single column group over
// 256 rows (N = 256 words), where the lengths must be exactly 6N + 8 for
// detection and 6N + 8 log2 N + 8 for detection with location. A
// fault-free memory answers every request; the testbench counts the
// requests itself and compares them with the formulas and with the
// sequencer's own count, and also checks that no failure is reported.
module tb_march_lengths;
  import rram_dft_pkg::*;
  localparam int AW = 8, N = 1 << AW, SA = 8;
  logic          clk = 0, rst_n = 0, start = 0, locate = 0;
  xcfg_t         xcfg_nor [4];
  xcfg_t         xcfg_r1;
  logic          busy, done, mem_req, mem_ten, loc_valid;
  mem_op_e       mem_op;
  logic [AW-1:0] mem_row, loc_row;
  logic [0:0]    mem_col, loc_col;
  logic [SA-1:0] mem_wdata, mem_rdata = '0;
  logic [2:0]    mem_te;
  logic [3:0]    mem_nlog2;
  xcfg_t         mem_xcfg;
  logic          mem_rsp_valid = 0;
  logic [15:0]   fail_count;
  logic [2:0]    first_phase;
  logic [AW:0]   first_addr;
  logic [1:0]    first_x, loc_x;
  logic [31:0]   oplen;
  int checks = 0, failures = 0, cycles = 0, nreq = 0, nnor = 0;

  march_controller #(.ROW_W(AW), .MUX(1), .SA_N(SA)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Fault-free memory: writes are kept, reads return them, NORs of
  // all-zero rows return ones (the march only NORs all-zero rows).
  logic [SA-1:0] mem [N];
  always begin
    @(negedge clk);
    mem_rsp_valid = 0;
    if (mem_req) begin
      nreq++;
      if (mem_op == OP_NOR) nnor++;
      unique case (mem_op)
        OP_WRITE: mem[mem_row] = mem_wdata;
        OP_READ:  mem_rdata = mem[mem_row];
        default:  mem_rdata = '1;
      endcase
      @(negedge clk);
      mem_rsp_valid = 1;
    end
  end

  task automatic run(bit loc, int exp_len, int exp_nor);
    nreq = 0; nnor = 0;
    @(negedge clk); locate = loc; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nreq != exp_len || oplen != 32'(exp_len) || nnor != exp_nor || fail_count != 0) begin
      failures++;
      $display("FAIL locate=%0d: %0d operations (%0d NOR), expected %0d (%0d NOR), fails %0d",
               loc, nreq, nnor, exp_len, exp_nor, fail_count);
    end
  endtask

  initial begin
    for (int x = 0; x < 4; x++) xcfg_nor[x] = XCFG_PLAIN;
    xcfg_r1 = XCFG_PLAIN;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 6 * N + 8, 8);
    run(1, 6 * N + 8 * AW + 8, 8 * AW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
