// Self-checking testbench of the binary search engine. A small memory
// model answers its NOR and read requests after a random delay, from a
// fault placed at a known row: a NOR over the raised rows is wrong (0)
// when the faulty row is among them, the read is wrong (1) when it reads
// the faulty row. For every row of a 256-row array the search must name
// that row after exactly 8 NORs and 1 read (log2 N + 1), with the operand
// count halving every step; without a fault it must report none.
module tb_binary_search_engine;
  import rram_dft_pkg::*;
  localparam int AW = 8, SA = 4;
  logic          clk = 0, rst_n = 0, start = 0;
  logic          busy, mem_req, mem_ten, mem_rsp_valid = 0, done, found;
  mem_op_e       mem_op;
  logic [2:0]    mem_te;
  logic [AW-1:0] mem_row, fault_row;
  logic [3:0]    mem_nlog2;
  logic [SA-1:0] mem_rdata = '0;
  logic [7:0]    nops;
  int checks = 0, failures = 0, cycles = 0;

  binary_search_engine #(.ROW_W(AW), .SA_N(SA)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  int  frow;      // faulty row, -1 for none
  int  fbit;      // amplifier that sees it
  int  nsteps;
  bit  seq_ok;

  function automatic bit raised(int r, logic ten, logic [2:0] te, logic [AW-1:0] aa);
    for (int i = 0; i < AW; i++) begin
      if (!ten || i < int'(te)) begin
        if (r[i] != aa[i]) return 0;
      end else if (!aa[i] && r[i]) return 0;
    end
    return 1;
  endfunction

  // Memory responder: answers each request 1 to 5 ticks later.
  always begin
    @(negedge clk);
    mem_rsp_valid = 0;
    if (mem_req) begin
      automatic int cnt = 0;
      automatic bit hit = 0;
      for (int r = 0; r < (1 << AW); r++)
        if (raised(r, mem_ten, mem_te, mem_row)) begin
          cnt++;
          if (r == frow) hit = 1;
        end
      if (mem_op == OP_NOR) begin
        if (!mem_ten || int'(mem_te) != nsteps || cnt != (1 << mem_nlog2) || cnt != (256 >> nsteps))
          seq_ok = 0;
      end else if (mem_ten || cnt != 1 || nsteps != AW) seq_ok = 0;
      nsteps++;
      repeat ($urandom_range(1, 5)) @(negedge clk);
      mem_rdata = (mem_op == OP_NOR) ? ~(SA'(hit) << fbit) : (SA'(hit) << fbit);
      mem_rsp_valid = 1;
    end
  end

  task automatic search(int r);
    frow = r; fbit = $urandom_range(0, SA - 1); nsteps = 0; seq_ok = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (r >= 0) begin
      if (!found || fault_row !== AW'(r) || nops != 8'(AW + 1) || !seq_ok) begin
        failures++;
        $display("FAIL row %0d: found=%0d row=%0d ops=%0d seq=%0d", r, found, fault_row, nops, seq_ok);
      end
    end else if (found || nops != 8'(AW + 1)) begin
      failures++; $display("FAIL fault-free search");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    search(215);
    search(235);
    for (int r = 0; r < 256; r++) search(r);
    search(-1);
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
