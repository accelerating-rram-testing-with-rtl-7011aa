// Self-checking testbench of the multi-row address decoder. It checks the
// complement lines A' = NAND(AA, TAA), the set of raised wordlines against
// an independent row-matching rule, the row count of every binary-search
// step (256, 128, ..., 2), the latch (AA only taken with aa_le) and the
// wl_en gating.
module tb_row_addr_decoder;
  localparam int AW = 8, R = 256;
  logic          clk = 0, rst_n = 0, aa_le = 0, wl_en = 0;
  logic [AW-1:0] aa = '0, taa = '1, a_true, a_comp;
  logic [R-1:0]  wl;
  int checks = 0, failures = 0, cycles = 0;

  row_addr_decoder #(.ADDR_W(AW), .ROWS(R)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Row r is raised when every bit either matches AA (mask bit set) or is
  // left free by AA = 1 with the mask bit clear; AA = 0 with the mask clear
  // only allows row bit 0.
  function automatic logic ref_sel(int r, logic [AW-1:0] a, logic [AW-1:0] t);
    for (int i = 0; i < AW; i++) begin
      if (t[i]) begin
        if (r[i] != a[i]) return 1'b0;
      end else if (!a[i] && r[i]) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic apply(logic [AW-1:0] a, logic [AW-1:0] t);
    @(negedge clk); aa = a; aa_le = 1;
    @(negedge clk); aa_le = 0; taa = t; wl_en = 1;
    #1;
  endtask

  task automatic check_all(logic [AW-1:0] a, logic [AW-1:0] t);
    logic [R-1:0] e;
    for (int r = 0; r < R; r++) e[r] = ref_sel(r, a, t);
    checks++;
    if (wl !== e || a_true !== a || a_comp !== ~(a & t)) begin
      failures++;
      $display("FAIL aa=%b taa=%b sel=%0d exp=%0d", a, t, $countones(wl), $countones(e));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Normal single-row decoding of every address.
    for (int r = 0; r < R; r++) begin
      apply(AW'(r), '1);
      checks++;
      if (wl !== (R'(1) << r)) begin failures++; $display("FAIL single row %0d", r); end
    end
    // Binary-search steps: AA all ones, TAA with k low ones.
    for (int k = 0; k < AW; k++) begin
      apply('1, AW'((1 << k) - 1));
      checks++;
      if ($countones(wl) != (R >> k)) begin
        failures++; $display("FAIL step %0d raised %0d rows", k, $countones(wl));
      end
      check_all('1, AW'((1 << k) - 1));
    end
    // Published example: AA = 11111011, TAA = 00000111 gives A' = 11111100.
    apply(8'b11111011, 8'b00000111);
    checks++;
    if (a_comp !== 8'b11111100) begin failures++; $display("FAIL example A'=%b", a_comp); end
    check_all(8'b11111011, 8'b00000111);
    // Random address / mask pairs.
    for (int n = 0; n < 200; n++) begin
      logic [AW-1:0] a, t;
      a = AW'($urandom); t = AW'($urandom);
      apply(a, t);
      check_all(a, t);
    end
    // The latch holds without aa_le.
    apply(8'd77, '1);
    @(negedge clk); aa = 8'd3;
    #1; checks++;
    if (wl !== (R'(1) << 77)) begin failures++; $display("FAIL latch"); end
    // No wordline without wl_en.
    wl_en = 0; #1; checks++;
    if (wl !== '0) begin failures++; $display("FAIL wl_en gating"); end
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
