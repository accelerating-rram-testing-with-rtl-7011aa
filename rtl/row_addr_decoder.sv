// Row address decoder with multi-row activation for in-memory NOR testing.
//
// A standard decoder latches the row address AA and forms its true lines A
// and complement lines A' with inverters; a row is selected when, for every
// bit, the line that matches the row number is high. Here each inverter is
// replaced by a two-input NAND of the latched bit and a mask bit TAA, so
// A'[i] = ~(AA[i] & TAA[i]). With TAA[i] = 1 the decoder works as usual.
// With TAA[i] = 0 the complement line is forced high; if AA[i] is also 1,
// both lines of bit i are high and the bit no longer constrains the row, so
// every row matching the remaining bits is raised at the same time. With
// AA = all ones and TAA = all zeros all 2**ADDR_W rows are active.
//
// Timing: AA is latched (registered) on a rising clock edge while aa_le is
// high. A, A' and the wordlines follow combinationally from the latched
// address, the mask and wl_en, which frames the wordline pulse. Reset
// clears the latch to row 0. The NAND structure follows the published
// circuit; the latch enable, reset value and the wl_en gating are this
// design's choices.
module row_addr_decoder #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned ROWS   = 256  // 2**ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              aa_le,     // latch AA this cycle
  input  logic [ADDR_W-1:0] aa,        // row address
  input  logic [ADDR_W-1:0] taa,       // test mask from the Johnson code generator
  input  logic              wl_en,     // wordline pulse
  output logic [ADDR_W-1:0] a_true,    // A
  output logic [ADDR_W-1:0] a_comp,    // A'
  output logic [ROWS-1:0]   wl         // wordlines
);

  logic [ADDR_W-1:0] aa_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     aa_q <= '0;
    else if (aa_le) aa_q <= aa;
  end

  assign a_true = aa_q;
  assign a_comp = ~(aa_q & taa);

  // Second decoding stage: AND of the selected true/complement line of
  // every bit.
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      logic sel;
      sel = wl_en;
      for (int unsigned i = 0; i < ADDR_W; i++) begin
        sel = sel & (r[i] ? a_true[i] : a_comp[i]);
      end
      wl[r] = sel;
    end
  end

endmodule
