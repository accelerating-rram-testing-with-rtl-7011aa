// Johnson-code generator (3-to-8) that drives the test address mask TAA of
// the modified row decoder.
//
// In normal operation (ten = 0) every TAA bit is 1, so the decoder builds
// the usual complement of each latched address bit and exactly one row is
// selected. In test mode (ten = 1) the 3-bit step number te expands to a
// Johnson (thermometer) code: step k sets the k least significant TAA bits.
// Step 0 (TAA = 00000000) lets every row through, and each further step
// halves the selected rows, which is the operand sequence NOR^256,
// NOR^128, ..., NOR^2 of the binary search. The final single-row read of
// the search is made in normal mode, where TAA = 11111111.
//
// The step number comes from the controller that counts the search cycles;
// this block is the code conversion only and is purely combinational. The
// code table follows the published address-selection table; taking te as
// an input and keeping the counter in the controller is this design's
// reading of the block diagram.
module jc_3to8 #(
  parameter int unsigned TE_W   = 3,
  parameter int unsigned ADDR_W = 8   // 2**TE_W
) (
  input  logic              ten,   // test enable
  input  logic [TE_W-1:0]   te,    // search step, 0 = all rows
  output logic [ADDR_W-1:0] taa    // per-bit mask, 0 forces the complement line high
);

  always_comb begin
    for (int unsigned i = 0; i < ADDR_W; i++) begin
      taa[i] = ten ? (i < 32'(te)) : 1'b1;
    end
  end

endmodule
