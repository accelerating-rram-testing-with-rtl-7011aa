// Control of the stacked dummy-cell reference generator.
//
// The sense amplifier compares the bitline against a reference line RL that
// is discharged by a few dummy SET cells. Each dummy cell's current is set
// by lowering its wordline with PMOS bleeders: an active-low MEN* enable
// switches a bleeder on and weakens the cell. For an N-operand NOR the
// reference must sit between the currents of the two critical cases, all N
// cells in RESET and one cell in SET, so the set of dummy wordlines and
// bleeders depends on N. This block decodes log2(N) into those controls:
//
//   N        WL_DM3..1  MEN1  MEN21:MEN22  MEN3   reference (x I_OFF)
//   1..8     0 0 1      0     -            -      50
//   16       0 1 1      0     00           -      50+16  = 66
//   32       0 1 1      0     01           -      50+32  = 82
//   64       0 1 1      0     10           -      50+64  = 114
//   128      1 1 1      0     10           0      50+64+64 = 178
//   256      1 1 1      1     11           1      100+100+100 = 300
//
// ("-": the wordline is off; the enable is then held at 1, bleeder off.)
// A read is the one-operand case. For the hard-to-detect fault tests the
// reference can be shifted: Test1 raises the extra dummy cell T, whose
// current is set by Tp = Test1 & iTp (more reference current, RL lower);
// Test0 enables the Tq = Test0 & iTq bleeders added to the other dummy
// drivers (less reference current, RL higher).
//
// Purely combinational; every dummy wordline is gated by wl_en so the
// reference row is active exactly during the bitline wordline pulse. The
// table and the AND gating of Test0/Test1 follow the published design;
// the log2 coding of N, clamping above 8 and the value of unused enables
// are this design's choices.
module ref_gen_ctrl
  import rram_dft_pkg::*;
#(
  parameter int unsigned NLOG_W = 4
) (
  input  logic              wl_en,   // wordline pulse
  input  logic [NLOG_W-1:0] nlog2,   // log2 of the operand count, 0 = read
  input  logic              test0,   // detect weak-0 states
  input  logic              test1,   // detect weak-1 states
  input  logic [TP_W-1:0]   itp,     // strength code of the upward shift
  input  logic [TQ_W-1:0]   itq,     // strength code of the downward shift
  output logic [3:1]        wl_dm,   // dummy wordlines 1..3
  output logic              wl_dmt,  // dummy wordline of cell T
  output logic              men1,
  output logic              men21,
  output logic              men22,
  output logic              men3,
  output logic [TP_W-1:0]   tp,
  output logic [TQ_W-1:0]   tq
);

  logic [3:1] dm_sel;

  always_comb begin
    dm_sel = 3'b001;
    men1   = 1'b0;
    {men21, men22} = 2'b11;
    men3   = 1'b1;
    if (nlog2 <= NLOG_W'(3)) begin
      dm_sel = 3'b001;
    end else if (nlog2 == NLOG_W'(4)) begin
      dm_sel = 3'b011;
      {men21, men22} = 2'b00;
    end else if (nlog2 == NLOG_W'(5)) begin
      dm_sel = 3'b011;
      {men21, men22} = 2'b01;
    end else if (nlog2 == NLOG_W'(6)) begin
      dm_sel = 3'b011;
      {men21, men22} = 2'b10;
    end else if (nlog2 == NLOG_W'(7)) begin
      dm_sel = 3'b111;
      {men21, men22} = 2'b10;
      men3   = 1'b0;
    end else begin
      dm_sel = 3'b111;
      men1   = 1'b1;
      {men21, men22} = 2'b11;
      men3   = 1'b1;
    end
  end

  assign wl_dm  = wl_en ? dm_sel : 3'b000;
  assign wl_dmt = wl_en & test1;
  assign tp     = test1 ? itp : '0;
  assign tq     = test0 ? itq : '0;

endmodule
