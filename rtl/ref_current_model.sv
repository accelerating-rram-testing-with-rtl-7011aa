// Behavioural model of the stacked dummy cells and their bleeder wordline
// drivers (analog part, not synthesizable hardware in itself).
//
// Every dummy cell is a SET 1T1R cell on the reference line RL. A PMOS
// bleeder on its wordline driver lowers the wordline voltage and with it
// the cell current; the model returns the current the selected cells sink,
// in units of I_OFF / 10, with I_ON = 100 x I_OFF:
//
//   dummy cell 1: MEN1 = 0 -> 50, MEN1 = 1 -> 100  (x I_OFF)
//   dummy cell 2: MEN21:MEN22 = 00/01/10/11 -> 16/32/64/100
//   dummy cell 3: MEN3 = 0 -> 64, MEN3 = 1 -> 100
//   dummy cell T: Tp x TP_STEP (raised by Test1)
//   Tq bleeders on drivers 1..3: minus Tq x TQ_STEP while any is raised
//
// The first three rows are the published current table. The linear steps
// of the Tp / Tq shifts (5 x I_OFF each) are this model's assumption; the
// design only states that p (q) bleeders give up to 2^p (2^q) strengths.
// Combinational; the current is valid while the dummy wordlines are high.
module ref_current_model
  import rram_dft_pkg::*;
#(
  parameter int TP_STEP = 50,   // I_OFF/10 per Tp step
  parameter int TQ_STEP = 50    // I_OFF/10 per Tq step
) (
  input  logic [3:1]      wl_dm,
  input  logic            wl_dmt,
  input  logic            men1,
  input  logic            men21,
  input  logic            men22,
  input  logic            men3,
  input  logic [TP_W-1:0] tp,
  input  logic [TQ_W-1:0] tq,
  output int              i_ref
);

  always_comb begin
    int i;
    i = 0;
    if (wl_dm[1]) i += men1 ? 1000 : 500;
    if (wl_dm[2]) begin
      unique case ({men21, men22})
        2'b00:   i += 160;
        2'b01:   i += 320;
        2'b10:   i += 640;
        default: i += 1000;
      endcase
    end
    if (wl_dm[3]) i += men3 ? 1000 : 640;
    if (wl_dmt)   i += int'(tp) * TP_STEP;
    if (wl_dm != 3'b000) i -= int'(tq) * TQ_STEP;
    i_ref = (i < 0) ? 0 : i;
  end

endmodule
