// Behavioural model of the 1T1R RRAM crossbar with its wordline drivers and
// column multiplexer (analog part, not synthesizable hardware in itself).
//
// Each bitcell is an NMOS access transistor in series with an RRAM device
// between bitline and select line. Every raised wordline adds its cell's
// current to the column's bitline, so raising several rows at once gives
// the multi-operand NOR. A cell's current is I_SCALE / (R_N + R_cell) with
// resistances in kOhm and the result in I_OFF / 10: HRS (1 MOhm) gives 10,
// the SET state (8 kOhm) gives 1002, i.e. I_ON is about 100 x I_OFF.
// Raising the wordline supply VDDW (hr = 1) lowers the access transistor's
// resistance R_N from 2 to 1 kOhm, which raises the current of low-ohmic
// cells far more than that of high-ohmic ones (the "high resistance ratio"
// technique). Besides HRS (S0) and LRS (S1) a cell may sit in the deep
// states H and L or in the undefined states W0 / W1 near 0 and 1.
//
// Columns: COLS bitlines share SA_N = COLS / MUX sense amplifiers; column
// j*MUX + col_sel feeds amplifier j. i_bl[j] is the combinational sum over
// raised rows. A write commits on the rising clock edge with we high, to
// every raised row: a 1 sets, a 0 resets the cell, unless a defect injected
// through the inj_* port changes the outcome (stuck-at, write into W0/W1,
// write into H/L). Reset returns every cell to HRS and removes all defects.
// Array size and column multiplexing are the published 256 x 256, MUX4;
// the resistances of H, L, W0, W1 and the defect classes are this model's
// choices.
module rram_array_model
  import rram_dft_pkg::*;
#(
  parameter int unsigned ROWS   = 256,
  parameter int unsigned COLS   = 256,
  parameter int unsigned MUX    = 4,
  parameter int unsigned SA_N   = COLS / MUX,
  parameter int unsigned ROW_W  = $clog2(ROWS),
  parameter int unsigned COL_W  = $clog2(COLS),
  parameter int unsigned MUX_W  = (MUX > 1) ? $clog2(MUX) : 1,
  parameter int          I_SCALE = 10020,
  parameter int          R_S0   = 1000,
  parameter int          R_S1   = 8,
  parameter int          R_H    = 4000,
  parameter int          R_L    = 2,
  parameter int          R_W0   = 40,
  parameter int          R_W1   = 14,
  parameter int          R_N_LO = 2,   // access transistor at nominal VDDW
  parameter int          R_N_HI = 1    // access transistor at raised VDDW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ROWS-1:0]   wl,
  input  logic [MUX_W-1:0]  col_sel,
  input  logic              hr,
  input  logic              we,
  input  logic [SA_N-1:0]   wdata,
  input  logic              inj_en,
  input  logic [ROW_W-1:0]  inj_row,
  input  logic [COL_W-1:0]  inj_col,
  input  cell_fault_e       inj_fault,
  output int                i_bl [SA_N]
);

  cell_state_e st  [ROWS][COLS];
  cell_fault_e flt [ROWS][COLS];

  function automatic int cell_r(cell_state_e s);
    unique case (s)
      CELL_S0: return R_S0;
      CELL_S1: return R_S1;
      CELL_H:  return R_H;
      CELL_L:  return R_L;
      CELL_W0: return R_W0;
      default: return R_W1;
    endcase
  endfunction

  function automatic int cell_i(cell_state_e s, logic boost);
    int r;
    r = cell_r(s) + (boost ? R_N_HI : R_N_LO);
    return (I_SCALE + r / 2) / r;
  endfunction

  function automatic cell_state_e written(cell_fault_e f, logic d);
    unique case (f)
      FLT_SAF0:  return CELL_S0;
      FLT_SAF1:  return CELL_S1;
      FLT_UWF0:  return d ? CELL_S1 : CELL_W0;
      FLT_UWF1:  return d ? CELL_W1 : CELL_S0;
      FLT_DEEPH: return d ? CELL_S1 : CELL_H;
      FLT_DEEPL: return d ? CELL_L  : CELL_S0;
      default:   return d ? CELL_S1 : CELL_S0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++) begin
          st[r][c]  <= CELL_S0;
          flt[r][c] <= FLT_NONE;
        end
    end else begin
      if (we) begin
        for (int r = 0; r < int'(ROWS); r++)
          if (wl[r])
            for (int j = 0; j < int'(SA_N); j++)
              st[r][j*MUX + int'(col_sel)] <= written(flt[r][j*MUX + int'(col_sel)], wdata[j]);
      end
      if (inj_en) begin
        flt[inj_row][inj_col] <= inj_fault;
        if (inj_fault == FLT_SAF0) st[inj_row][inj_col] <= CELL_S0;
        if (inj_fault == FLT_SAF1) st[inj_row][inj_col] <= CELL_S1;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < int'(SA_N); j++) begin
      int acc;
      acc = 0;
      for (int r = 0; r < int'(ROWS); r++)
        if (wl[r]) acc += cell_i(st[r][j*MUX + int'(col_sel)], hr);
      i_bl[j] = acc;
    end
  end

endmodule
