// Shared types and constants of the RRAM test-acceleration DFT.
//
// The DFT turns the read path of a 1T1R RRAM array into a multi-operand NOR
// engine: several wordlines are raised at once, their bitline currents add
// up, and a programmable reference decides whether any selected cell
// conducts like a SET (logic 1) cell. This package holds what the blocks
// share: the memory operation codes, the per-test reference configuration
// ("x" state of the march test) and the cell-state encoding used by the
// behavioural array model.
//
// Currents exchanged between the behavioural models are integers in units
// of one tenth of the HRS cell current (I_OFF / 10); this scale is a choice
// of this model, picked so that the reference currents of the dummy-cell
// table (given in units of I_OFF) stay exact.
package rram_dft_pkg;

  // Memory operation requested from the array.
  typedef enum logic [1:0] {
    OP_IDLE  = 2'd0,
    OP_WRITE = 2'd1,
    OP_READ  = 2'd2,
    OP_NOR   = 2'd3
  } mem_op_e;

  // State of a bitcell in the behavioural model. S0 is RESET/HRS (logic 0),
  // S1 is SET/LRS (logic 1). H and L are the deep states beyond HRS and LRS,
  // W0 and W1 the undefined states close to 0 and to 1.
  typedef enum logic [2:0] {
    CELL_S0 = 3'd0,
    CELL_S1 = 3'd1,
    CELL_H  = 3'd2,
    CELL_L  = 3'd3,
    CELL_W0 = 3'd4,
    CELL_W1 = 3'd5
  } cell_state_e;

  // Injected defect of a bitcell in the behavioural model.
  typedef enum logic [2:0] {
    FLT_NONE = 3'd0,
    FLT_SAF0 = 3'd1,  // stuck in HRS
    FLT_SAF1 = 3'd2,  // stuck in LRS
    FLT_UWF0 = 3'd3,  // writing 0 leaves the cell in W0
    FLT_UWF1 = 3'd4,  // writing 1 leaves the cell in W1
    FLT_DEEPH = 3'd5, // writing 0 leaves the cell in H
    FLT_DEEPL = 3'd6  // writing 1 leaves the cell in L
  } cell_fault_e;

  // Width of the Tp / Tq bleeder enables of the reconfigurable reference.
  localparam int unsigned TP_W = 3;
  localparam int unsigned TQ_W = 3;

  // One reference / timing configuration of a test operation: which weak
  // state it targets (Test0 / Test1), the strength code of the reference
  // shift (iTp / iTq), the period stretch (EMA) and the boosted wordline
  // supply (HR).
  typedef struct packed {
    logic            test0;
    logic            test1;
    logic [TP_W-1:0] itp;
    logic [TQ_W-1:0] itq;
    logic [2:0]      ema;
    logic            hr;
  } xcfg_t;

  localparam xcfg_t XCFG_PLAIN = '{test0: 1'b0, test1: 1'b0, itp: '0, itq: '0,
                                   ema: 3'd0, hr: 1'b0};

endpackage
