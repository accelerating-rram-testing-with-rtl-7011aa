// RRAM memory with a computation-in-memory design-for-test: top level.
//
// The memory macro (array, multi-row decoder, configurable dummy-cell
// reference, EMA period control, sense amplifiers) is driven either by the
// on-chip march test sequencer or, while the sequencer is idle, by an
// external memory port for normal single-row reads and writes. The
// sequencer runs the NOR-accelerated march test, optionally with binary
// search to locate the faulty row; see march_controller for the sequence.
//
// Interface: start/locate/done/busy control the test; xcfg_nor and
// xcfg_r1 choose reference shifts, period stretch and wordline boost for
// the four NOR elements and the read-1; the results are fail_count, the
// first failing operation, the last located fault and the operation count
// oplen; margin_ok shows, per sense amplifier, whether the last read or
// NOR developed the minimum margin or resolved at random. ext_* is the
// normal memory port (one operation at a time, while
// ext_busy is low, answered by ext_rsp_valid). inj_* injects defects into
// the behavioural array model and is there for simulation only.
// Arbitration between the two ports is this design's choice.
module rram_dft_top
  import rram_dft_pkg::*;
#(
  parameter int unsigned ROWS   = 256,
  parameter int unsigned COLS   = 256,
  parameter int unsigned MUX    = 4,
  parameter int unsigned SA_N   = COLS / MUX,
  parameter int unsigned ROW_W  = $clog2(ROWS),
  parameter int unsigned COL_W  = $clog2(COLS),
  parameter int unsigned MUX_W  = (MUX > 1) ? $clog2(MUX) : 1,
  parameter int unsigned TE_W   = $clog2(ROW_W),
  parameter int unsigned NLOG_W = 4,
  parameter int unsigned WA_W   = ROW_W + MUX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // test control
  input  logic              start,
  input  logic              locate,
  input  xcfg_t             xcfg_nor [4],
  input  xcfg_t             xcfg_r1,
  output logic              busy,
  output logic              done,
  output logic [15:0]       fail_count,
  output logic [2:0]        first_phase,
  output logic [WA_W-1:0]   first_addr,
  output logic [1:0]        first_x,
  output logic              loc_valid,
  output logic [ROW_W-1:0]  loc_row,
  output logic [MUX_W-1:0]  loc_col,
  output logic [1:0]        loc_x,
  output logic [31:0]       oplen,
  output logic [SA_N-1:0]   margin_ok,      // last sensing resolved above the margin
  // normal memory port
  input  logic              ext_req,
  input  logic              ext_we,
  input  logic [ROW_W-1:0]  ext_row,
  input  logic [MUX_W-1:0]  ext_col,
  input  logic [SA_N-1:0]   ext_wdata,
  output logic              ext_busy,
  output logic              ext_rsp_valid,
  output logic [SA_N-1:0]   ext_rdata,
  // defect injection (behavioural array model)
  input  logic              inj_en,
  input  logic [ROW_W-1:0]  inj_row,
  input  logic [COL_W-1:0]  inj_col,
  input  cell_fault_e       inj_fault
);

  logic              mc_req, mem_busy, mem_rsp_valid, mc_ten, mc_busy;
  mem_op_e           mc_op;
  logic [ROW_W-1:0]  mc_row;
  logic [MUX_W-1:0]  mc_col;
  logic [SA_N-1:0]   mc_wdata, mem_rdata;
  logic [TE_W-1:0]   mc_te;
  logic [NLOG_W-1:0] mc_nlog2;
  xcfg_t             mc_xcfg;

  march_controller #(.ROW_W(ROW_W), .MUX(MUX), .MUX_W(MUX_W), .SA_N(SA_N),
                     .TE_W(TE_W), .NLOG_W(NLOG_W), .WA_W(WA_W)) u_march (
    .clk, .rst_n, .start, .locate, .xcfg_nor, .xcfg_r1,
    .busy          (mc_busy),
    .done,
    .mem_req       (mc_req),
    .mem_op        (mc_op),
    .mem_row       (mc_row),
    .mem_col       (mc_col),
    .mem_wdata     (mc_wdata),
    .mem_ten       (mc_ten),
    .mem_te        (mc_te),
    .mem_nlog2     (mc_nlog2),
    .mem_xcfg      (mc_xcfg),
    .mem_rsp_valid (mem_rsp_valid && mc_busy),
    .mem_rdata     (mem_rdata),
    .fail_count, .first_phase, .first_addr, .first_x,
    .loc_valid, .loc_row, .loc_col, .loc_x, .oplen
  );

  assign busy = mc_busy;

  // The test sequencer owns the macro while it runs.
  logic ext_sel;
  assign ext_sel = !mc_busy;

  rram_cim_macro #(.ROWS(ROWS), .COLS(COLS), .MUX(MUX), .TE_W(TE_W), .NLOG_W(NLOG_W)) u_mem (
    .clk, .rst_n,
    .req       (ext_sel ? (ext_req && !mem_busy) : mc_req),
    .op        (ext_sel ? (ext_we ? OP_WRITE : OP_READ) : mc_op),
    .row       (ext_sel ? ext_row : mc_row),
    .col_sel   (ext_sel ? ext_col : mc_col),
    .wdata     (ext_sel ? ext_wdata : mc_wdata),
    .ten       (ext_sel ? 1'b0 : mc_ten),
    .te        (ext_sel ? '0 : mc_te),
    .nlog2     (ext_sel ? '0 : mc_nlog2),
    .xcfg      (ext_sel ? XCFG_PLAIN : mc_xcfg),
    .busy      (mem_busy),
    .rsp_valid (mem_rsp_valid),
    .rdata     (mem_rdata),
    .margin_ok (margin_ok),
    .inj_en, .inj_row, .inj_col, .inj_fault
  );

  assign ext_busy      = mc_busy || mem_busy;
  assign ext_rsp_valid = mem_rsp_valid && ext_sel;
  assign ext_rdata     = mem_rdata;

endmodule
