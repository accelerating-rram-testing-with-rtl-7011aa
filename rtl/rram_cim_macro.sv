// RRAM memory macro with the computation-in-memory test features.
//
// This is the memory of the DFT: a 1T1R array with its row decoder,
// wordline drivers, reference generator, column multiplexer and one sense
// amplifier per multiplexed column group, plus the three test additions:
//   - multi-row activation: the decoder's complement inverters are NANDs
//     masked by a Johnson code, so one operation can raise 2^k rows and the
//     sense amplifiers then evaluate a NOR over those rows;
//   - a dummy-cell reference that follows the operand count and can be
//     shifted up or down (Test1/Tp, Test0/Tq) to expose undefined states;
//   - a wordline period that EMA can stretch, and a raised wordline supply
//     (hr) that widens the resistance ratio.
//
// Operation interface: while busy is low, a one-tick req starts an
// operation described by op, row, col_sel, wdata, ten/te (test mode and
// search step), nlog2 (log2 of the operand count, selects the reference)
// and xcfg (Test0/Test1, iTp/iTq, EMA, hr). The row address is latched
// with req. A read or NOR takes period + 2 ticks from req to rsp_valid,
// where period is the EMA-scaled wordline pulse; rdata then holds one bit
// per sense amplifier, the stored data for a read and the NOR result for a
// NOR (1 when no selected cell conducts like a SET cell). A write commits
// at the end of its pulse and is acknowledged the same way. The array,
// dummy cells and sense amplifiers are behavioural models; the decoder,
// code generator, reference control and period control are synthesizable.
module rram_cim_macro
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
  parameter int unsigned NLOG_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // operation request
  input  logic              req,
  input  mem_op_e           op,
  input  logic [ROW_W-1:0]  row,
  input  logic [MUX_W-1:0]  col_sel,
  input  logic [SA_N-1:0]   wdata,
  input  logic              ten,
  input  logic [TE_W-1:0]   te,
  input  logic [NLOG_W-1:0] nlog2,
  input  xcfg_t             xcfg,
  output logic              busy,
  output logic              rsp_valid,
  output logic [SA_N-1:0]   rdata,
  output logic [SA_N-1:0]   margin_ok,
  // defect injection into the array model
  input  logic              inj_en,
  input  logic [ROW_W-1:0]  inj_row,
  input  logic [COL_W-1:0]  inj_col,
  input  cell_fault_e       inj_fault
);

  // Operation registers, loaded with req.
  mem_op_e           op_q;
  logic [MUX_W-1:0]  col_q;
  logic [SA_N-1:0]   wdata_q;
  logic              ten_q;
  logic [TE_W-1:0]   te_q;
  logic [NLOG_W-1:0] nlog2_q;
  xcfg_t             xcfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q    <= OP_IDLE;
      col_q   <= '0;
      wdata_q <= '0;
      ten_q   <= 1'b0;
      te_q    <= '0;
      nlog2_q <= '0;
      xcfg_q  <= XCFG_PLAIN;
    end else if (req && !busy) begin
      op_q    <= op;
      col_q   <= col_sel;
      wdata_q <= wdata;
      ten_q   <= ten;
      te_q    <= te;
      nlog2_q <= nlog2;
      xcfg_q  <= xcfg;
    end
  end

  // Period control.
  logic       pc_wl_en, pc_sae, pc_done;
  logic [7:0] period;

  ema_period_ctrl u_ema (
    .clk, .rst_n,
    .start  (req && !busy),
    .op     (op),
    .ema    (xcfg.ema),
    .busy   (busy),
    .wl_en  (pc_wl_en),
    .sae    (pc_sae),
    .done   (pc_done),
    .period (period)
  );

  // The wordline stays up through the sensing tick.
  logic wl_on;
  assign wl_on = pc_wl_en | pc_sae;

  // Row selection.
  logic [ROW_W-1:0] taa, a_true, a_comp;
  logic [ROWS-1:0]  wl;

  jc_3to8 #(.TE_W(TE_W), .ADDR_W(ROW_W)) u_jc (
    .ten (ten_q),
    .te  (te_q),
    .taa (taa)
  );

  row_addr_decoder #(.ADDR_W(ROW_W), .ROWS(ROWS)) u_dec (
    .clk, .rst_n,
    .aa_le  (req && !busy),
    .aa     (row),
    .taa    (taa),
    .wl_en  (wl_on),
    .a_true (a_true),
    .a_comp (a_comp),
    .wl     (wl)
  );

  // Reference generation.
  logic [3:1]      wl_dm;
  logic            wl_dmt, men1, men21, men22, men3;
  logic [TP_W-1:0] tp;
  logic [TQ_W-1:0] tq;
  int              i_ref;

  ref_gen_ctrl #(.NLOG_W(NLOG_W)) u_refc (
    .wl_en  (wl_on && (op_q != OP_WRITE)),
    .nlog2  (nlog2_q),
    .test0  (xcfg_q.test0),
    .test1  (xcfg_q.test1),
    .itp    (xcfg_q.itp),
    .itq    (xcfg_q.itq),
    .wl_dm, .wl_dmt, .men1, .men21, .men22, .men3, .tp, .tq
  );

  ref_current_model u_refm (
    .wl_dm, .wl_dmt, .men1, .men21, .men22, .men3, .tp, .tq,
    .i_ref (i_ref)
  );

  // Array.
  int i_bl [SA_N];

  rram_array_model #(.ROWS(ROWS), .COLS(COLS), .MUX(MUX)) u_array (
    .clk, .rst_n,
    .wl      (wl),
    .col_sel (col_q),
    .hr      (xcfg_q.hr && wl_on),
    .we      (pc_sae && (op_q == OP_WRITE)),
    .wdata   (wdata_q),
    .inj_en, .inj_row, .inj_col, .inj_fault,
    .i_bl    (i_bl)
  );

  // Sense amplifiers, one per column group.
  logic [SA_N-1:0] sa_q;

  for (genvar j = 0; j < SA_N; j++) begin : g_sa
    sense_amp_model u_sa (
      .clk, .rst_n,
      .sae       (pc_sae && (op_q != OP_WRITE)),
      .i_bl      (i_bl[j]),
      .i_ref     (i_ref),
      .period    (int'(period)),
      .q         (sa_q[j]),
      .margin_ok (margin_ok[j])
    );
  end

  // Response: a NOR takes the amplifier's complementary output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_valid <= 1'b0;
    else        rsp_valid <= pc_done;
  end

  assign rdata = (op_q == OP_NOR) ? ~sa_q : sa_q;

endmodule
