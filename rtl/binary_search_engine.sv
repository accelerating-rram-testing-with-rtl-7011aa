// Binary search engine that locates a faulty row with multi-operand NOR
// operations (log2(ROWS) NORs plus one read).
//
// All cells of the searched column group hold 0, so every NOR must return
// 1 and the final read must return 0; a "wrong" outcome means a selected
// cell conducts like a SET cell. The engine starts with the row address
// AA = all ones and search step 0, which raises every row (NOR^ROWS).
// Step s (1 .. ROW_W-1) masks the s low address bits in, so the rows that
// match AA on bits s-1..0 are raised, half as many as before. Step s
// decides address bit s-1, which is still 1: if the NOR is wrong the
// faulty cell is among the raised rows and the bit stays 1; if it is
// correct the fault is in the other half and the bit is cleared. After the
// last NOR (NOR^2) two rows remain, differing in the top address bit; a
// single-row read in normal mode (ten = 0) of the row with that bit set
// decides it. A correct first NOR means no fault: found stays 0, and the
// search still runs to the end so that the test length is fixed.
//
// Interface: start (one tick, idle) launches a search; the engine issues
// one-tick mem_req pulses and waits for mem_rsp_valid with mem_rdata
// before the next. done pulses one tick after the last response, with
// found and fault_row valid from then on; nops counts operations issued.
// The order of the steps and the address-bit update follow the published
// address-selection table; the choice that step s decides bit s-1 (and the
// read decides the top bit) is this design's reading of it.
module binary_search_engine
  import rram_dft_pkg::*;
#(
  parameter int unsigned ROW_W  = 8,
  parameter int unsigned SA_N   = 64,
  parameter int unsigned TE_W   = $clog2(ROW_W),
  parameter int unsigned NLOG_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  // memory operation port
  output logic              mem_req,
  output mem_op_e           mem_op,
  output logic              mem_ten,
  output logic [TE_W-1:0]   mem_te,
  output logic [ROW_W-1:0]  mem_row,
  output logic [NLOG_W-1:0] mem_nlog2,
  input  logic              mem_rsp_valid,
  input  logic [SA_N-1:0]   mem_rdata,
  // result
  output logic              done,
  output logic              found,
  output logic [ROW_W-1:0]  fault_row,
  output logic [7:0]        nops
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e           state;
  logic [TE_W:0]    step;      // 0 .. ROW_W, ROW_W = final read
  logic [ROW_W-1:0] aa;
  logic             wrong;
  logic             last_step;

  assign last_step = (step == (TE_W+1)'(ROW_W));

  // A NOR must give all ones, the read all zeros.
  assign wrong = last_step ? (|mem_rdata) : !(&mem_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      aa    <= '1;
      found <= 1'b0;
      done  <= 1'b0;
      nops  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          step  <= '0;
          aa    <= '1;
          found <= 1'b0;
          nops  <= '0;
        end
        S_ISSUE: begin
          state <= S_WAIT;
          nops  <= nops + 8'd1;
        end
        S_WAIT: if (mem_rsp_valid) begin
          if (step == '0) found <= wrong;
          else if (!wrong) aa[step-1] <= 1'b0;
          if (last_step) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_ISSUE;
            step  <= step + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign mem_req   = (state == S_ISSUE);
  assign mem_op    = last_step ? OP_READ : OP_NOR;
  assign mem_ten   = !last_step;
  assign mem_te    = TE_W'(step);
  assign mem_row   = aa;
  assign mem_nlog2 = last_step ? '0 : NLOG_W'(ROW_W - 32'(step));
  assign fault_row = aa;

endmodule
