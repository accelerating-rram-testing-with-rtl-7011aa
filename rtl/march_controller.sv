// March test sequencer built on the in-memory NOR operation.
//
// It runs a MATS+-style march in which the read-0 element is replaced by
// NOR operations over all rows, with every write doubled to raise the
// chance of catching intermittent faults. With N words and the four
// reference configurations x (deep H, weak 0, weak 1, deep L) it issues
//
//   detection (locate = 0):
//     up(w0 w0); x4(NOR_x 1); up(w1 w1); down(r_x1, w0); x4(NOR_x 1)
//   detection and location (locate = 1):
//     the same, with every NOR_x 1 replaced by a binary search of
//     log2(ROWS) NORs and one read, which also names the faulty row.
//
// With one column group (MUX = 1) this is 6N + 8 and 6N + 8 log2(N_r) + 8
// operations. The sense amplifiers see one column group at a time, so each
// NOR element is repeated for every column group: 6N + 8 MUX and
// 6N + 8 MUX (log2(N_r) + 1) in general. Word w is row w / MUX,
// column group w % MUX.
//
// Interface: start (one tick, idle) runs the test; done pulses at the end.
// The memory port issues one-tick mem_req pulses and waits for
// mem_rsp_valid. xcfg_nor[x] is the reference/period configuration of the
// x-th NOR element, xcfg_r1 that of the read-1. fail_count counts wrong
// reads and NORs (in location mode: searches that found a fault); the
// first failing operation is kept in first_*; loc_* holds the last fault
// located. oplen counts the operations issued. The element order follows
// the published algorithm; the column-group loop, the word order and the
// failure log are this design's choices.
module march_controller
  import rram_dft_pkg::*;
#(
  parameter int unsigned ROW_W  = 8,
  parameter int unsigned MUX    = 4,
  parameter int unsigned MUX_W  = (MUX > 1) ? $clog2(MUX) : 1,
  parameter int unsigned SA_N   = 64,
  parameter int unsigned TE_W   = $clog2(ROW_W),
  parameter int unsigned NLOG_W = 4,
  parameter int unsigned WA_W   = ROW_W + MUX_W   // word address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              locate,
  input  xcfg_t             xcfg_nor [4],
  input  xcfg_t             xcfg_r1,
  output logic              busy,
  output logic              done,
  // memory operation port
  output logic              mem_req,
  output mem_op_e           mem_op,
  output logic [ROW_W-1:0]  mem_row,
  output logic [MUX_W-1:0]  mem_col,
  output logic [SA_N-1:0]   mem_wdata,
  output logic              mem_ten,
  output logic [TE_W-1:0]   mem_te,
  output logic [NLOG_W-1:0] mem_nlog2,
  output xcfg_t             mem_xcfg,
  input  logic              mem_rsp_valid,
  input  logic [SA_N-1:0]   mem_rdata,
  // results
  output logic [15:0]       fail_count,
  output logic [2:0]        first_phase,
  output logic [WA_W-1:0]   first_addr,
  output logic [1:0]        first_x,
  output logic              loc_valid,
  output logic [ROW_W-1:0]  loc_row,
  output logic [MUX_W-1:0]  loc_col,
  output logic [1:0]        loc_x,
  output logic [31:0]       oplen
);

  typedef enum logic [2:0] {PH_W0, PH_NOR0, PH_W1, PH_R1W0, PH_NOR1} phase_e;
  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_BS_START, S_BS_WAIT} state_e;

  localparam logic [WA_W-1:0] ADDR_LAST = WA_W'((1 << ROW_W) * MUX - 1);

  state_e           state;
  phase_e           phase;
  logic [WA_W-1:0]  addr;
  logic             sub;
  logic [1:0]       xi;
  logic [MUX_W-1:0] ci;
  logic             loc_q;

  // Binary search engine, used by the NOR elements in location mode.
  logic              bs_start, bs_busy, bs_req, bs_ten, bs_done, bs_found;
  mem_op_e           bs_op;
  logic [TE_W-1:0]   bs_te;
  logic [ROW_W-1:0]  bs_row, bs_fault_row;
  logic [NLOG_W-1:0] bs_nlog2;
  logic [7:0]        bs_nops;

  binary_search_engine #(.ROW_W(ROW_W), .SA_N(SA_N), .TE_W(TE_W), .NLOG_W(NLOG_W)) u_bs (
    .clk, .rst_n,
    .start         (bs_start),
    .busy          (bs_busy),
    .mem_req       (bs_req),
    .mem_op        (bs_op),
    .mem_ten       (bs_ten),
    .mem_te        (bs_te),
    .mem_row       (bs_row),
    .mem_nlog2     (bs_nlog2),
    .mem_rsp_valid (mem_rsp_valid && state == S_BS_WAIT),
    .mem_rdata     (mem_rdata),
    .done          (bs_done),
    .found         (bs_found),
    .fault_row     (bs_fault_row),
    .nops          (bs_nops)
  );

  assign bs_start = (state == S_BS_START);

  logic nor_phase;
  assign nor_phase = (phase == PH_NOR0) || (phase == PH_NOR1);

  // Operation of the current march step.
  logic [SA_N-1:0] expect_q;
  always_comb begin
    mem_op    = OP_WRITE;
    mem_row   = ROW_W'(32'(addr) / MUX);
    mem_col   = MUX_W'(32'(addr) % MUX);
    mem_wdata = '0;
    mem_ten   = 1'b0;
    mem_te    = '0;
    mem_nlog2 = '0;
    mem_xcfg  = XCFG_PLAIN;
    expect_q  = '1;
    unique case (phase)
      PH_W0:   mem_op = OP_WRITE;
      PH_W1: begin
        mem_op    = OP_WRITE;
        mem_wdata = '1;
      end
      PH_R1W0: begin
        if (!sub) begin
          mem_op   = OP_READ;
          mem_xcfg = xcfg_r1;
          expect_q = '1;
        end else begin
          mem_op   = OP_WRITE;
        end
      end
      default: begin // NOR elements
        mem_op    = OP_NOR;
        mem_row   = '1;
        mem_col   = ci;
        mem_ten   = 1'b1;
        mem_nlog2 = NLOG_W'(ROW_W);
        mem_xcfg  = xcfg_nor[xi];
        expect_q  = '1;
      end
    endcase
    if (state == S_BS_WAIT) begin
      mem_op    = bs_op;
      mem_row   = bs_row;
      mem_ten   = bs_ten;
      mem_te    = bs_te;
      mem_nlog2 = bs_nlog2;
    end
  end

  assign mem_req = (state == S_ISSUE) || (state == S_BS_WAIT && bs_req);

  logic last_nor;
  assign last_nor = (xi == 2'd3) && (32'(ci) == MUX - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      phase       <= PH_W0;
      addr        <= '0;
      sub         <= 1'b0;
      xi          <= '0;
      ci          <= '0;
      loc_q       <= 1'b0;
      done        <= 1'b0;
      fail_count  <= '0;
      first_phase <= '0;
      first_addr  <= '0;
      first_x     <= '0;
      loc_valid   <= 1'b0;
      loc_row     <= '0;
      loc_col     <= '0;
      loc_x       <= '0;
      oplen       <= '0;
    end else begin
      done <= 1'b0;
      if (mem_req) oplen <= oplen + 32'd1;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_ISSUE;
          phase      <= PH_W0;
          addr       <= '0;
          sub        <= 1'b0;
          xi         <= '0;
          ci         <= '0;
          loc_q      <= locate;
          fail_count <= '0;
          loc_valid  <= 1'b0;
          oplen      <= '0;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) begin
          // Check reads and NORs.
          if (mem_op != OP_WRITE && mem_rdata != expect_q) begin
            fail_count <= fail_count + 16'd1;
            if (fail_count == '0) begin
              first_phase <= 3'(phase);
              first_addr  <= nor_phase ? WA_W'(ci) : addr;
              first_x     <= xi;
            end
          end
          state <= S_ISSUE;
          unique case (phase)
            PH_W0, PH_W1: begin
              sub <= !sub;
              if (sub) begin
                addr <= addr + 1'b1;
                if (addr == ADDR_LAST) begin
                  addr  <= (phase == PH_W1) ? ADDR_LAST : '0;
                  phase <= (phase == PH_W0) ? PH_NOR0 : PH_R1W0;
                  if (loc_q && phase == PH_W0) state <= S_BS_START;
                end
              end
            end
            PH_R1W0: begin
              sub <= !sub;
              if (sub) begin
                addr <= addr - 1'b1;
                if (addr == '0) begin
                  phase <= PH_NOR1;
                  if (loc_q) state <= S_BS_START;
                end
              end
            end
            default: begin // detection NOR elements
              ci <= ci + 1'b1;
              if (32'(ci) == MUX - 1) begin
                ci <= '0;
                xi <= xi + 2'd1;
              end
              if (last_nor) begin
                xi <= '0;
                if (phase == PH_NOR0) phase <= PH_W1;
                else begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              end
            end
          endcase
        end
        S_BS_START: state <= S_BS_WAIT;
        S_BS_WAIT: if (bs_done) begin
          if (bs_found) begin
            fail_count <= fail_count + 16'd1;
            if (fail_count == '0) begin
              first_phase <= 3'(phase);
              first_addr  <= WA_W'(32'(bs_fault_row) * MUX + 32'(ci));
              first_x     <= xi;
            end
            loc_valid <= 1'b1;
            loc_row   <= bs_fault_row;
            loc_col   <= ci;
            loc_x     <= xi;
          end
          state <= S_BS_START;
          ci <= ci + 1'b1;
          if (32'(ci) == MUX - 1) begin
            ci <= '0;
            xi <= xi + 2'd1;
          end
          if (last_nor) begin
            xi <= '0;
            if (phase == PH_NOR0) begin
              phase <= PH_W1;
              state <= S_ISSUE;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The memory is only asked for one operation at a time.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
                                      mem_req |=> !mem_req);

endmodule
