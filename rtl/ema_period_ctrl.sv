// Reconfigurable period of operation (extra margin adjustment, EMA).
//
// Hard-to-detect RRAM faults leave the cell in an undefined state whose
// bitline voltage develops too slowly to clear the sense amplifier's
// minimum margin. Stretching the wordline pulse lets the difference grow.
// As in SRAM EMA schemes the start of the active period is fixed and only
// its end is delayed: three EMA pins give eight periods. Here the period of
// a read or NOR is its base length times (ema + 1), so ema = 3 is the 4x
// extended time; a write always uses its base length.
//
// Interface and timing, in clock ticks: a start pulse while idle (busy low)
// samples op and ema. wl_en is then high for `period` ticks, followed by
// one tick with sae (sense/latch enable, or write commit) high and done
// pulsed in the same tick. busy covers the whole operation, so an
// operation takes period + 1 ticks. The base lengths (read 4, NOR 7,
// write 12 ticks) keep the ratio of the published 0.7 ns / 1.2 ns / 2 ns
// read / NOR / write times; the tick length and the linear EMA scale are
// this design's choices.
module ema_period_ctrl
  import rram_dft_pkg::*;
#(
  parameter int unsigned T_READ  = 4,
  parameter int unsigned T_NOR   = 7,
  parameter int unsigned T_WRITE = 12,
  parameter int unsigned CNT_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mem_op_e          op,
  input  logic [2:0]       ema,
  output logic             busy,
  output logic             wl_en,
  output logic             sae,
  output logic             done,
  output logic [CNT_W-1:0] period   // active ticks of the current operation
);

  typedef enum logic [1:0] {S_IDLE, S_ACTIVE, S_SENSE} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] len;

  always_comb begin
    unique case (op)
      OP_READ:  len = CNT_W'(T_READ * (32'(ema) + 1));
      OP_NOR:   len = CNT_W'(T_NOR * (32'(ema) + 1));
      OP_WRITE: len = CNT_W'(T_WRITE);
      default:  len = CNT_W'(1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      period <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_ACTIVE;
          period <= len;
          cnt    <= len - CNT_W'(1);
        end
        S_ACTIVE: if (cnt == '0) state <= S_SENSE;
                  else           cnt   <= cnt - CNT_W'(1);
        S_SENSE:  state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign wl_en = (state == S_ACTIVE);
  assign sae   = (state == S_SENSE);
  assign done  = (state == S_SENSE);

  // A new operation is only accepted while idle.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    start |-> !busy);

endmodule
