// Behavioural model of one differential (cross-coupled, latch-type) sense
// amplifier comparing a bitline BL with the reference line RL (analog part).
//
// Both lines are precharged and discharged during the wordline pulse; the
// voltage difference they develop grows with the difference of their
// discharge currents and with the pulse length. The model takes that
// difference as |i_bl - i_ref| x period and compares it with K_MIN, which
// stands for the 40 mV minimum sensing margin. When the margin is met the
// latch resolves deterministically: q = 1 when the bitline sinks more
// current than the reference (a SET cell is read). Below the margin the
// latch resolves at random, which is how an undefined cell state escapes
// a plain read. The output is latched on the clock edge at which sae is
// high and held otherwise; margin_ok reports whether the last decision
// was deterministic. Reset clears both. The linear margin law and K_MIN are
// this model's assumptions.
module sense_amp_model #(
  parameter int K_MIN = 1500   // (I_OFF/10) x ticks equivalent of the minimum margin
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sae,
  input  int   i_bl,
  input  int   i_ref,
  input  int   period,
  output logic q,
  output logic margin_ok
);

  int dv;

  always_comb begin
    dv = (i_bl > i_ref) ? (i_bl - i_ref) : (i_ref - i_bl);
    dv = dv * period;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= 1'b0;
      margin_ok <= 1'b0;
    end else if (sae) begin
      margin_ok <= (dv >= K_MIN);
      if (dv >= K_MIN) q <= (i_bl > i_ref);
      else             q <= 1'($urandom);
    end
  end

endmodule
