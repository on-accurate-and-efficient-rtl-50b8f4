// bhr: global branch history register.
//
// A shift register of the last LEN branch outcomes. When `push` is high the
// outcome enters at bit 0 (bit 0 is always the newest outcome, bit LEN-1 the
// oldest) and the oldest bit falls out. `hist_next` is the value the register
// takes at the next edge, so a table can start an access with the new history
// in the same cycle. The register clears to all not-taken on reset (reset
// value is this library's choice). One push per cycle.
module bhr #(
  parameter int unsigned LEN = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  input  logic           outcome,    // 1 = taken
  output logic [LEN-1:0] hist,
  output logic [LEN-1:0] hist_next
);
  always_comb begin
    hist_next = hist;
    if (push) begin
      if (LEN > 1) hist_next = {hist[LEN-2:0], outcome};
      else         hist_next = LEN'(outcome);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist <= '0;
    else        hist <= hist_next;
  end
endmodule
