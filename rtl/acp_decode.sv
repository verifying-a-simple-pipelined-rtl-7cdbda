// acp_decode -- Decode unit of the ACP pipeline.
//
// Splits the fetch unit's instruction register into five overlapping fields
// and registers them: op (3 bits), the register indices ra, rb, rc (R bits
// each) and addr/val (M bits), used as a memory address, a branch offset or
// an immediate. The fields are packed from the most significant bit down:
//
//   op  = ir[W-1   -: 3]
//   ra  = ir[W-4   -: R]
//   rb  = ir[W-4-R -: R]     addr = ir[W-4-R -: M]   (rb/rc and addr overlap)
//   rc  = ir[W-4-2R -: R]
//
// which needs W >= max(3 + 3R, 3 + R + M), the bound the architecture states.
// Bits below both field ends are unused (ir[1:0] at the default size, which
// the lint reports as unused input bits).
// The exact bit positions are this design's choice. While the execute unit
// reports a read-write conflict (hold) the decoded fields are kept, so the
// stalled instruction is executed the next cycle. Fields change on the rising
// clock edge; there is no reset (the unit holds junk at boot).
module acp_decode #(
  parameter int unsigned R = 3,
  parameter int unsigned M = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         hold,
  input  logic [W-1:0] ir,
  output logic [2:0]   op,
  output logic [R-1:0] ra,
  output logic [R-1:0] rb,
  output logic [R-1:0] rc,
  output logic [M-1:0] addr
);

  initial begin
    assert (W >= 3 + 3 * R && W >= 3 + R + M)
      else $error("acp_decode: word size W too small for the instruction fields");
  end

  always_ff @(posedge clk) begin
    if (!hold) begin
      op   <= ir[W-1 -: 3];
      ra   <= ir[W-4 -: R];
      rb   <= ir[W-4-R -: R];
      rc   <= ir[W-4-2*R -: R];
      addr <= ir[W-4-R -: M];
    end
  end

endmodule
