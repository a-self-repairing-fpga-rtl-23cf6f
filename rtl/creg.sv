// creg: configuration register (CREG) of a MUXTREE element, with its
// built-in test-sequence checker.
//
// What it does: a FRAME-bit shift register. Bits enter at the top
// (sr[FRAME-1]) and leave at sr[0] (sout), so after FRAME shifts the first
// bit entered sits in sr[0]. sr[FRAME-1:1] is the element's configuration
// word and sr[0] its state bit (the flip-flop's value). capture writes the
// majority-voted flip-flop value into sr[0]; this "attaches the state to the
// register" so that a repair shift carries it along with the configuration.
//
// Test: before configuration, the same test sequence enters every CREG in
// parallel (test=1, sin = the test line): FRAME ones, FRAME zeros, FRAME ones.
// A local counter knows which part of the sequence is leaving: while the
// second third enters, sout must be 1; while the last third enters, sout must
// be 0. Any stage stuck at 0 or 1 breaks one of the two. test_fault is sticky
// until reset. The sequence itself and the checker are this design's choice:
// the source only says a special test sequence is shifted into all elements
// in parallel before the configuration.
//
// Timing: shift, capture and the test all act on the rising clock; shift has
// priority over capture. test_fault is registered.
module creg #(
  parameter int unsigned FRAME = muxtree_pkg::FRAME
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             sin,
  input  logic             capture,
  input  logic             state_in,
  input  logic             test,
  output logic [FRAME-1:0] sr,
  output logic             sout,
  output logic             test_fault
);

  localparam int unsigned CW = $clog2(3 * FRAME + 1);
  logic [CW-1:0] tcnt;

  assign sout = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else if (shift || test) begin
      sr <= {sin, sr[FRAME-1:1]};
    end else if (capture) begin
      sr[0] <= state_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt       <= '0;
      test_fault <= 1'b0;
    end else if (test) begin
      if (tcnt != CW'(3 * FRAME)) tcnt <= tcnt + 1'b1;
      if (tcnt >= CW'(FRAME) && tcnt < CW'(2 * FRAME) && !sout) test_fault <= 1'b1;
      if (tcnt >= CW'(2 * FRAME) && tcnt < CW'(3 * FRAME) && sout) test_fault <= 1'b1;
    end else begin
      tcnt <= '0;
    end
  end

endmodule
