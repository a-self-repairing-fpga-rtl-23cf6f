// self_test: the TEST block of a MUXTREE element (comparator, third flip-flop
// copy D3 and majority circuit).
//
// What it does: the functional part is duplicated (M1, M2). COMP raises
// fault whenever the two copies disagree on NOUT or on FF_IN. D3 is a third
// copy of the flip-flop, loaded from M1's FF_IN as drawn in the element
// diagram. MAJ is the two-of-three vote over the three stored flip-flop
// values (Q of D1 in M1, Q of D1 in M2, Q of D3); its result is the state
// that survives a repair. The comparison inputs and the D3 source follow the
// diagram; voting on the stored Q values rather than on the FF_IN lines is
// this design's reading of "a third copy of the flip-flop ... in combination
// with a simple majority circuit" conserving the state.
//
// Interface/timing: fault and maj are combinational. D3 updates on the rising
// clock when en=1; load=1 writes load_val (restore after configuration or a
// repair shift), exactly like D1 in mux_unit.
module self_test (
  input  logic clk,
  input  logic rst_n,
  input  logic nout1,
  input  logic nout2,
  input  logic ff_in1,
  input  logic ff_in2,
  input  logic q1,
  input  logic q2,
  input  logic en,
  input  logic load,
  input  logic load_val,
  output logic fault,
  output logic q3,
  output logic maj
);

  always_comb begin
    fault = (nout1 ^ nout2) | (ff_in1 ^ ff_in2);
    maj   = (q1 & q2) | (q1 & q3) | (q2 & q3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q3 <= 1'b0;
    else if (load) q3 <= load_val;
    else if (en)   q3 <= ff_in1;
  end

endmodule
