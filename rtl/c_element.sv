// c_element: two-input Muller C-element with a single-event-effect (SEE) pin.
//
// The output copies the inputs when they agree and keeps its value when they
// differ. The asynchronous circuits of this design are modelled in discrete
// time: every C-element is one state bit updated on the evaluation clock
// `clk`, so each C-element costs one step of delay and all feedback loops
// pass through a state bit. The clock is only the time base of this model;
// the circuit itself is clockless and its behaviour does not depend on the
// number of steps a transition takes.
//
// SEE model: `see` inverts the stored value for one step, as the extra SEE
// pin of a characterised library cell would. In the driven states (inputs
// 00 or 11) the majority function restores the output on the next step, so
// the strike is a transient (SET). In the holding states (inputs 01 or 10)
// the inverted value is kept, so the strike is an upset (SEU). This is the
// state graph of a C-element under radiation. Critical charge and pulse
// width are analog and not modelled.
//
// Ports: clk, rst_n (asynchronous, active low, output to RESET_VAL), a, b,
// see, q. Timing: q follows maj(a, b, q) one clock after the inputs change.
module c_element #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic see,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VAL;
    else        q <= ((a & b) | (q & (a | b))) ^ see;
  end

endmodule
