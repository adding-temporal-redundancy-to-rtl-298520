// wchb_stage: weak-conditioned half buffer (WCHB) register of DIGITS M-of-N
// digits, the storage element of a quasi-delay-insensitive (QDI) pipeline.
//
// Every rail is a C-element of the incoming rail and ack_in. With ack_in
// high (the next stage is empty and asks for data) the rails rise as data
// arrives; with ack_in low (the next stage holds the token) they fall as the
// spacer arrives. Otherwise they hold. The output rails go through a
// completion detector: one cd_mofn per digit, a C-element tree over all
// digits, then an inverter. ack_out is therefore high while the stage holds
// a complete spacer and low while it holds a complete data word: it is the
// ack_in of the previous stage. This is the four-phase return-to-zero
// protocol with the ack polarity of the classic WCHB drawing (ack in enters
// the register C-elements directly; ack out comes from a NOR-type detector).
//
// see[i] strikes the register C-element of rail i. The detector is left
// without SEE pins: this design, like its reference, treats only faults in
// the data path.
//
// INIT is the rail state after reset. It is all spacer for link stages; the
// encoder and decoder loops reset one stage to a data token. The detector's
// C-elements reset consistently with INIT so that ack_out is correct at
// once.
//
// Ports: d / ack_out towards the previous stage, q / ack_in towards the next
// stage, see, clk, rst_n. Timing (unit-delay model): a rail changes one step
// after its inputs allow it; ack_out follows after the digit detector and
// ceil(log2(DIGITS)) tree steps.
module wchb_stage #(
  parameter int unsigned DIGITS = 16,
  parameter int unsigned N      = 5,
  parameter int unsigned M      = 2,
  parameter logic [DIGITS*N-1:0] INIT = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DIGITS*N-1:0] d,
  output logic                ack_out,
  output logic [DIGITS*N-1:0] q,
  input  logic                ack_in,
  input  logic [DIGITS*N-1:0] see
);

  logic [DIGITS-1:0] digit_valid;
  logic              done;

  for (genvar i = 0; i < DIGITS*N; i++) begin : g_rail
    c_element #(.RESET_VAL(INIT[i])) u_reg (
      .clk(clk), .rst_n(rst_n), .a(d[i]), .b(ack_in), .see(see[i]), .q(q[i]));
  end

  for (genvar k = 0; k < DIGITS; k++) begin : g_cd
    cd_mofn #(.N(N), .M(M), .INIT(INIT[k*N +: N])) u_cd (
      .clk(clk), .rst_n(rst_n), .d(q[k*N +: N]), .valid(digit_valid[k]));
  end

  c_tree #(.N(DIGITS), .RESET_VAL(INIT != '0)) u_tree (
    .clk(clk), .rst_n(rst_n), .in(digit_valid), .out(done));

  assign ack_out = ~done;

endmodule
