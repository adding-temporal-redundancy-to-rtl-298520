// qdi_link: QDI data link, a linear pipeline of DEPTH WCHB stages, each
// DIGITS M-of-N digits wide (default: 16 stages of 16 2-of-5 digits, which
// carry 32 data bits of TRDIC code).
//
// Stage k takes the rails of stage k-1 and the ack_out of stage k+1; the
// first stage faces the sender (in_data / in_ack) and the last the receiver
// (out_data / out_ack). Ack polarity: 1 = ready for data, 0 = data taken.
// Stages reset to spacer, so the link holds no token after reset. Every
// stage has its own completion tree.
//
// see is the SEE bus: bit (k*DIGITS*N + i) strikes rail i of stage k. A
// strike on a holding C-element of a 2-of-5 stage raises or drops one rail;
// that alone cannot complete or cancel a code word, which is the filtering
// the 2-of-n code gives. A struck rail that meets a real code word makes it
// three-hot (an invalid corrupted datum) and it travels on to the decoder.
//
// Timing (unit-delay model): a token crosses a stage in one step; the cycle
// time is set by the rail step, the digit detector and the tree.
module qdi_link #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DIGITS = 16,
  parameter int unsigned N      = 5,
  parameter int unsigned M      = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [DIGITS*N-1:0]       in_data,
  output logic                      in_ack,
  output logic [DIGITS*N-1:0]       out_data,
  input  logic                      out_ack,
  input  logic [DEPTH*DIGITS*N-1:0] see
);

  localparam int unsigned W = DIGITS * N;

  logic [DEPTH:0][W-1:0] rails;
  logic [DEPTH:0]        ack;

  assign rails[0] = in_data;
  assign in_ack   = ack[0];
  assign ack[DEPTH] = out_ack;

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    wchb_stage #(.DIGITS(DIGITS), .N(N), .M(M)) u_stage (
      .clk(clk), .rst_n(rst_n),
      .d(rails[k]), .ack_out(ack[k]),
      .q(rails[k+1]), .ack_in(ack[k+1]),
      .see(see[k*W +: W]));
  end

  assign out_data = rails[DEPTH];

endmodule
