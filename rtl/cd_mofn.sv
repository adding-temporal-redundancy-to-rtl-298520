// cd_mofn: completion detector of one M-of-N digit.
//
// M = 1 (1-of-N): valid is the OR of the rails, so it rises with the one
// data rail and falls when the spacer (all rails low) returns.
// M = 2 (2-of-N): one C-element per pair of rails, their outputs ORed. A
// pair's C-element rises only when both of its rails are high, so a single
// rail, which is what a single event can raise, never signals completion.
// Each pair C-element falls only when both of its rails are low, so valid
// falls once the whole digit is back to spacer. For 2-of-5 this takes ten
// C-elements, the count the reference implementation uses; which gate
// merges the pairs is this design's reading (an OR).
//
// Ports: clk, rst_n (state of the pair C-elements), d (rails), valid.
// INIT is the reset value of d, used to reset the pair C-elements to match.
// Timing: for M = 1 valid is combinational; for M = 2 it lags d by one
// step (the pair C-elements).
module cd_mofn #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 2,
  parameter logic [N-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic         valid
);

  if (M == 1) begin : g_one_hot
    assign valid = |d;
  end else if (M == 2) begin : g_two_hot
    logic [N-1:0][N-1:0] pair;
    for (genvar i = 0; i < N; i++) begin : g_i
      for (genvar j = 0; j < N; j++) begin : g_j
        if (j > i) begin : g_c
          c_element #(.RESET_VAL(INIT[i] & INIT[j])) u_c (
            .clk(clk), .rst_n(rst_n), .a(d[i]), .b(d[j]), .see(1'b0),
            .q(pair[i][j]));
        end else begin : g_none
          assign pair[i][j] = 1'b0;
        end
      end
    end
    assign valid = |pair;
  end else begin : g_bad
    $error("cd_mofn supports M = 1 and M = 2 only");
  end

endmodule
