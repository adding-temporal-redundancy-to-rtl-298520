// c_tree: N-input C-element built as a balanced tree of two-input
// C-elements.
//
// Used to join the per-digit completion signals of a multi-digit register:
// out rises once every input is high and falls once every input is low,
// holding in between. Level 0 is the inputs; each level pairs neighbouring
// nodes of the level below with one C-element and passes an odd last node
// straight up. With N = 1 the input is passed through.
//
// Ports: clk, rst_n, in[N-1:0], out. RESET_VAL is the reset value of every
// C-element in the tree. Timing: ceil(log2(N)) steps from the last input
// change to out.
module c_tree #(
  parameter int unsigned N = 16,
  parameter bit RESET_VAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Number of nodes at level l: ceil(N / 2**l).
  function automatic int unsigned width_at(input int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  logic [LEVELS:0][N-1:0] node;

  assign node[0] = in;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned WB = width_at(l - 1);
    localparam int unsigned WL = width_at(l);
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i < WL && 2*i + 1 < WB) begin : g_c
        c_element #(.RESET_VAL(RESET_VAL)) u_c (
          .clk(clk), .rst_n(rst_n), .a(node[l-1][2*i]), .b(node[l-1][2*i+1]),
          .see(1'b0), .q(node[l][i]));
      end else if (i < WL) begin : g_pass
        assign node[l][i] = node[l-1][2*i];
      end else begin : g_unused
        assign node[l][i] = 1'b0;
      end
    end
  end

  assign out = node[LEVELS][0];

endmodule
