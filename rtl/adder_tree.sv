// adder_tree: pipelined sum of N signed operands, one register per level.
//
// The operands are sign-extended to the output width and padded with zeros
// to the next power of two P; each of the log2(P) levels adds neighbouring
// pairs and registers the result. A new set of operands can enter every
// cycle; its sum appears LEVELS cycles later.
//
// The document asks only for a fully pipelined filter; this tree is this
// design's way of summing the tap products at one sample per cycle.
//
// Interface: clk, rst_n, in_valid with in[N] (operands), out_valid with sum.
// Timing: latency LEVELS = clog2(N) cycles (at least 1).
module adder_tree #(
  parameter int unsigned N  = 32,
  parameter int unsigned IW = 16,
  parameter int unsigned OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] sum
);

  localparam int unsigned LEVELS = (N < 2) ? 1 : $clog2(N);
  localparam int unsigned P      = 1 << LEVELS;

  logic signed [OW-1:0] lvl [LEVELS+1][P];
  logic [LEVELS:0]      vld;

  for (genvar k = 0; k < P; k++) begin : g_in
    if (k < N) begin : g_op
      assign lvl[0][k] = OW'(in[k]);
    end else begin : g_pad
      assign lvl[0][k] = '0;
    end
  end
  assign vld[0] = in_valid;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned W = P >> (l + 1);   // sums produced at this level
    for (genvar k = 0; k < P; k++) begin : g_node
      if (k < W) begin : g_add
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) lvl[l+1][k] <= '0;
          else        lvl[l+1][k] <= lvl[l][2*k] + lvl[l][2*k+1];
        end
      end else begin : g_unused
        assign lvl[l+1][k] = '0;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l+1] <= 1'b0;
      else        vld[l+1] <= vld[l];
    end
  end

  assign sum       = lvl[LEVELS][0];
  assign out_valid = vld[LEVELS];

endmodule
