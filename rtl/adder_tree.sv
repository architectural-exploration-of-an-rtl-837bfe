// adder_tree: pipelined binary tree that sums N_IN words of W bits.
//
// Level l adds neighbouring pairs of level l-1; an odd word left over at a
// level is carried to the next one unchanged. The number of levels is
// ceil(log2(N_IN)). Every level except the last ends in a register, as in the
// convolution operators of the accelerator, where the final adder drives the
// output pixel directly; REG_LAST = 1 registers the last level too (used for
// the pre-adders of the Modified operator). Latency in clock cycles is
// LEVELS-1, or LEVELS with REG_LAST; the tree accepts a new set of words
// every cycle. Sums wrap modulo 2^W: the caller sizes W so they cannot.
// With N_IN = 1 the tree is a plain wire and clk is left unused.
module adder_tree #(
  parameter int unsigned N_IN     = 9,
  parameter int unsigned W        = 16,
  parameter bit          REG_LAST = 1'b0
) (
  input  logic         clk,
  input  logic [W-1:0] in_data [N_IN],
  output logic [W-1:0] sum
);
  localparam int unsigned LEVELS = (N_IN > 1) ? $clog2(N_IN) : 0;

  function automatic int unsigned words_at(int unsigned l);
    return (N_IN + (1 << l) - 1) >> l;
  endfunction

  if (LEVELS == 0) begin : g_single
    assign sum = in_data[0];
  end else begin : g_tree
    for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
      localparam int unsigned NP = words_at(l - 1);
      localparam int unsigned NQ = words_at(l);
      logic [W-1:0] prev [NP];
      logic [W-1:0] nxt  [NQ];
      logic [W-1:0] q    [NQ];

      if (l == 1) begin : g_from_in
        assign prev = in_data;
      end else begin : g_from_lvl
        assign prev = g_lvl[l-1].q;
      end

      always_comb begin
        for (int unsigned k = 0; k < NQ; k++) begin
          if (2 * k + 1 < NP) nxt[k] = prev[2*k] + prev[2*k+1];
          else                nxt[k] = prev[2*k];
        end
      end

      if (l < LEVELS || REG_LAST) begin : g_reg
        always_ff @(posedge clk) q <= nxt;
      end else begin : g_comb
        assign q = nxt;
      end
    end
    assign sum = g_lvl[LEVELS].q[0];
  end
endmodule
