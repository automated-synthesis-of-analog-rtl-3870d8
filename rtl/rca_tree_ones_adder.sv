// rca_tree_ones_adder: pipelined ripple-carry adder-tree ones counter.
//
// Counts the 1s among N input bits. The first stage adds each input bit to
// its two neighbours with a 1-bit full adder, giving 2-bit partial counts.
// Each following stage adds neighbouring partial counts in pairs with a
// ripple-carry adder one bit wider than its inputs (2+2 -> 3 bits, 3+3 -> 4
// bits, ...); an odd count left over at the end of a stage is carried to
// the next stage unchanged. Stages repeat until one count remains and are
// separated by registers. With N = 3840 (one comparator group of the
// two-group converter) there are 12 stages and the result is 12 bits.
//
// Compared with a Wallace tree this adder has a regular, hand-placeable
// structure but more logic delay per stage.
//
// Timing: all stages load on the falling edge of clk; count is the number
// of ones in the bits sampled NLEV + 1 falling edges earlier, where NLEV =
// ceil(log2(ceil(N/3))) (11 for N = 3840). No reset: the pipeline flushes
// itself. How odd leftovers are handled is this design's own choice.
module rca_tree_ones_adder #(
  parameter  int unsigned N = 3840,
  localparam int unsigned W = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic [N-1:0] bits,
  output logic [W-1:0] count
);

  localparam int M0 = int'((N + 2) / 3);

  // Partial counts left after `k` pairwise stages.
  function automatic int m_at(int k);
    int m;
    m = M0;
    for (int i = 0; i < k; i++) m = (m + 1) / 2;
    return m;
  endfunction

  function automatic int n_lev();
    int m, k;
    m = M0;
    k = 0;
    while (m > 1) begin
      m = (m + 1) / 2;
      k++;
    end
    return k;
  endfunction

  localparam int NLEV = n_lev();

  // Input padded with zeros to a multiple of three.
  logic [3*M0-1:0] bits_p;
  assign bits_p = (3*M0)'(bits);

  for (genvar k = 0; k <= NLEV; k++) begin : g_lev
    localparam int MK = m_at(k);
    localparam int WK = 2 + k;
    logic [WK-1:0] v [MK];

    if (k == 0) begin : g_fa
      for (genvar g = 0; g < MK; g++) begin : g_grp
        always_ff @(negedge clk)
          v[g] <= {1'b0, bits_p[3*g]} + {1'b0, bits_p[3*g+1]} + {1'b0, bits_p[3*g+2]};
      end
    end else begin : g_add
      localparam int MP = m_at(k - 1);
      for (genvar j = 0; j < MK; j++) begin : g_pair
        if (2*j + 1 < MP) begin : g_two
          always_ff @(negedge clk)
            v[j] <= {1'b0, g_lev[k-1].v[2*j]} + {1'b0, g_lev[k-1].v[2*j+1]};
        end else begin : g_one
          always_ff @(negedge clk)
            v[j] <= {1'b0, g_lev[k-1].v[2*j]};
        end
      end
    end
  end

  assign count = W'(g_lev[NLEV].v[0]);

endmodule
