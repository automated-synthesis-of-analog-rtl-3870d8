// wallace_ones_adder: pipelined Wallace-tree ones counter.
//
// Counts the 1s among N input bits (the comparator outputs of a stochastic
// flash converter). Full adders act as 3:2 compressors. In each layer, the
// bits of every bit-weight are taken three at a time into a full adder; a
// pair left over also goes into a full adder (third input tied to 0) and a
// single leftover bit passes on unchanged. Sums stay at their weight,
// carries move one weight up. Layers repeat until no weight holds more than
// two bits; the two remaining rows are then added by one carry-propagate
// adder. A register follows every layer and the final adder, so each stage
// costs one full-adder delay (or one W-bit add at the end).
//
// The reduction schedule is worked out at elaboration by constant functions
// (col_cnt, n_fa, col_off); bits of one layer are packed column by column,
// lowest weight first, inside one vector.
//
// Timing: all registers load on the falling edge of clk, as in the original
// design where the comparators evaluate while clk is high. count is the
// number of ones in the bits sampled LATENCY falling edges earlier, with
// LATENCY = (number of compressor layers) + 1; for N = 7 that is 3, for
// N = 2047 it is 15 (14 layers). There is no reset: the pipeline flushes itself after
// LATENCY cycles. The structure follows the document; the packing of bits
// and the choice of which bits share an adder are this design's own.
module wallace_ones_adder #(
  parameter  int unsigned N = 2047,
  localparam int unsigned W = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic [N-1:0] bits,
  output logic [W-1:0] count
);

  localparam int MAXW = 32;

  // Full adders used on a column of c bits.
  function automatic int n_fa(int c);
    return c / 3 + ((c % 3 == 2) ? 1 : 0);
  endfunction

  // Column heights at the input of compressor layer `layer`.
  typedef int cols_t[MAXW];

  function automatic cols_t layer_cols(int layer);
    cols_t c, nc;
    for (int i = 0; i < MAXW; i++) c[i] = 0;
    c[0] = int'(N);
    for (int l = 0; l < layer; l++) begin
      for (int i = 0; i < MAXW; i++)
        nc[i] = n_fa(c[i]) + ((c[i] % 3 == 1) ? 1 : 0) + ((i > 0) ? n_fa(c[i-1]) : 0);
      c = nc;
    end
    return c;
  endfunction

  // Number of bits of weight 2**w at the input of compressor layer `layer`.
  function automatic int col_cnt(int layer, int w);
    cols_t c;
    c = layer_cols(layer);
    return (w < MAXW) ? c[w] : 0;
  endfunction

  // Position of the first bit of weight 2**w inside a layer's vector.
  function automatic int col_off(int layer, int w);
    cols_t c;
    int s;
    c = layer_cols(layer);
    s = 0;
    for (int i = 0; i < w && i < MAXW; i++) s += c[i];
    return s;
  endfunction

  // Compressor layers needed until every column holds two bits or fewer.
  function automatic int n_layers();
    cols_t c, nc;
    int l;
    bit done;
    for (int i = 0; i < MAXW; i++) c[i] = 0;
    c[0] = int'(N);
    l = 0;
    done = 1'b0;
    while (!done) begin
      done = 1'b1;
      for (int i = 0; i < MAXW; i++)
        if (c[i] > 2) done = 1'b0;
      if (!done) begin
        for (int i = 0; i < MAXW; i++)
          nc[i] = n_fa(c[i]) + ((c[i] % 3 == 1) ? 1 : 0) + ((i > 0) ? n_fa(c[i-1]) : 0);
        c = nc;
        l++;
      end
    end
    return l;
  endfunction

  localparam int NL = n_layers();

  for (genvar L = 0; L < NL; L++) begin : g_layer
    localparam int TOT_IN  = col_off(L, MAXW);
    localparam int TOT_OUT = col_off(L + 1, MAXW);
    logic [TOT_IN-1:0]  cur;   // this layer's input bits
    logic [TOT_OUT-1:0] nx;    // compressed bits, before the register
    logic [TOT_OUT-1:0] q;     // registered output of this layer

    if (L == 0) begin : g_src
      assign cur = bits;
    end else begin : g_src
      assign cur = g_layer[L-1].q;
    end

    for (genvar w = 0; w < int'(W); w++) begin : g_col
      localparam int C    = col_cnt(L, w);
      localparam int OFF  = col_off(L, w);
      localparam int NF   = n_fa(C);
      localparam int NOFF = col_off(L + 1, w);
      // carries of this column land after the sums and the pass-through bit
      // of the next column
      localparam int COFF = col_off(L + 1, w + 1) + n_fa(col_cnt(L, w + 1))
                            + ((col_cnt(L, w + 1) % 3 == 1) ? 1 : 0);

      for (genvar f = 0; f < NF; f++) begin : g_fa
        logic a, b, ci;
        assign a = cur[OFF + 3*f];
        if (3*f + 1 < C) begin : g_b
          assign b = cur[OFF + 3*f + 1];
        end else begin : g_b
          assign b = 1'b0;
        end
        if (3*f + 2 < C) begin : g_c
          assign ci = cur[OFF + 3*f + 2];
        end else begin : g_c
          assign ci = 1'b0;
        end
        assign nx[NOFF + f] = a ^ b ^ ci;
        assign nx[COFF + f] = (a & b) | (a & ci) | (b & ci);
      end

      if (C % 3 == 1) begin : g_pass
        assign nx[NOFF + NF] = cur[OFF + C - 1];
      end
    end

    always_ff @(negedge clk) q <= nx;
  end

  // Final carry-propagate adder over the two remaining rows.
  localparam int TOT_F = col_off(NL, MAXW);
  logic [TOT_F-1:0] fin;
  logic [W-1:0]     row_a, row_b;

  if (NL == 0) begin : g_fin
    assign fin = bits;
  end else begin : g_fin
    assign fin = g_layer[NL-1].q;
  end

  for (genvar w = 0; w < int'(W); w++) begin : g_row
    localparam int C   = col_cnt(NL, w);
    localparam int OFF = col_off(NL, w);
    if (C >= 1) begin : g_a
      assign row_a[w] = fin[OFF];
    end else begin : g_a
      assign row_a[w] = 1'b0;
    end
    if (C >= 2) begin : g_b
      assign row_b[w] = fin[OFF + 1];
    end else begin : g_b
      assign row_b[w] = 1'b0;
    end
  end

  always_ff @(negedge clk) count <= row_a + row_b;

endmodule
