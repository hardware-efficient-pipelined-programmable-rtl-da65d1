// pq_compressor: multi-operand carry-save adder, M operands of W bits down to two.
//
// The tap adder of the filter has to add the P partial products of a digit to the
// incoming sum and carry vectors, M = P + 2 operands in all. This module builds that
// (M,2) compressor out of (4,2) compressor rows: every level takes the operands four
// at a time through a compressor_4_2, three left-over operands through one full-adder
// row, and passes one or two left-over operands on unchanged, until two remain. For
// the 2-bits-at-a-time filter (M = 4) this is a single (4,2) row. The way operands
// are grouped when M is not 4 is this design's choice.
//
// sum + carry == the sum of all operands, modulo 2**W. Purely combinational.
module pq_compressor
  import da_fir_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned M = 4
) (
  input  logic [W-1:0] ops   [M],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int unsigned LEVELS = compress_levels(M);

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = ops_at(l);
    localparam int unsigned NOUT = compress_next(NIN);
    localparam int unsigned N4   = NIN / 4;
    localparam int unsigned REM  = NIN % 4;

    logic [W-1:0] cur [NIN];   // operands entering this level
    logic [W-1:0] nxt [NOUT];  // operands leaving it

    for (genvar k = 0; k < NIN; k++) begin : g_cur
      if (l == 0) begin : g_first
        assign cur[k] = ops[k];
      end else begin : g_later
        assign cur[k] = g_level[l-1].nxt[k];
      end
    end

    for (genvar g = 0; g < N4; g++) begin : g_c42
      compressor_4_2 #(.W(W)) u_c42 (
        .a    (cur[4*g]),
        .b    (cur[4*g+1]),
        .c    (cur[4*g+2]),
        .d    (cur[4*g+3]),
        .sum  (nxt[2*g]),
        .carry(nxt[2*g+1])
      );
    end

    if (REM == 3) begin : g_fa
      // One full-adder (3,2) row.
      logic [W-1:0] x, y, z, maj;
      assign x   = cur[4*N4];
      assign y   = cur[4*N4+1];
      assign z   = cur[4*N4+2];
      assign maj = (x & y) | (x & z) | (y & z);
      assign nxt[2*N4]   = x ^ y ^ z;
      assign nxt[2*N4+1] = {maj[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_r
        assign nxt[2*N4+r] = cur[4*N4+r];
      end
    end
  end

  if (LEVELS > 0) begin : g_out_tree
    assign sum   = g_level[LEVELS-1].nxt[0];
    assign carry = g_level[LEVELS-1].nxt[1];
  end else if (M == 2) begin : g_out2
    assign sum   = ops[0];
    assign carry = ops[1];
  end else begin : g_out1
    assign sum   = ops[0];
    assign carry = '0;
  end

  // Operand count at the input of level l.
  function automatic int unsigned ops_at(int unsigned l);
    int unsigned n;
    n = M;
    for (int unsigned i = 0; i < l; i++) n = compress_next(n);
    return n;
  endfunction

endmodule
