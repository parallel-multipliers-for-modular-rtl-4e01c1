// gfpm_merged_mac: merged-arithmetic multiply-accumulate over GF(p^m).
//
// Field: p = 2^N - C (pseudo-Mersenne), extension by f(z) = z^MM - 2, with
// 2*log2(C) + log2(MM) + 1 <= N. Computes, coefficient by coefficient,
// r(z) == a(z) * b(z) + acc(z) (mod f(z), mod p).
//
// Because z^MM == 2, a product term a_i*b_j with i+j = t+MM folds into
// column t with weight 2 (a one-bit shift). Each of the MM columns therefore
// sums all its coefficient products, the doubled wrapped products and the
// accumulator coefficient in one merged compression, without reducing any
// single product first; a column is below 2^(2N+log2(2MM)+1). Two rounds of
// subfield reduction follow, each replacing the bits at and above 2^N by
// their value times C (2^N == C mod p). Each round is one more small
// compression, and a single carry-propagate addition per column finishes it.
// Outputs are congruent to the exact coefficient mod p and below 2^(N+2),
// but are not fully reduced below p. The top bit is needed only for larger
// C; with the default C = 1 the second round adds at most a few bits to an
// N-bit value, so bit N+1 of every coefficient is never set.
//
// Coefficient inputs must be below 2^N. Timing: combinational datapath,
// registered result, out_valid_o one clock after in_valid_i. The merged
// column sums, the folding by z^MM == 2 and the two reduction rounds by C
// follow the source design. The arrays are written as word-level sums, and
// the accumulator input and output register are this implementation's
// choices.
//
// Carry-delayed reduction (CDA = 1, the default): each column is kept as two
// rows (the products are split between them), and a half-adder stage on the
// bits at and above 2^N turns the two upper halves into a carry-delayed pair
// (T, D) with T_i = S_i ^ C_i and D_(i+1) = S_i & C_i. Because
// D_(i+1) and T_i are never both one, the rows T_i*C*2^i and D_(i+1)*C*2^(i+1)
// can be merged with an OR into one row, which halves the number of rows a
// reduction round has to add. Both rounds are done this way; each again ends
// in two rows, summed by the final adder. With CDA = 0 the two rounds simply
// add the upper part times C to the lower part. Both forms give identical
// results; the carry-delayed form follows the source design's improved
// reduction, while splitting the products between the two rows is this
// implementation's choice.
module gfpm_merged_mac #(
  parameter int unsigned N  = 13,
  parameter int unsigned C  = 1,
  parameter int unsigned MM = 13,
  parameter bit          CDA = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid_i,
  input  logic [N-1:0] a_i   [MM],
  input  logic [N-1:0] b_i   [MM],
  input  logic [N-1:0] acc_i [MM],
  output logic         out_valid_o,
  output logic [N+1:0] r_o   [MM]
);

  localparam int unsigned CW  = 2 * N + $clog2(2 * MM) + 2;  // column width
  localparam int unsigned CBW = (C > 1) ? $clog2(C + 1) : 1;  // bits of C

  localparam int unsigned HW  = CW - N;                       // upper-half width

  logic [N+1:0] r_d [MM];

  // One carry-delayed reduction round on the two-row column {x, y}:
  // returns two rows whose sum is congruent mod p and below 2^CW.
  function automatic logic [2*CW-1:0] cda_round(input logic [CW-1:0] x,
                                                input logic [CW-1:0] y);
    logic [HW-1:0] hs, hc, t;
    logic [HW:0]   d;
    logic [CW-1:0] u, v, row;
    hs = x[CW-1:N];
    hc = y[CW-1:N];
    t  = hs ^ hc;                    // half-adder sums
    d  = {hs & hc, 1'b0};            // half-adder carries, one place up
    u  = CW'(x[N-1:0]);
    v  = CW'(y[N-1:0]);
    for (int unsigned i = 0; i < HW; i++) begin
      row = ((t[i] ? CW'(C[CBW-1:0]) : '0) | (d[i+1] ? CW'(C[CBW-1:0]) << 1 : '0)) << i;
      if (i % 2 == 0) u = u + row;
      else            v = v + row;
    end
    return {u, v};
  endfunction

  always_comb begin
    for (int unsigned t = 0; t < MM; t++) begin
      logic [CW-1:0]   col0, col1, r1;
      logic [2*CW-1:0] pr;
      // Merged column: products with even i in one row, odd i in the other.
      col0 = CW'(acc_i[t]);
      col1 = '0;
      for (int unsigned i = 0; i < MM; i++) begin
        for (int unsigned j = 0; j < MM; j++) begin
          if (i + j == t || i + j == t + MM) begin
            r1 = CW'(a_i[i]) * CW'(b_i[j]);
            if (i + j != t) r1 = r1 << 1;          // z^MM == 2
            if (i % 2 == 0) col0 = col0 + r1;
            else            col1 = col1 + r1;
          end
        end
      end
      // Round 1 and round 2 of subfield reduction: 2^N == C (mod p).
      if (CDA) begin
        pr = cda_round(col0, col1);
        pr = cda_round(pr[2*CW-1:CW], pr[CW-1:0]);
        r1 = pr[2*CW-1:CW] + pr[CW-1:0];
      end else begin
        r1 = col0 + col1;
        r1 = CW'(r1[N-1:0]) + CW'(r1[CW-1:N]) * CW'(C[CBW-1:0]);
        r1 = CW'(r1[N-1:0]) + CW'(r1[CW-1:N]) * CW'(C[CBW-1:0]);
      end
      r_d[t] = r1[N+1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      for (int unsigned t = 0; t < MM; t++) r_o[t] <= '0;
    end else begin
      out_valid_o <= in_valid_i;
      if (in_valid_i) r_o <= r_d;
    end
  end

  initial assert (2 * CBW + $clog2(MM) + 1 <= N)
    else $error("gfpm_merged_mac: field parameters outside the supported class");

endmodule
