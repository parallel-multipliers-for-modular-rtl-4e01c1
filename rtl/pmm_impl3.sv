// pmm_impl3: parallel Montgomery multiplier, Implementation III.
//
// The n x n bit-product array is kept at height N and split at column N.
// The lower half (N rows) and the upper half (N-1 rows, a_i AND B shifted
// right by N-i) are reduced side by side by two mont_tree instances, each
// adding the modulus and dropping zeroed bits as it goes (JR and JL halving
// stages). Each bit p of the two rows left of the upper half then selects a
// table entry 2^(N+JL-JR+p) mod M as a row of a second summation array,
// which also takes the two rows left of the lower half: 2(N+2)+2 rows in
// all. A third mont_tree (JF halving stages) and one carry-propagate adder
// give R < 2^(N+4) with R == A * B * 2^-(JR+JF) (mod M).
//
// Table: N+2 entries, entry p holds 2^(N+JL-JR+p) mod M, where JL, JR and
// JF are pmm_pkg::tree_halvings of N-1, N and 2N+6 rows.
// Timing: combinational datapath, result registered, out_valid_o one clock
// after in_valid_i. M must be odd. The split, the parallel reduction of both
// halves and the second summation array follow the source design. The
// source counts N-bit rows leaving the first trees (2N+2 rows, N entries);
// here they are carried at their full N+2 bits, which costs two more table
// entries, four more rows and a result two bits wider.
module pmm_impl3 #(
  parameter int unsigned N = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      lut_we_i,
  input  logic [$clog2(N+2)-1:0]    lut_addr_i,
  input  logic [N-1:0]              lut_data_i,
  input  logic                      in_valid_i,
  input  logic [N-1:0]              a_i,
  input  logic [N-1:0]              b_i,
  input  logic [N-1:0]              m_i,
  output logic                      out_valid_o,
  output logic [N+3:0]              r_o
);

  localparam int unsigned NLUT = N + 2;
  localparam int unsigned HF   = 2 * (N + 2) + 2;
  localparam int unsigned MEXP = pmm_pkg::tree_halvings(N) + pmm_pkg::tree_halvings(HF);

  logic [N-1:0] lut [NLUT];
  pmm_lut #(.N(N), .ENTRIES(NLUT), .AW($clog2(NLUT))) u_lut (
    .clk, .rst_n, .we_i(lut_we_i), .addr_i(lut_addr_i), .data_i(lut_data_i),
    .entries_o(lut)
  );

  // Lower and upper halves of the bit-product array.
  logic [N-1:0] rows_lo [N];
  logic [N-1:0] rows_hi [N-1];
  for (genvar i = 0; i < N; i++) begin : g_lo
    assign rows_lo[i] = a_i[i] ? (b_i << i) : '0;
  end
  for (genvar i = 1; i < N; i++) begin : g_hi
    assign rows_hi[i-1] = a_i[i] ? (b_i >> (N - i)) : '0;
  end

  logic [N+1:0] sum_lo, carry_lo, sum_hi, carry_hi;
  mont_tree #(.N(N), .W(N), .H(N)) u_tree_lo (
    .rows_i(rows_lo), .m_i(m_i), .sum_o(sum_lo), .carry_o(carry_lo)
  );
  mont_tree #(.N(N), .W(N), .H(N-1)) u_tree_hi (
    .rows_i(rows_hi), .m_i(m_i), .sum_o(sum_hi), .carry_o(carry_hi)
  );

  // Second summation array: the lower pair plus one table row per upper bit.
  logic [N+1:0] rows_f [HF];
  assign rows_f[0] = sum_lo;
  assign rows_f[1] = carry_lo;
  for (genvar p = 0; p < N + 2; p++) begin : g_sel
    assign rows_f[2+p]     = sum_hi[p]   ? {2'b00, lut[p]} : '0;
    assign rows_f[N+4+p]   = carry_hi[p] ? {2'b00, lut[p]} : '0;
  end

  logic [N+3:0] sum, carry;
  mont_tree #(.N(N), .W(N+2), .H(HF)) u_tree_f (
    .rows_i(rows_f), .m_i(m_i), .sum_o(sum), .carry_o(carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      r_o         <= '0;
    end else begin
      out_valid_o <= in_valid_i;
      if (in_valid_i) r_o <= sum + carry;
    end
  end

  initial assert (MEXP > 0 && N >= 4) else $error("pmm_impl3: N too small");

endmodule
