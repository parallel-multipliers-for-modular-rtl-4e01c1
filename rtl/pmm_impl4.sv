// pmm_impl4: parallel Montgomery multiplier, Implementation IV.
//
// Implementation III with a halved residue table. As there, the two halves
// of the N-row bit-product array are reduced side by side by two mont_tree
// instances (JR and JL halving stages). Each of the two rows left of the
// upper half is then cut into bit pairs (2t, 2t+1), and every pair becomes
// three unary bits of weight 2^(2t), (x|y, y, x&y), as in Implementation II.
// Only even bit positions remain, and each unary bit selects the table entry
// 2^(N+JL-JR+2t) mod M as a row of the second summation array, which also
// takes the two rows left of the lower half: 6*ceil((N+2)/2)+2 rows. A third
// mont_tree (JF halving stages) and one carry-propagate adder give
// R < 2^(N+4) with R == A * B * 2^-(JR+JF) (mod M).
//
// Table: ceil((N+2)/2) entries, entry t holds 2^(N+JL-JR+2t) mod M, where
// JL, JR and JF are pmm_pkg::tree_halvings of N-1, N and the second array.
// Timing: combinational datapath, result registered, out_valid_o one clock
// after in_valid_i. M must be odd. The split halves and the pair-to-unary
// step follow the source design. The source counts N-bit rows leaving the
// first trees (3N+2 rows, N/2 entries); here they are carried at their full
// N+2 bits, giving one more table entry, six more rows and a result two bits
// wider.
module pmm_impl4 #(
  parameter int unsigned N = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      lut_we_i,
  input  logic [$clog2((N+3)/2)-1:0] lut_addr_i,
  input  logic [N-1:0]              lut_data_i,
  input  logic                      in_valid_i,
  input  logic [N-1:0]              a_i,
  input  logic [N-1:0]              b_i,
  input  logic [N-1:0]              m_i,
  output logic                      out_valid_o,
  output logic [N+3:0]              r_o
);

  localparam int unsigned NLUT = (N + 3) / 2;
  localparam int unsigned HF   = 6 * NLUT + 2;
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

  // Second summation array: the lower pair plus three table rows per bit
  // pair of each upper row (unary bits x|y, y, x&y).
  logic [N+1:0] rows_f [HF];
  logic [2*NLUT-1:0] up [2];
  assign up[0] = (2*NLUT)'(sum_hi);
  assign up[1] = (2*NLUT)'(carry_hi);
  assign rows_f[0] = sum_lo;
  assign rows_f[1] = carry_lo;
  for (genvar r = 0; r < 2; r++) begin : g_row
    for (genvar t = 0; t < NLUT; t++) begin : g_pair
      logic x, y;
      assign x = up[r][2*t];
      assign y = up[r][2*t+1];
      assign rows_f[2+3*(NLUT*r+t)]   = (x | y) ? {2'b00, lut[t]} : '0;
      assign rows_f[2+3*(NLUT*r+t)+1] = y       ? {2'b00, lut[t]} : '0;
      assign rows_f[2+3*(NLUT*r+t)+2] = (x & y) ? {2'b00, lut[t]} : '0;
    end
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

  initial assert (MEXP > 0 && N >= 4) else $error("pmm_impl4: N too small");

endmodule
