// pmm_impl2: parallel Montgomery multiplier, Implementation II.
//
// Like Implementation I, but the residue table is halved. Upper-half bit
// products are taken in column pairs (N+d, N+d+1) with d even. Each bit y of
// the odd column is paired with a bit x of the even column, and the pair is
// turned into three unary bits of the even column (x|y, y, x&y), whose count
// equals x + 2y: the reverse of a full adder. The one unpaired bit of each
// even column stays as it is. Only even upper columns are then non-zero, so
// the table needs only 2^(N+d) mod M for even d, and each unary bit selects
// one table entry as a summation row. The summation array has
// N + sum(dots(d) + 2*dots(d+1)) rows, about 3N(N+1)/4, and is reduced by
// mont_tree and one carry-propagate adder to R < 2^(N+2) with
// R == A * B * 2^-J (mod M), J = pmm_pkg::tree_halvings(rows).
//
// Table: (N-2)/2+1 entries, entry t holds 2^(N+2t) mod M.
// Timing: combinational datapath, result registered, out_valid_o one clock
// after in_valid_i. M must be odd. The pairing into unary bits follows the
// source design; which bits are paired, the unary encoding and the output
// register are choices of this implementation.
module pmm_impl2 #(
  parameter int unsigned N = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          lut_we_i,
  input  logic [$clog2((N-2)/2+1)-1:0]  lut_addr_i,
  input  logic [N-1:0]                  lut_data_i,
  input  logic                          in_valid_i,
  input  logic [N-1:0]                  a_i,
  input  logic [N-1:0]                  b_i,
  input  logic [N-1:0]                  m_i,
  output logic                          out_valid_o,
  output logic [N+1:0]                  r_o
);

  localparam int unsigned K    = pmm_pkg::impl2_rows(N);
  localparam int unsigned NLUT = (N - 2) / 2 + 1;
  localparam int unsigned MEXP = pmm_pkg::tree_halvings(K);

  logic [N-1:0] lut [NLUT];
  pmm_lut #(.N(N), .ENTRIES(NLUT), .AW($clog2(NLUT))) u_lut (
    .clk, .rst_n, .we_i(lut_we_i), .addr_i(lut_addr_i), .data_i(lut_data_i),
    .entries_o(lut)
  );

  logic [N-1:0] rows [K];

  for (genvar i = 0; i < N; i++) begin : g_low
    assign rows[i] = a_i[i] ? (b_i << i) : '0;
  end

  // Even upper column N+d: dot q is a_(d+1+q) * b_(N-1-q). The odd column
  // N+d+1 has one dot fewer; its dot q is a_(d+2+q) * b_(N-1-q).
  for (genvar d = 0; d <= N - 2; d += 2) begin : g_col
    localparam int unsigned BASE  = pmm_pkg::impl2_col_base(N, d);
    localparam int unsigned CNT   = pmm_pkg::upper_dots(N, d);
    localparam int unsigned PAIRS = pmm_pkg::upper_dots(N, d + 1);
    for (genvar q = 0; q < CNT; q++) begin : g_dot
      logic x;
      assign x = a_i[d+1+q] & b_i[N-1-q];
      if (q < PAIRS) begin : g_pair
        logic y;
        assign y = a_i[d+2+q] & b_i[N-1-q];
        assign rows[BASE+3*q]   = (x | y) ? lut[d/2] : '0;
        assign rows[BASE+3*q+1] = y       ? lut[d/2] : '0;
        assign rows[BASE+3*q+2] = (x & y) ? lut[d/2] : '0;
      end else begin : g_lone
        assign rows[BASE+3*PAIRS+(q-PAIRS)] = x ? lut[d/2] : '0;
      end
    end
  end

  logic [N+1:0] sum, carry;
  mont_tree #(.N(N), .W(N), .H(K)) u_tree (
    .rows_i(rows), .m_i(m_i), .sum_o(sum), .carry_o(carry)
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

  initial assert (MEXP > 0 && N >= 4) else $error("pmm_impl2: N too small");

endmodule
