// pmm_impl1: parallel Montgomery multiplier, Implementation I.
//
// Computes R with R == A * B * 2^-J (mod M) in one pass through a
// Montgomery-reducing modified Wallace tree, J = pmm_pkg::tree_halvings(K).
// The n x n bit-product array is split at column N. The N rows of its lower
// half (a_i AND B, shifted by i, truncated to N bits) enter the summation
// array unchanged. Every one of the N(N-1)/2 dots of the upper half, at
// column N+d, becomes a row of its own: the table entry 2^(N+d) mod M if the
// dot is one, zero otherwise. The summation array thus has K = N(N+1)/2 rows,
// each below 2^N, and mont_tree reduces it to a sum/carry pair that one
// carry-propagate adder turns into R < 2^(N+2). R is congruent to the
// Montgomery product but is not fully reduced below M.
//
// Table: N-1 entries, entry d holds 2^(N+d) mod M, written through lut_*.
// Timing: the datapath is combinational from a_i/b_i/m_i; the result is
// registered, so out_valid_o follows in_valid_i by one clock. M must be odd.
// The summation array and tree follow the source design; the table write
// port and the single output register are choices of this implementation.
module pmm_impl1 #(
  parameter int unsigned N = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      lut_we_i,
  input  logic [$clog2(N-1)-1:0]    lut_addr_i,
  input  logic [N-1:0]              lut_data_i,
  input  logic                      in_valid_i,
  input  logic [N-1:0]              a_i,
  input  logic [N-1:0]              b_i,
  input  logic [N-1:0]              m_i,
  output logic                      out_valid_o,
  output logic [N+1:0]              r_o
);

  localparam int unsigned K    = N * (N + 1) / 2;
  localparam int unsigned NLUT = N - 1;
  localparam int unsigned MEXP = pmm_pkg::tree_halvings(K);

  logic [N-1:0] lut [NLUT];
  pmm_lut #(.N(N), .ENTRIES(NLUT), .AW($clog2(N-1))) u_lut (
    .clk, .rst_n, .we_i(lut_we_i), .addr_i(lut_addr_i), .data_i(lut_data_i),
    .entries_o(lut)
  );

  logic [N-1:0] rows [K];

  // Lower half of the bit-product array: one row per multiplier bit.
  for (genvar i = 0; i < N; i++) begin : g_low
    assign rows[i] = a_i[i] ? (b_i << i) : '0;
  end

  // Upper half: dot a_i*b_j (i+j >= N) selects table row 2^(i+j) mod M.
  for (genvar i = 1; i < N; i++) begin : g_up_i
    for (genvar j = N - i; j < N; j++) begin : g_up_j
      localparam int unsigned IDX = N + i * (i - 1) / 2 + (j - (N - i));
      assign rows[IDX] = (a_i[i] & b_i[j]) ? lut[i + j - N] : '0;
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

  initial assert (MEXP > 0 && N >= 4) else $error("pmm_impl1: N too small");

endmodule
