// gf2m_vmac: scalar/vector multiply-accumulate over GF(2^m).
//
// Scalar mode (vec_i = 0): r = c + a*b mod p(z), p(z) = z^M + f(z), one
// GF(2^M) operation. Vector mode (vec_i = 1): the operands are two packed
// halves and the unit does two independent GF(2^(M/2)) multiply-accumulates,
// lane L in bits [M/2-1:0] modulo z^(M/2) + f_lo(z) and lane H in bits
// [M-1:M/2] modulo z^(M/2) + f_hi(z). In scalar mode f_lo_i gives f(z).
// f(z) is an input, not fixed: f_x_i[i] is the coefficient of z^(i+1), the
// constant term is always one, and deg f <= K.
//
// One M x M AND array forms the bit products and a column-wise XOR tree adds
// them together with c. In vector mode the cross products a_lo*b_hi and
// a_hi*b_lo are masked to zero, so lane L occupies columns 0..M-2 of the
// same array and lane H columns M..2M-2 (its accumulator half is steered
// there). Polynomial reduction uses z^(m+i) == z^i f(z): every bit of degree
// m+i ANDs with f(z) and becomes a row shifted by i, and the rows are XORed
// column-wise; a second, much smaller round of the same kind removes what
// the first one pushed back above degree m-1. Two rounds suffice because
// K < M/4 (checked at elaboration). The shared, masked product array and the
// two-round reduction follow the source design. The reduction arrays of the
// two modes are written as separate arrays selected by the mode, which is
// this implementation's own arrangement of the mode-dependent multiplexing.
//
// Timing: combinational datapath, result registered, out_valid_o one clock
// after in_valid_i.
module gf2m_vmac #(
  parameter int unsigned M = 256,
  parameter int unsigned K = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid_i,
  input  logic         vec_i,
  input  logic [M-1:0] a_i,
  input  logic [M-1:0] b_i,
  input  logic [M-1:0] c_i,
  input  logic [K-1:0] f_lo_i,
  input  logic [K-1:0] f_hi_i,
  output logic         out_valid_o,
  output logic [M-1:0] r_o
);

  localparam int unsigned HM = M / 2;

  // Two rounds of reduction of a degree 2M-2 polynomial by z^M + f.
  function automatic logic [M-1:0] reduce_full(logic [2*M-2:0] x, logic [K:0] ff);
    logic [M+K-2:0] e;
    logic [M-1:0]   g;
    e = (M+K-1)'(x[M-1:0]);
    for (int unsigned i = 0; i + 1 < M; i++)
      if (x[M+i]) e ^= (M+K-1)'(ff) << i;
    g = e[M-1:0];
    for (int unsigned i = 0; i + 1 < K; i++)
      if (e[M+i]) g ^= M'(ff) << i;
    return g;
  endfunction

  // Two rounds of reduction of a degree M-2 polynomial by z^(M/2) + f.
  function automatic logic [HM-1:0] reduce_half(logic [M-2:0] x, logic [K:0] ff);
    logic [HM+K-2:0] e;
    logic [HM-1:0]   g;
    e = (HM+K-1)'(x[HM-1:0]);
    for (int unsigned i = 0; i + 1 < HM; i++)
      if (x[HM+i]) e ^= (HM+K-1)'(ff) << i;
    g = e[HM-1:0];
    for (int unsigned i = 0; i + 1 < K; i++)
      if (e[HM+i]) g ^= HM'(ff) << i;
    return g;
  endfunction

  logic [2*M-2:0] d;      // multiply-accumulate array output, before reduction
  logic [M-1:0]   r_d;

  // Bit-product rows: row i is a_i AND b, shifted by i. In vector mode the
  // mask keeps only b's own-lane half, which removes the cross products.
  logic [2*M-2:0] pp [M];
  logic [M-1:0]   lane_lo, lane_hi;
  assign lane_lo = vec_i ? {{HM{1'b0}}, {HM{1'b1}}} : '1;
  assign lane_hi = vec_i ? {{HM{1'b1}}, {HM{1'b0}}} : '1;
  for (genvar i = 0; i < M; i++) begin : g_pp
    logic [M-1:0] row;
    assign row   = a_i[i] ? (b_i & ((i < HM) ? lane_lo : lane_hi)) : '0;
    assign pp[i] = {{(M-1){1'b0}}, row} << i;
  end

  always_comb begin
    // Column-wise XOR of all bit-product rows.
    d = '0;
    for (int unsigned i = 0; i < M; i++) d ^= pp[i];
    // Accumulator: its upper half moves to column M in vector mode.
    d[HM-1:0] ^= c_i[HM-1:0];
    if (vec_i) d[M+HM-1:M] ^= c_i[M-1:HM];
    else       d[M-1:HM]   ^= c_i[M-1:HM];

    if (vec_i)
      r_d = {reduce_half(d[2*M-2:M], {f_hi_i, 1'b1}), reduce_half(d[M-2:0], {f_lo_i, 1'b1})};
    else
      r_d = reduce_full(d, {f_lo_i, 1'b1});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      r_o         <= '0;
    end else begin
      out_valid_o <= in_valid_i;
      if (in_valid_i) r_o <= r_d;
    end
  end

  initial assert ((M % 2 == 0) && (4 * K < M))
    else $error("gf2m_vmac: need even M and K < M/4");

endmodule
