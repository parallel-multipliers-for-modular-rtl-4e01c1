// modmul_top: the parallel modular multipliers side by side.
//
// Three independent arithmetic units share only clock and reset:
//  * GF(p): the four parallel Montgomery multiplier variants (pmm_impl1..4)
//    on common operands A, B and odd modulus M. Each returns a value
//    congruent to A*B*2^-J mod M for its own exponent J, one clock after
//    pmm_valid_i. Each has its own residue table, loaded one entry per clock
//    through lut_we_i/lut_sel_i/lut_addr_i/lut_data_i; lut_sel_i picks the
//    variant (0..3 for Implementations I..IV).
//  * GF(p^m): the merged-arithmetic multiply-accumulate unit for the special
//    optimal extension field p = 2^GFP_N - GFP_C, f(z) = z^GFP_M - 2.
//  * GF(p^m), digit-serial: the same field arithmetic with a(z) taken
//    GFD_D coefficients per clock (gfpm_digit_mac), start/busy/done
//    handshake, ceil(GFP_M/GFD_D) digit steps per multiplication.
//  * GF(2^m): the scalar/vector multiply-accumulate unit, one GF(2^GF2_M)
//    or two GF(2^(GF2_M/2)) operations per clock selected by gf2_vec_i.
// All results are registered; the parallel units have a one-clock latency
// and accept a new operation every clock. The grouping into one top is only a
// convenient packaging of the separate units.
module modmul_top #(
  parameter int unsigned PMM_N = 32,
  parameter int unsigned GFP_N = 13,
  parameter int unsigned GFP_C = 1,
  parameter int unsigned GFP_M = 13,
  parameter int unsigned GFD_D = 4,
  parameter int unsigned GF2_M = 256,
  parameter int unsigned GF2_K = 11
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // GF(p) parallel Montgomery multipliers
  input  logic                       lut_we_i,
  input  logic [1:0]                 lut_sel_i,
  input  logic [$clog2(PMM_N+2)-1:0] lut_addr_i,
  input  logic [PMM_N-1:0]           lut_data_i,
  input  logic                       pmm_valid_i,
  input  logic [PMM_N-1:0]           pmm_a_i,
  input  logic [PMM_N-1:0]           pmm_b_i,
  input  logic [PMM_N-1:0]           pmm_m_i,
  output logic [3:0]                 pmm_valid_o,
  output logic [PMM_N+1:0]           pmm_r1_o,
  output logic [PMM_N+1:0]           pmm_r2_o,
  output logic [PMM_N+3:0]           pmm_r3_o,
  output logic [PMM_N+3:0]           pmm_r4_o,
  // GF(p^m) merged-arithmetic multiply-accumulate
  input  logic                       gfp_valid_i,
  input  logic [GFP_N-1:0]           gfp_a_i   [GFP_M],
  input  logic [GFP_N-1:0]           gfp_b_i   [GFP_M],
  input  logic [GFP_N-1:0]           gfp_acc_i [GFP_M],
  output logic                       gfp_valid_o,
  output logic [GFP_N+1:0]           gfp_r_o   [GFP_M],
  // GF(p^m) digit-serial merged multiplier
  input  logic                       gfd_start_i,
  input  logic [GFP_N-1:0]           gfd_a_i   [GFP_M],
  input  logic [GFP_N-1:0]           gfd_b_i   [GFP_M],
  output logic                       gfd_busy_o,
  output logic                       gfd_done_o,
  output logic [GFP_N+1:0]           gfd_r_o   [GFP_M],
  // GF(2^m) scalar/vector multiply-accumulate
  input  logic                       gf2_valid_i,
  input  logic                       gf2_vec_i,
  input  logic [GF2_M-1:0]           gf2_a_i,
  input  logic [GF2_M-1:0]           gf2_b_i,
  input  logic [GF2_M-1:0]           gf2_c_i,
  input  logic [GF2_K-1:0]           gf2_f_lo_i,
  input  logic [GF2_K-1:0]           gf2_f_hi_i,
  output logic                       gf2_valid_o,
  output logic [GF2_M-1:0]           gf2_r_o
);

  localparam int unsigned AW = $clog2(PMM_N + 2);
  localparam int unsigned AW1 = $clog2(PMM_N - 1);
  localparam int unsigned AW2 = $clog2((PMM_N - 2) / 2 + 1);
  localparam int unsigned AW4 = $clog2((PMM_N + 3) / 2);

  logic [3:0] we;
  always_comb begin
    we = '0;
    we[lut_sel_i] = lut_we_i;
  end

  pmm_impl1 #(.N(PMM_N)) u_pmm1 (
    .clk, .rst_n, .lut_we_i(we[0]), .lut_addr_i(lut_addr_i[AW1-1:0]), .lut_data_i(lut_data_i),
    .in_valid_i(pmm_valid_i), .a_i(pmm_a_i), .b_i(pmm_b_i), .m_i(pmm_m_i),
    .out_valid_o(pmm_valid_o[0]), .r_o(pmm_r1_o)
  );
  pmm_impl2 #(.N(PMM_N)) u_pmm2 (
    .clk, .rst_n, .lut_we_i(we[1]), .lut_addr_i(lut_addr_i[AW2-1:0]), .lut_data_i(lut_data_i),
    .in_valid_i(pmm_valid_i), .a_i(pmm_a_i), .b_i(pmm_b_i), .m_i(pmm_m_i),
    .out_valid_o(pmm_valid_o[1]), .r_o(pmm_r2_o)
  );
  pmm_impl3 #(.N(PMM_N)) u_pmm3 (
    .clk, .rst_n, .lut_we_i(we[2]), .lut_addr_i(lut_addr_i[AW-1:0]), .lut_data_i(lut_data_i),
    .in_valid_i(pmm_valid_i), .a_i(pmm_a_i), .b_i(pmm_b_i), .m_i(pmm_m_i),
    .out_valid_o(pmm_valid_o[2]), .r_o(pmm_r3_o)
  );
  pmm_impl4 #(.N(PMM_N)) u_pmm4 (
    .clk, .rst_n, .lut_we_i(we[3]), .lut_addr_i(lut_addr_i[AW4-1:0]), .lut_data_i(lut_data_i),
    .in_valid_i(pmm_valid_i), .a_i(pmm_a_i), .b_i(pmm_b_i), .m_i(pmm_m_i),
    .out_valid_o(pmm_valid_o[3]), .r_o(pmm_r4_o)
  );

  gfpm_merged_mac #(.N(GFP_N), .C(GFP_C), .MM(GFP_M)) u_gfp (
    .clk, .rst_n, .in_valid_i(gfp_valid_i), .a_i(gfp_a_i), .b_i(gfp_b_i), .acc_i(gfp_acc_i),
    .out_valid_o(gfp_valid_o), .r_o(gfp_r_o)
  );

  gfpm_digit_mac #(.N(GFP_N), .C(GFP_C), .MM(GFP_M), .D(GFD_D)) u_gfd (
    .clk, .rst_n, .start_i(gfd_start_i), .a_i(gfd_a_i), .b_i(gfd_b_i),
    .busy_o(gfd_busy_o), .done_o(gfd_done_o), .r_o(gfd_r_o)
  );

  gf2m_vmac #(.M(GF2_M), .K(GF2_K)) u_gf2 (
    .clk, .rst_n, .in_valid_i(gf2_valid_i), .vec_i(gf2_vec_i), .a_i(gf2_a_i), .b_i(gf2_b_i),
    .c_i(gf2_c_i), .f_lo_i(gf2_f_lo_i), .f_hi_i(gf2_f_hi_i),
    .out_valid_o(gf2_valid_o), .r_o(gf2_r_o)
  );

endmodule
