// pmm_check: drives one parallel Montgomery multiplier variant (IMPL = 1..4)
// at operand width N, for testbenches that run several variants or sizes.
//
// After start_i it loads the variant's residue table with values computed
// here by repeated doubling mod M, runs NOPS random multiplications (plus 0,
// 1 and M-1) for each of NMOD random odd moduli with the top bit set, and
// checks (R * 2^J) mod M == A*B mod M and the one-clock latency, with J
// recomputed here from the tree's grouping rule. Counts appear on
// checks_o/failures_o when done_o rises.
module pmm_check #(
  parameter int unsigned IMPL = 3,
  parameter int unsigned N    = 160,
  parameter int unsigned NMOD = 2,
  parameter int unsigned NOPS = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int unsigned RW   = (IMPL <= 2) ? N + 2 : N + 4;
  localparam int unsigned NLUT = (IMPL == 1) ? N - 1 : (IMPL == 2) ? (N - 2) / 2 + 1 :
                                 (IMPL == 3) ? N + 2 : (N + 3) / 2;
  localparam int unsigned AW   = $clog2(NLUT);
  typedef logic [3*N+15:0] wide_t;

  logic lut_we = 1'b0;
  logic [AW-1:0] lut_addr = '0;
  logic [N-1:0] lut_data = '0;
  logic in_valid = 1'b0;
  logic [N-1:0] a = '0, b = '0, m = '0;
  logic out_valid;
  logic [RW-1:0] r;
  int checks = 0, failures = 0;
  assign checks_o = checks;
  assign failures_o = failures;

  if (IMPL == 1) begin : g_i1
    logic [N+1:0] rr;
    pmm_impl1 #(.N(N)) dut (.clk, .rst_n, .lut_we_i(lut_we), .lut_addr_i(lut_addr), .lut_data_i(lut_data),
      .in_valid_i(in_valid), .a_i(a), .b_i(b), .m_i(m), .out_valid_o(out_valid), .r_o(rr));
    assign r = RW'(rr);
  end else if (IMPL == 2) begin : g_i2
    logic [N+1:0] rr;
    pmm_impl2 #(.N(N)) dut (.clk, .rst_n, .lut_we_i(lut_we), .lut_addr_i(lut_addr), .lut_data_i(lut_data),
      .in_valid_i(in_valid), .a_i(a), .b_i(b), .m_i(m), .out_valid_o(out_valid), .r_o(rr));
    assign r = RW'(rr);
  end else if (IMPL == 3) begin : g_i3
    pmm_impl3 #(.N(N)) dut (.clk, .rst_n, .lut_we_i(lut_we), .lut_addr_i(lut_addr), .lut_data_i(lut_data),
      .in_valid_i(in_valid), .a_i(a), .b_i(b), .m_i(m), .out_valid_o(out_valid), .r_o(r));
  end else begin : g_i4
    pmm_impl4 #(.N(N)) dut (.clk, .rst_n, .lut_we_i(lut_we), .lut_addr_i(lut_addr), .lut_data_i(lut_data),
      .in_valid_i(in_valid), .a_i(a), .b_i(b), .m_i(m), .out_valid_o(out_valid), .r_o(r));
  end


  // Independent model of the tree's row counts.
  function automatic int unsigned nxt(int unsigned h);
    if (h <= 2) return h;
    if (h <= 4) return h - 1;
    return 2 * (h / 3) + ((h % 3) != 0 ? 2 : 0);
  endfunction
  function automatic int unsigned halv(int unsigned h);
    int unsigned j = 0;
    while (h > 4) begin h = nxt(h); j++; end
    return j;
  endfunction
  // Height of the Implementation II array, counted dot by dot.
  function automatic int unsigned impl2_rows();
    int unsigned k = N;
    for (int unsigned c = N; c <= 2*N-2; c++) begin
      int unsigned dots = 2*N - 1 - c;
      k += ((c - N) % 2 == 0) ? dots : 2 * dots;
    end
    return k;
  endfunction
  function automatic wide_t pow2mod(int unsigned e, logic [N-1:0] mm);
    wide_t x = 1;
    for (int unsigned i = 0; i < e; i++) x = (x * 2) % wide_t'(mm);
    return x;
  endfunction

  localparam int unsigned J = (IMPL == 1) ? halv(N*(N+1)/2) : (IMPL == 2) ? halv(impl2_rows()) :
                             (IMPL == 3) ? halv(N) + halv(2*(N+2)+2) : halv(N) + halv(6*((N+3)/2)+2);

  function automatic int unsigned lut_exp(int unsigned e);
    int unsigned sh = N + halv(N - 1) - halv(N);
    case (IMPL)
      1: return N + e;
      2: return N + 2 * e;
      3: return sh + e;
      default: return sh + 2 * e;
    endcase
  endfunction

  task automatic load_lut();
    for (int unsigned e = 0; e < NLUT; e++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_addr = AW'(e); lut_data = N'(pow2mod(lut_exp(e), m));
    end
    @(negedge clk);
    lut_we = 1'b0;
  endtask

  task automatic run_op(logic [N-1:0] aa, logic [N-1:0] bb);
    wide_t lhs, rhs;
    @(negedge clk);
    a = aa; b = bb; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL: out_valid not high one clock after in_valid");
    end
    lhs = (wide_t'(r) * pow2mod(J, m)) % wide_t'(m);
    rhs = (wide_t'(aa) * wide_t'(bb)) % wide_t'(m);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL: A=%h B=%h M=%h R=%h: R*2^%0d mod M = %h, want %h", aa, bb, m, r, J, lhs, rhs);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL: out_valid held high without a new in_valid");
    end
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N+31:0] x;
    for (int unsigned i = 0; i < N / 32 + 1; i++) x[32*i +: 32] = $urandom;
    return N'(x);
  endfunction
  function automatic logic [N-1:0] rand_below(logic [N-1:0] lim);
    return N'({rnd(), rnd()} % {{N{1'b0}}, lim});
  endfunction

  initial begin
    done_o = 1'b0;
    wait (start_i);
    for (int unsigned t = 0; t < NMOD; t++) begin
      m = rnd() | N'(1) | (N'(1) << (N - 1));
      if (t == 0) m = '1;
      load_lut();
      run_op('0, rand_below(m));
      run_op(N'(1), N'(1));
      run_op(m - 1, m - 1);
      for (int unsigned k = 0; k < NOPS; k++) run_op(rand_below(m), rand_below(m));
    end
    done_o = 1'b1;
  end
endmodule
