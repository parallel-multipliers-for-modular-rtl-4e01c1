// tb_pmm_impl4: self-checking testbench for pmm_impl4.
//
// Implementation IV: table entry t = 2^(N+JL-JR+2t) mod M; J = JR + JF.
// The testbench recomputes the stage heights of the reduction tree itself to
// get the Montgomery exponent J, loads the residue table with values it
// computes by repeated doubling modulo M, then applies random odd moduli
// with their top bit set and random operands below M (plus the corner cases
// 0, 1 and M-1). For each result R it checks R < 2^(result width),
// (R * 2^J) mod M == (A * B) mod M, and that out_valid rises exactly one
// clock after in_valid. A watchdog ends the run if it hangs.
module tb_pmm_impl4;
  localparam int unsigned N    = 32;
  localparam int unsigned RW   = N+4;
  localparam int unsigned NLUT = (N+3)/2;
  localparam int unsigned AW   = $clog2((N+3)/2);
  localparam int unsigned NMOD = 6;
  localparam int unsigned NOPS = 60;

  typedef logic [3*N+15:0] wide_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic lut_we = 1'b0;
  logic [AW-1:0] lut_addr = '0;
  logic [N-1:0] lut_data = '0;
  logic in_valid = 1'b0;
  logic [N-1:0] a = '0, b = '0, m = '0;
  logic out_valid;
  logic [RW-1:0] r;
  int checks = 0, failures = 0;

  pmm_impl4 #(.N(N)) dut (
    .clk, .rst_n, .lut_we_i(lut_we), .lut_addr_i(lut_addr), .lut_data_i(lut_data),
    .in_valid_i(in_valid), .a_i(a), .b_i(b), .m_i(m), .out_valid_o(out_valid), .r_o(r)
  );

  always #5 clk = ~clk;

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

  localparam int unsigned J = halv(N) + halv(6*((N+3)/2)+2);

  task automatic load_lut();
    for (int unsigned e = 0; e < NLUT; e++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_addr = AW'(e); lut_data = N'(pow2mod(N + halv(N-1) - halv(N) + 2*e, m));
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

  function automatic logic [N-1:0] rand_below(logic [N-1:0] lim);
    return N'({$urandom, $urandom} % {32'b0, lim});
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned t = 0; t < NMOD; t++) begin
      m = N'({$urandom, $urandom}) | N'(1) | (N'(1) << (N - 1));
      if (t == 0) m = '1;  // all-ones modulus
      load_lut();
      run_op('0, rand_below(m));
      run_op(N'(1), N'(1));
      run_op(m - 1, m - 1);
      for (int unsigned k = 0; k < NOPS; k++) run_op(rand_below(m), rand_below(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
