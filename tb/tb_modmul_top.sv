// tb_modmul_top: end-to-end testbench of modmul_top at its default sizes.
//
// GF(p): for several random odd 32-bit moduli it loads the residue tables of
// all four Montgomery multiplier variants through the shared table port,
// then issues back-to-back multiplications (one per clock) and checks each
// variant's result R against (R * 2^J) mod M == A*B mod M, with every J and
// every table entry computed here from first principles.
// GF(p^m): back-to-back multiply-accumulates in GF((2^13-1)^13), checked
// coefficient by coefficient against schoolbook arithmetic with z^13 = 2.
// GF(p^m) digit-serial: multiplications in the same field with 4-coefficient
// digits, checked the same way, with the 1 + ceil(13/4) clock latency.
// GF(2^m): interleaved scalar GF(2^256) and vector 2 x GF(2^128) operations,
// checked against a bit-serial reference.
// It counts table loads, operations of each unit, vector operations and
// mode switches, and fails if any of them never happened. Results must
// arrive one clock after the operation is issued.
module tb_modmul_top;
  localparam int unsigned N  = 32;
  localparam int unsigned PN = 13, PC = 1, PM = 13;
  localparam int unsigned GM = 256, GK = 11, GH = GM / 2;
  localparam int unsigned AW = $clog2(N + 2);
  typedef logic [3*N+15:0] wide_t;
  typedef logic [2*PN+15:0] pwide_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lut_we = 1'b0;
  logic [1:0] lut_sel = '0;
  logic [AW-1:0] lut_addr = '0;
  logic [N-1:0] lut_data = '0;
  logic pmm_valid = 1'b0;
  logic [N-1:0] pa = '0, pb = '0, pm = '0;
  logic [3:0] pmm_vo;
  logic [N+1:0] r1, r2;
  logic [N+3:0] r3, r4;
  logic gfp_valid = 1'b0, gfp_vo;
  logic [PN-1:0] ga [PM], gb [PM], gacc [PM];
  logic [PN+1:0] gr [PM];
  logic gfd_start = 1'b0, gfd_busy, gfd_done;
  logic [PN-1:0] da [PM], db [PM];
  logic [PN+1:0] dr [PM];
  localparam int unsigned GD = 4, GND = (PM + GD - 1) / GD;
  logic gf2_valid = 1'b0, gf2_vec = 1'b0, gf2_vo;
  logic [GM-1:0] xa = '0, xb = '0, xc = '0, xr;
  logic [GK-1:0] xf_lo = '0, xf_hi = '0;

  int checks = 0, failures = 0;
  int n_lut = 0, n_pmm = 0, n_gfp = 0, n_gfd = 0, n_scalar = 0, n_vector = 0, n_switch = 0;

  modmul_top dut (
    .clk, .rst_n,
    .lut_we_i(lut_we), .lut_sel_i(lut_sel), .lut_addr_i(lut_addr), .lut_data_i(lut_data),
    .pmm_valid_i(pmm_valid), .pmm_a_i(pa), .pmm_b_i(pb), .pmm_m_i(pm),
    .pmm_valid_o(pmm_vo), .pmm_r1_o(r1), .pmm_r2_o(r2), .pmm_r3_o(r3), .pmm_r4_o(r4),
    .gfp_valid_i(gfp_valid), .gfp_a_i(ga), .gfp_b_i(gb), .gfp_acc_i(gacc),
    .gfp_valid_o(gfp_vo), .gfp_r_o(gr),
    .gfd_start_i(gfd_start), .gfd_a_i(da), .gfd_b_i(db), .gfd_busy_o(gfd_busy),
    .gfd_done_o(gfd_done), .gfd_r_o(dr),
    .gf2_valid_i(gf2_valid), .gf2_vec_i(gf2_vec), .gf2_a_i(xa), .gf2_b_i(xb), .gf2_c_i(xc),
    .gf2_f_lo_i(xf_lo), .gf2_f_hi_i(xf_hi), .gf2_valid_o(gf2_vo), .gf2_r_o(xr)
  );

  always #5 clk = ~clk;

  // ---------------- GF(p) reference ----------------
  function automatic int unsigned halv(int unsigned h);
    int unsigned j = 0;
    while (h > 4) begin h = 2 * (h / 3) + ((h % 3) != 0 ? 2 : 0); j++; end
    return j;
  endfunction
  function automatic int unsigned impl2_rows();
    int unsigned k = N;
    for (int unsigned c = N; c <= 2*N-2; c++) k += ((c - N) % 2 == 0) ? (2*N-1-c) : 2*(2*N-1-c);
    return k;
  endfunction
  function automatic wide_t pow2mod(int unsigned e, logic [N-1:0] mm);
    wide_t x = 1;
    for (int unsigned i = 0; i < e; i++) x = (x * 2) % wide_t'(mm);
    return x;
  endfunction
  int unsigned jv [4];
  int unsigned nlut [4];
  function automatic int unsigned lut_exp(int unsigned v, int unsigned e);
    int unsigned sh = N + halv(N - 1) - halv(N);
    case (v)
      0: return N + e;
      1: return N + 2 * e;
      2: return sh + e;
      default: return sh + 2 * e;
    endcase
  endfunction

  task automatic load_tables();
    for (int unsigned v = 0; v < 4; v++) begin
      for (int unsigned e = 0; e < nlut[v]; e++) begin
        @(negedge clk);
        lut_we = 1'b1; lut_sel = 2'(v); lut_addr = AW'(e);
        lut_data = N'(pow2mod(lut_exp(v, e), pm));
      end
      n_lut++;
    end
    @(negedge clk);
    lut_we = 1'b0;
  endtask

  function automatic logic [N-1:0] rand_below(logic [N-1:0] lim);
    return N'({$urandom, $urandom} % {32'b0, lim});
  endfunction

  // Issue NOPS multiplications back to back and check each one a clock later.
  task automatic pmm_burst(int unsigned nops);
    logic [N-1:0] qa, qb;
    logic have = 1'b0;
    for (int unsigned k = 0; k <= nops; k++) begin
      @(negedge clk);
      if (have) begin
        wide_t want = (wide_t'(qa) * wide_t'(qb)) % wide_t'(pm);
        wide_t got [4];
        got[0] = wide_t'(r1); got[1] = wide_t'(r2); got[2] = wide_t'(r3); got[3] = wide_t'(r4);
        checks++;
        if (pmm_vo != 4'hf) begin failures++; $display("FAIL: PMM valid %b", pmm_vo); end
        for (int unsigned v = 0; v < 4; v++) begin
          checks++;
          if ((got[v] * pow2mod(jv[v], pm)) % wide_t'(pm) != want) begin
            failures++;
            $display("FAIL: PMM variant %0d A=%h B=%h M=%h R=%h", v + 1, qa, qb, pm, got[v]);
          end
        end
        n_pmm++;
      end
      if (k < nops) begin
        qa = rand_below(pm); qb = rand_below(pm);
        if (k == 0) begin qa = pm - 1; qb = pm - 1; end
        pa = qa; pb = qb; pmm_valid = 1'b1; have = 1'b1;
      end else begin
        pmm_valid = 1'b0;
      end
    end
  endtask

  // ---------------- GF(p^m) reference ----------------
  localparam pwide_t P = (pwide_t'(1) << PN) - pwide_t'(PC);
  task automatic gfp_op();
    pwide_t want [PM];
    pwide_t pr;
    @(negedge clk);
    for (int unsigned t = 0; t < PM; t++) begin
      ga[t] = PN'($urandom); gb[t] = PN'($urandom); gacc[t] = PN'($urandom);
      want[t] = pwide_t'(gacc[t]) % P;
    end
    for (int unsigned i = 0; i < PM; i++)
      for (int unsigned j = 0; j < PM; j++) begin
        pr = (pwide_t'(ga[i]) * pwide_t'(gb[j])) % P;
        if (i + j < PM) want[i+j] = (want[i+j] + pr) % P;
        else            want[i+j-PM] = (want[i+j-PM] + 2 * pr) % P;
      end
    gfp_valid = 1'b1;
    @(negedge clk);
    gfp_valid = 1'b0;
    checks++;
    if (!gfp_vo) begin failures++; $display("FAIL: GF(p^m) valid"); end
    for (int unsigned t = 0; t < PM; t++) begin
      checks++;
      if (pwide_t'(gr[t]) % P != want[t]) begin
        failures++;
        $display("FAIL: GF(p^m) coefficient %0d: %h", t, gr[t]);
      end
    end
    n_gfp++;
  endtask

  task automatic gfd_op();
    pwide_t want [PM];
    pwide_t pr;
    int unsigned cycles = 0;
    @(negedge clk);
    for (int unsigned t = 0; t < PM; t++) begin
      da[t] = PN'($urandom); db[t] = PN'($urandom); want[t] = '0;
    end
    for (int unsigned i = 0; i < PM; i++)
      for (int unsigned j = 0; j < PM; j++) begin
        pr = (pwide_t'(da[i]) * pwide_t'(db[j])) % P;
        if (i + j < PM) want[i+j] = (want[i+j] + pr) % P;
        else            want[i+j-PM] = (want[i+j-PM] + 2 * pr) % P;
      end
    gfd_start = 1'b1;
    do begin
      @(negedge clk);
      gfd_start = 1'b0;
      cycles++;
    end while (!gfd_done && cycles < 100);
    checks++;
    if (cycles != GND + 1) begin
      failures++;
      $display("FAIL: digit-serial done after %0d clocks, want %0d", cycles, GND + 1);
    end
    for (int unsigned t = 0; t < PM; t++) begin
      checks++;
      if (pwide_t'(dr[t]) % P != want[t]) begin
        failures++;
        $display("FAIL: digit-serial coefficient %0d: %h", t, dr[t]);
      end
    end
    n_gfd++;
  endtask

  // ---------------- GF(2^m) reference ----------------
  function automatic logic [GM-1:0] ref_mac(logic [GM-1:0] a, logic [GM-1:0] b, logic [GM-1:0] c,
                                            logic [GK-1:0] f, int unsigned mm);
    logic [GM:0] acc = '0;
    for (int i = int'(mm) - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc[mm]) begin acc[mm] = 1'b0; acc ^= (GM+1)'({f, 1'b1}); end
      if (b[i]) acc ^= (GM+1)'(a);
    end
    return acc[GM-1:0] ^ c;
  endfunction
  function automatic logic [GM-1:0] rnd256();
    logic [GM-1:0] x;
    for (int unsigned i = 0; i < GM / 32; i++) x[32*i +: 32] = $urandom;
    return x;
  endfunction
  task automatic gf2_op(logic v);
    logic [GM-1:0] want;
    @(negedge clk);
    if (v != gf2_vec) n_switch++;
    gf2_vec = v;
    xa = rnd256(); xb = rnd256(); xc = rnd256();
    xf_lo = GK'($urandom); xf_hi = GK'($urandom);
    if (v) begin
      want[GH-1:0] = ref_mac(GM'(xa[GH-1:0]), GM'(xb[GH-1:0]), GM'(xc[GH-1:0]), xf_lo, GH)[GH-1:0];
      want[GM-1:GH] = ref_mac(GM'(xa[GM-1:GH]), GM'(xb[GM-1:GH]), GM'(xc[GM-1:GH]), xf_hi, GH)[GH-1:0];
      n_vector++;
    end else begin
      want = ref_mac(xa, xb, xc, xf_lo, GM);
      n_scalar++;
    end
    gf2_valid = 1'b1;
    @(negedge clk);
    gf2_valid = 1'b0;
    checks++;
    if (!gf2_vo || xr !== want) begin
      failures++;
      $display("FAIL: GF(2^m) vec=%0d r=%h want=%h", v, xr, want);
    end
  endtask

  initial begin
    for (int unsigned t = 0; t < PM; t++) begin
      ga[t] = '0; gb[t] = '0; gacc[t] = '0; da[t] = '0; db[t] = '0;
    end
    jv[0] = halv(N * (N + 1) / 2);
    jv[1] = halv(impl2_rows());
    jv[2] = halv(N) + halv(2 * (N + 2) + 2);
    jv[3] = halv(N) + halv(6 * ((N + 3) / 2) + 2);
    nlut[0] = N - 1; nlut[1] = (N - 2) / 2 + 1; nlut[2] = N + 2; nlut[3] = (N + 3) / 2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned t = 0; t < 4; t++) begin
      pm = N'({$urandom, $urandom}) | N'(1) | (N'(1) << (N - 1));
      load_tables();
      pmm_burst(40);
      gfp_op();
      gfd_op();
      gf2_op(1'b0);
      gf2_op(1'b1);
      gf2_op(logic'($urandom % 2));
    end
    checks++;
    if (n_lut == 0 || n_pmm == 0 || n_gfp == 0 || n_gfd == 0 || n_scalar == 0 || n_vector == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("table loads %0d, GF(p) ops %0d, GF(p^m) ops %0d, digit-serial ops %0d, GF(2^m) scalar %0d vector %0d switches %0d",
             n_lut, n_pmm, n_gfp, n_gfd, n_scalar, n_vector, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
