// tb_gf2m_vmac: self-checking testbench for gf2m_vmac at its default size.
//
// The reference is the bit-serial, most-significant-bit-first shift-and-add
// multiplier (reduce after every left shift), which shares nothing with the
// unit's two-round parallel reduction. Random f(z) of degree up to K are used,
// including the GF(2^8)-style pentanomial shape and f = 1. Scalar and vector
// operations are interleaved, so every mode switch is exercised; the result
// must appear exactly one clock after in_valid.
module tb_gf2m_vmac;
  localparam int unsigned M = 256;
  localparam int unsigned K = 11;
  localparam int unsigned HM = M / 2;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, vec = 1'b0;
  logic [M-1:0] a = '0, b = '0, c = '0;
  logic [K-1:0] f_lo = '0, f_hi = '0;
  logic out_valid;
  logic [M-1:0] r;
  int checks = 0, failures = 0, n_scalar = 0, n_vector = 0, n_switch = 0;

  gf2m_vmac #(.M(M), .K(K)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .vec_i(vec), .a_i(a), .b_i(b), .c_i(c),
    .f_lo_i(f_lo), .f_hi_i(f_hi), .out_valid_o(out_valid), .r_o(r)
  );

  always #5 clk = ~clk;

  // c + a*b mod (z^mm + f), bit-serial MSB first.
  function automatic logic [M-1:0] ref_mac(logic [M-1:0] aa, logic [M-1:0] bb, logic [M-1:0] cc,
                                           logic [K-1:0] ff, int unsigned mm);
    logic [M:0] acc = '0;
    logic [M:0] red;
    red = (M+1)'({ff, 1'b1});
    for (int i = int'(mm) - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc[mm]) begin
        acc[mm] = 1'b0;
        acc ^= red;
      end
      if (bb[i]) acc ^= (M+1)'(aa);
    end
    return acc[M-1:0] ^ cc;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] x;
    for (int unsigned i = 0; i < M / 32; i++) x[32*i +: 32] = $urandom;
    return x;
  endfunction

  function automatic logic [K-1:0] rnd_f(int unsigned kind);
    case (kind % 4)
      0: return '0;                                // f = 1
      1: return K'(11'b0000_0000_1101);            // z^4 + z^3 + z + 1 shape
      default: return K'($urandom);
    endcase
  endfunction

  task automatic run_op(logic v);
    logic [M-1:0] want;
    @(negedge clk);
    if (v != vec) n_switch++;
    vec = v;
    a = rnd(); b = rnd(); c = rnd();
    f_lo = rnd_f($urandom); f_hi = rnd_f($urandom);
    if (v) begin
      a[M-1:HM] = ($urandom % 5 == 0) ? '1 : a[M-1:HM];
      want[HM-1:0] = ref_mac(M'(a[HM-1:0]), M'(b[HM-1:0]), M'(c[HM-1:0]), f_lo, HM)[HM-1:0];
      want[M-1:HM] = ref_mac(M'(a[M-1:HM]), M'(b[M-1:HM]), M'(c[M-1:HM]), f_hi, HM)[HM-1:0];
      n_vector++;
    end else begin
      want = ref_mac(a, b, c, f_lo, M);
      n_scalar++;
    end
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL: no out_valid after one clock"); end
    checks++;
    if (r !== want) begin
      failures++;
      $display("FAIL: vec=%0d\n a=%h\n b=%h\n c=%h\n r=%h\n want=%h", v, a, b, c, r, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned k = 0; k < 200; k++) run_op(logic'($urandom % 2));
    checks++;
    if (n_scalar == 0 || n_vector == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL: a mode or a mode switch was never exercised");
    end
    $display("scalar ops %0d, vector ops %0d, mode switches %0d", n_scalar, n_vector, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
