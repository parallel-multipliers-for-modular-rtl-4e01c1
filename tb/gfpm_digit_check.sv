// gfpm_digit_check: drives one gfpm_digit_mac instance for one field and
// digit size.
//
// After start_i it runs NOPS multiplications (the first with every
// coefficient at 2^N-1, the rest random) and compares each result
// coefficient, reduced mod p = 2^N - C, with schoolbook multiplication using
// z^MM = 2 and a modulo after every step. It checks that done_o comes
// exactly ceil(MM/D)+1 clocks after the start (one to load, one per digit) and that a start while busy is
// ignored. Counts appear on checks_o/failures_o when done_o rises.
module gfpm_digit_check #(
  parameter int unsigned N    = 13,
  parameter int unsigned C    = 1,
  parameter int unsigned MM   = 13,
  parameter int unsigned D    = 4,
  parameter int unsigned NOPS = 25
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  typedef logic [2*N+15:0] wide_t;
  localparam int unsigned ND = (MM + D - 1) / D;
  localparam wide_t P = (wide_t'(1) << N) - wide_t'(C);

  logic start = 1'b0, busy, done;
  logic [N-1:0] a [MM], b [MM];
  logic [N+1:0] r [MM];

  gfpm_digit_mac #(.N(N), .C(C), .MM(MM), .D(D)) dut (
    .clk, .rst_n, .start_i(start), .a_i(a), .b_i(b), .busy_o(busy), .done_o(done), .r_o(r)
  );

  initial begin
    done_o = 1'b0; checks_o = 0; failures_o = 0;
    for (int unsigned t = 0; t < MM; t++) begin a[t] = '0; b[t] = '0; end
    wait (start_i);
    for (int unsigned k = 0; k < NOPS; k++) begin
      wide_t want [MM];
      wide_t pr;
      int unsigned cycles;
      @(negedge clk);
      for (int unsigned t = 0; t < MM; t++) begin
        a[t] = (k == 0) ? '1 : N'({$urandom, $urandom});
        b[t] = (k == 0) ? '1 : N'({$urandom, $urandom});
        want[t] = '0;
      end
      for (int unsigned i = 0; i < MM; i++)
        for (int unsigned j = 0; j < MM; j++) begin
          pr = (wide_t'(a[i]) * wide_t'(b[j])) % P;
          if (i + j < MM) want[i+j] = (want[i+j] + pr) % P;
          else            want[i+j-MM] = (want[i+j-MM] + 2 * pr) % P;
        end
      start = 1'b1;
      @(negedge clk);
      start = (k % 3 == 1);  // a start while busy must be ignored
      cycles = 1;
      while (!done && cycles < 10 * ND) begin
        @(negedge clk);
        start = 1'b0;
        cycles++;
      end
      start = 1'b0;
      checks_o++;
      if (cycles != ND + 1) begin
        failures_o++;
        $display("FAIL (p=2^%0d-%0d, m=%0d, D=%0d): done after %0d clocks, want %0d", N, C, MM, D, cycles, ND + 1);
      end
      for (int unsigned t = 0; t < MM; t++) begin
        checks_o++;
        if (wide_t'(r[t]) % P != want[t]) begin
          failures_o++;
          $display("FAIL (p=2^%0d-%0d, m=%0d, D=%0d) op %0d coeff %0d: r mod p=%h, want %h",
                   N, C, MM, D, k, t, wide_t'(r[t]) % P, want[t]);
        end
      end
      @(negedge clk);
      checks_o++;
      if (busy) begin
        failures_o++;
        $display("FAIL (D=%0d): busy after done", D);
      end
    end
    done_o = 1'b1;
  end
endmodule
