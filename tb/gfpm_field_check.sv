// gfpm_field_check: drives one gfpm_merged_mac instance for one field.
//
// After start_i it applies NOPS operations (the first one with every input
// coefficient at its maximum 2^N-1, the rest random) and compares every
// output coefficient, reduced mod p = 2^N - C, with a reference computed by
// schoolbook polynomial multiplication with z^MM = 2 and a modulo after
// every step. It also checks that each result appears one clock after
// in_valid. Counts are reported on checks_o/failures_o when done_o rises.
module gfpm_field_check #(
  parameter int unsigned N    = 13,
  parameter int unsigned C    = 1,
  parameter int unsigned MM   = 13,
  parameter int unsigned NOPS = 40,
  parameter bit          CDA  = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  typedef logic [2*N+15:0] wide_t;

  logic in_valid = 1'b0, out_valid;
  logic [N-1:0] a [MM], b [MM], acc [MM];
  logic [N+1:0] r [MM];

  gfpm_merged_mac #(.N(N), .C(C), .MM(MM), .CDA(CDA)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .a_i(a), .b_i(b), .acc_i(acc),
    .out_valid_o(out_valid), .r_o(r)
  );

  localparam wide_t P = (wide_t'(1) << N) - wide_t'(C);

  initial begin
    done_o = 1'b0; checks_o = 0; failures_o = 0;
    for (int unsigned t = 0; t < MM; t++) begin a[t] = '0; b[t] = '0; acc[t] = '0; end
    wait (start_i);
    for (int unsigned k = 0; k < NOPS; k++) begin
      wide_t want [MM];
      @(negedge clk);
      for (int unsigned t = 0; t < MM; t++) begin
        a[t]   = (k == 0) ? '1 : N'({$urandom, $urandom});
        b[t]   = (k == 0) ? '1 : N'({$urandom, $urandom});
        acc[t] = (k == 0) ? '1 : N'({$urandom, $urandom});
      end
      for (int unsigned t = 0; t < MM; t++) want[t] = wide_t'(acc[t]) % P;
      for (int unsigned i = 0; i < MM; i++)
        for (int unsigned j = 0; j < MM; j++) begin
          wide_t pr;
          pr = (wide_t'(a[i]) * wide_t'(b[j])) % P;
          if (i + j < MM) want[i+j] = (want[i+j] + pr) % P;
          else            want[i+j-MM] = (want[i+j-MM] + 2 * pr) % P;
        end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks_o++;
      if (!out_valid) begin
        failures_o++;
        $display("FAIL (p=2^%0d-%0d, m=%0d): no out_valid after one clock", N, C, MM);
      end
      for (int unsigned t = 0; t < MM; t++) begin
        checks_o++;
        if (wide_t'(r[t]) % P != want[t]) begin
          failures_o++;
          $display("FAIL (p=2^%0d-%0d, m=%0d) op %0d coeff %0d: r=%h, r mod p=%h, want %h",
                   N, C, MM, k, t, r[t], wide_t'(r[t]) % P, want[t]);
        end
      end
    end
    done_o = 1'b1;
  end
endmodule
