// gfpm_digit_mac: digit-serial merged-arithmetic multiplier over GF(p^m).
//
// Field as in gfpm_merged_mac: p = 2^N - C, f(z) = z^MM - 2. The
// multiplicand b(z) is used in parallel while the multiplier a(z) is taken D
// coefficients (one digit) per clock, most significant digit first, so one
// multiplication takes ND = ceil(MM/D) clocks. Each clock computes
//   acc(z) <- acc(z) * z^D + digit(z) * b(z)   (mod f(z), mod p)
// as one merged compression per coefficient: the shifted accumulator
// coefficient (doubled where z^MM == 2 wraps it round), the D x MM products
// of the digit and b(z) (doubled where they wrap), all summed without
// reducing any product on its own, followed by two rounds of subfield
// reduction (2^N == C) and a single carry-propagate addition. Accumulator
// coefficients stay below 2^(N+2); results are congruent mod p but not fully
// reduced.
//
// Interface: a pulse on start_i (while busy_o is low) loads a_i and b_i on
// that clock edge; busy_o then stays high for the ND digit steps, and done_o
// pulses for one clock with r_o valid, ND+1 clocks after start_i was taken.
// r_o holds its value until the next start. start_i while busy
// is ignored. The digit-serial schedule and the merging of the modular
// multiplies and additions of one step follow the source design; the
// start/busy/done handshake and the word-level description are this
// implementation's choices.
module gfpm_digit_mac #(
  parameter int unsigned N  = 13,
  parameter int unsigned C  = 1,
  parameter int unsigned MM = 13,
  parameter int unsigned D  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [N-1:0] a_i [MM],
  input  logic [N-1:0] b_i [MM],
  output logic         busy_o,
  output logic         done_o,
  output logic [N+1:0] r_o [MM]
);

  localparam int unsigned ND  = (MM + D - 1) / D;
  localparam int unsigned CNW = (ND > 1) ? $clog2(ND) : 1;
  localparam int unsigned CW  = 2 * N + $clog2(4 * D + 8) + 2;
  localparam int unsigned CBW = (C > 1) ? $clog2(C + 1) : 1;

  logic [N-1:0]   a_q [MM];
  logic [N-1:0]   b_q [MM];
  logic [N+1:0]   acc_d [MM];
  logic [CNW-1:0] dig_q;   // digit being processed, counts down

  always_comb begin
    for (int unsigned t = 0; t < MM; t++) begin
      logic [CW-1:0] col;
      // acc * z^D: coefficient t-D, or 2 * coefficient t-D+MM when it wraps.
      if (t >= D) col = CW'(r_o[t-D]);
      else        col = CW'(r_o[t+MM-D]) << 1;
      for (int unsigned j = 0; j < D; j++) begin
        for (int unsigned k = 0; k < MM; k++) begin
          int unsigned idx;
          idx = D * int'(dig_q) + j;
          if (idx < MM) begin
            if (j + k == t)
              col = col + CW'(a_q[idx]) * CW'(b_q[k]);
            else if (j + k == t + MM)
              col = col + ((CW'(a_q[idx]) * CW'(b_q[k])) << 1);
          end
        end
      end
      // Two rounds of subfield reduction: 2^N == C (mod p).
      col = CW'(col[N-1:0]) + CW'(col[CW-1:N]) * CW'(C[CBW-1:0]);
      col = CW'(col[N-1:0]) + CW'(col[CW-1:N]) * CW'(C[CBW-1:0]);
      acc_d[t] = col[N+1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o <= 1'b0;
      done_o <= 1'b0;
      dig_q  <= '0;
      for (int unsigned t = 0; t < MM; t++) begin
        a_q[t] <= '0;
        b_q[t] <= '0;
        r_o[t] <= '0;
      end
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          a_q    <= a_i;
          b_q    <= b_i;
          dig_q  <= CNW'(ND - 1);
          busy_o <= 1'b1;
          for (int unsigned t = 0; t < MM; t++) r_o[t] <= '0;
        end
      end else begin
        r_o <= acc_d;
        if (dig_q == '0) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end else begin
          dig_q <= dig_q - 1'b1;
        end
      end
    end
  end

  initial assert (D >= 1 && D <= MM && 2 * CBW + $clog2(MM) + 1 <= N)
    else $error("gfpm_digit_mac: unsupported parameters");

endmodule
