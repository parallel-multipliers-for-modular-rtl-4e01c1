// tb_mont_tree: self-checking testbench for mont_tree.
//
// Feeds the tree (default size: 528 rows of 32 bits, the Implementation I
// array for 32-bit operands) with random rows, sparse rows, all-ones rows
// and a single non-zero row, under random odd moduli. With T = sum + carry
// it checks that T < 2^(W+2) and that T * 2^J - sum(rows) is a non-negative
// multiple of M, where J is the number of halving stages, recomputed here
// from the grouping rule. The tree is combinational, so each vector is
// checked after a short settle delay.
module tb_mont_tree;
  localparam int unsigned N = 32;
  localparam int unsigned W = 32;
  localparam int unsigned H = 528;
  typedef logic [W+31:0] wide_t;

  logic [W-1:0] rows [H];
  logic [N-1:0] m;
  logic [W+1:0] sum, carry;
  int checks = 0, failures = 0;
  logic done = 1'b0;

  mont_tree #(.N(N), .W(W), .H(H)) dut (.rows_i(rows), .m_i(m), .sum_o(sum), .carry_o(carry));

  function automatic int unsigned halv(int unsigned h);
    int unsigned j = 0;
    while (h > 4) begin
      h = 2 * (h / 3) + ((h % 3) != 0 ? 2 : 0);
      j++;
    end
    return j;
  endfunction
  localparam int unsigned J = halv(H);

  task automatic check();
    wide_t total = '0, t, diff;
    #1;
    for (int unsigned r = 0; r < H; r++) total += wide_t'(rows[r]);
    t = wide_t'(sum) + wide_t'(carry);
    checks++;
    if (t >= (wide_t'(1) << (W + 2))) begin
      failures++;
      $display("FAIL: result %h too wide", t);
    end
    checks++;
    diff = (t << J) - total;
    if ((t << J) < total || (diff % wide_t'(m)) != 0) begin
      failures++;
      $display("FAIL: M=%h total=%h T=%h: T*2^%0d - total not a multiple of M", m, total, t, J);
    end
  endtask

  initial begin
    for (int unsigned v = 0; v < 400; v++) begin
      m = N'($urandom) | N'(1);
      if (v % 7 == 0) m = N'(1) | (N'(1) << (N - 1));
      for (int unsigned r = 0; r < H; r++) begin
        case (v % 4)
          0: rows[r] = W'($urandom);
          1: rows[r] = ($urandom % 8 == 0) ? W'($urandom) : '0;
          2: rows[r] = '1;
          default: rows[r] = (r == v % H) ? W'($urandom) | W'(1) : '0;
        endcase
      end
      check();
    end
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
