// tb_pmm_wide: parallel Montgomery multipliers at ECC operand sizes.
//
// Runs Implementations III and IV at N = 160 bits through pmm_check.
module tb_pmm_wide;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done [2];
  int ch [2], fl [2];

  always #5 clk = ~clk;

  pmm_check #(.IMPL(3), .N(160)) u_i3 (.clk, .rst_n, .start_i(start),
    .done_o(done[0]), .checks_o(ch[0]), .failures_o(fl[0]));
  pmm_check #(.IMPL(4), .N(160)) u_i4 (.clk, .rst_n, .start_i(start),
    .done_o(done[1]), .checks_o(ch[1]), .failures_o(fl[1]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1]);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
