// tb_gfpm_digit_mac: self-checking testbench for gfpm_digit_mac.
//
// Runs the digit sizes D = 1, 2 and 4 in GF((2^13-1)^13) (D = 4 is the
// default instance) and D = 4 in GF((2^18-11)^13), each through
// gfpm_digit_check, which also checks the latency of ceil(m/D) digit steps plus one load clock.
module tb_gfpm_digit_mac;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done [4];
  int ch [4], fl [4];

  always #5 clk = ~clk;

  gfpm_digit_check #(.N(13), .C(1),  .MM(13), .D(4)) u_d4 (.clk, .rst_n, .start_i(start),
    .done_o(done[0]), .checks_o(ch[0]), .failures_o(fl[0]));
  gfpm_digit_check #(.N(13), .C(1),  .MM(13), .D(2)) u_d2 (.clk, .rst_n, .start_i(start),
    .done_o(done[1]), .checks_o(ch[1]), .failures_o(fl[1]));
  gfpm_digit_check #(.N(13), .C(1),  .MM(13), .D(1)) u_d1 (.clk, .rst_n, .start_i(start),
    .done_o(done[2]), .checks_o(ch[2]), .failures_o(fl[2]));
  gfpm_digit_check #(.N(18), .C(11), .MM(13), .D(4)) u_f1 (.clk, .rst_n, .start_i(start),
    .done_o(done[3]), .checks_o(ch[3]), .failures_o(fl[3]));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2] + ch[3],
             fl[0] + fl[1] + fl[2] + fl[3]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2] + ch[3],
             fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end
endmodule
