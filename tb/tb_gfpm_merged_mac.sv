// tb_gfpm_merged_mac: self-checking testbench for gfpm_merged_mac.
//
// Runs the unit at its default field, GF((2^13-1)^13), and at the two other
// special optimal extension fields used to characterise it,
// GF((2^18-11)^13) and GF((2^57-13)^3), each through gfpm_field_check, all
// with the carry-delayed reduction rounds. A fourth instance runs
// GF((2^18-11)^13) with the plain word-level reduction (CDA = 0).
module tb_gfpm_merged_mac;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done [4];
  int ch [4], fl [4];
  int checks, failures;

  always #5 clk = ~clk;

  gfpm_field_check #(.N(13), .C(1),  .MM(13)) u_f0 (.clk, .rst_n, .start_i(start),
    .done_o(done[0]), .checks_o(ch[0]), .failures_o(fl[0]));
  gfpm_field_check #(.N(18), .C(11), .MM(13)) u_f1 (.clk, .rst_n, .start_i(start),
    .done_o(done[1]), .checks_o(ch[1]), .failures_o(fl[1]));
  gfpm_field_check #(.N(57), .C(13), .MM(3))  u_f2 (.clk, .rst_n, .start_i(start),
    .done_o(done[2]), .checks_o(ch[2]), .failures_o(fl[2]));
  gfpm_field_check #(.N(18), .C(11), .MM(13), .CDA(1'b0)) u_f3 (.clk, .rst_n, .start_i(start),
    .done_o(done[3]), .checks_o(ch[3]), .failures_o(fl[3]));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = ch[0] + ch[1] + ch[2] + ch[3];
    failures = fl[0] + fl[1] + fl[2] + fl[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2] + ch[3], fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end
endmodule
