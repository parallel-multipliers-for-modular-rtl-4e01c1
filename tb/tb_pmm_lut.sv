// tb_pmm_lut: self-checking testbench for pmm_lut.
//
// Checks that reset clears every entry, that each write lands in its entry
// only, one clock after it is applied, that all entries are visible at once,
// and that writes to addresses beyond the table and cycles without we_i
// change nothing. A model array holds the expected contents.
module tb_pmm_lut;
  localparam int unsigned N = 32;
  localparam int unsigned ENTRIES = 31;
  localparam int unsigned AW = $clog2(ENTRIES);

  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [N-1:0] data = '0;
  logic [N-1:0] entries [ENTRIES];
  logic [N-1:0] model [ENTRIES];
  int checks = 0, failures = 0;

  pmm_lut #(.N(N), .ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .we_i(we), .addr_i(addr), .data_i(data), .entries_o(entries)
  );

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      checks++;
      if (entries[i] !== model[i]) begin
        failures++;
        $display("FAIL (%s): entry %0d = %h, want %h", what, i, entries[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int unsigned i = 0; i < ENTRIES; i++) model[i] = '0;
    #1 rst_n = 1'b0;
    #1 compare("reset");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned k = 0; k < 300; k++) begin
      @(negedge clk);
      we   = ($urandom % 4) != 0;
      addr = AW'($urandom);
      data = N'($urandom);
      // The write must not be visible before the clock edge.
      #1 compare("before edge");
      @(posedge clk);
      if (we && 32'(addr) < ENTRIES) model[addr] = data;
      #1 compare("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
