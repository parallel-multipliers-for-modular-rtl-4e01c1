// pmm_lut: residue table for the parallel Montgomery multipliers.
//
// Holds ENTRIES precomputed N-bit residues of the form 2^i mod M. The
// multiplier needs every entry at once (each bit of the upper part of its
// bit-product array selects one entry as a whole summation row), so all
// entries are presented in parallel on entries_o. The table is written one
// entry per clock through a simple write port (we_i, addr_i, data_i); writes
// with an address outside the table are ignored. Reset clears it. The values
// themselves depend only on M and are computed by the host; which exponent
// goes in which entry is set by the multiplier that owns the table.
// That the residues are precomputed and looked up follows the source design;
// the register-file form and the write port are choices of this one.
module pmm_lut #(
  parameter int unsigned N       = 32,
  parameter int unsigned ENTRIES = 31,
  parameter int unsigned AW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic [AW-1:0] addr_i,
  input  logic [N-1:0]  data_i,
  output logic [N-1:0]  entries_o [ENTRIES]
);

  logic [N-1:0] mem_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) mem_q[i] <= '0;
    end else if (we_i && (32'(addr_i) < ENTRIES)) begin
      mem_q[addr_i] <= data_i;
    end
  end

  assign entries_o = mem_q;

endmodule
