// mont_tree: Montgomery-reducing modified Wallace tree.
//
// Sums H rows, each below 2^W, and returns a sum/carry pair whose total T
// satisfies T = (sum(rows) + E*M) / 2^J for some integer E, so that
// T == sum(rows) * 2^-J (mod M). J = pmm_pkg::tree_halvings(H).
//
// Every stage with more than four rows is a halving stage. Rows are taken in
// groups of three and compressed by a bank of full adders to a sum and carry
// row. A second, back-to-back bank of full adders adds the modulus M when the
// group's least significant bit is one; since M is odd, the bit becomes zero
// and is discarded, so the stage divides its group by two and every output
// row stays below 2^W. A left-over pair of rows uses half adders in the first
// bank; a single left-over row is combined with M by half adders and becomes
// two rows. The last two stages (4->3 and 3->2 rows) are plain carry-save
// stages without the modulus, so the outputs are W+2 bits wide.
//
// The tree is unrolled stage by stage, each stage with its own row array; stage s
// holds pmm_pkg::tree_height(H, s) live rows. Purely combinational. M must be odd and
// below 2^N, with W >= N. The grouping rule, the back-to-back adders and the
// unhalved final stages follow the source design; the stage-array description
// and the uniform row width W are choices of this implementation.
module mont_tree #(
  parameter int unsigned N = 32,
  parameter int unsigned W = N,
  parameter int unsigned H = 528
) (
  input  logic [W-1:0] rows_i [H],
  input  logic [N-1:0] m_i,
  output logic [W+1:0] sum_o,
  output logic [W+1:0] carry_o
);

  localparam int unsigned J  = pmm_pkg::tree_halvings(H);  // halving stages
  localparam int unsigned HJ = pmm_pkg::tree_height(H, J); // rows after them

  // g_stage[s].cur holds the rows entering halving stage s and
  // g_stage[s].nxt the rows leaving it. Rows of halving stages stay below 2^W.
  logic [W-1:0] m_w;
  assign m_w = W'(m_i);

  for (genvar s = 0; s < J; s++) begin : g_stage
    logic [W-1:0] cur [H];
    logic [W-1:0] nxt [H];
    if (s == 0) begin : g_first
      assign cur = rows_i;
    end else begin : g_later
      assign cur = g_stage[s-1].nxt;
    end
    localparam int unsigned HS = pmm_pkg::tree_height(H, s);
    localparam int unsigned HN = pmm_pkg::tree_next(HS);
    localparam int unsigned G  = HS / 3;   // full groups of three
    localparam int unsigned R  = HS % 3;   // rows left over
    for (genvar g = 0; g < G + (R != 0 ? 1 : 0); g++) begin : g_grp
      logic [W-1:0] s1, cy, madd;
      logic [W:0]   s2, c2, y;  // s2[0] and c2[W] are zero by construction
      if (g < G) begin : g_fa
        // Full-adder bank: three rows to two.
        assign s1 = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
        assign cy = (cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                    (cur[3*g+1] & cur[3*g+2]);
      end else if (R == 2) begin : g_ha
        // Half-adder bank: two rows to two.
        assign s1 = cur[3*g] ^ cur[3*g+1];
        assign cy = cur[3*g] & cur[3*g+1];
      end else begin : g_single
        // A single row goes straight to the second bank (half adders).
        assign s1 = cur[3*g];
        assign cy = '0;
      end
      // Second bank: add M if the group is odd, then drop the zero LSB.
      assign madd = s1[0] ? m_w : '0;
      assign y    = {cy, 1'b0};
      assign s2   = {1'b0, s1} ^ y ^ {1'b0, madd};
      assign c2   = ({1'b0, s1} & y) | ({1'b0, s1} & {1'b0, madd}) | (y & {1'b0, madd});
      assign nxt[2*g]   = s2[W:1];
      assign nxt[2*g+1] = c2[W-1:0];
    end
    for (genvar r = HN; r < H; r++) begin : g_idle
      assign nxt[r] = '0;
    end
  end

  // Final, unhalved carry-save stages (4 -> 3 -> 2 rows).
  logic [W-1:0] last [H];
  if (J == 0) begin : g_nohalve
    assign last = rows_i;
  end else begin : g_halved
    assign last = g_stage[J-1].nxt;
  end
  logic [W+1:0] x, y, z, w, s3, c3;
  assign x = {2'b00, last[0]};
  assign y = (HJ >= 2) ? {2'b00, last[1]} : '0;
  assign z = (HJ >= 3) ? {2'b00, last[2]} : '0;
  assign w = (HJ >= 4) ? {2'b00, last[3]} : '0;
  assign s3 = x ^ y ^ z;
  assign c3 = ((x & y) | (x & z) | (y & z)) << 1;

  if (HJ == 4) begin : g_final4
    assign sum_o   = s3 ^ c3 ^ w;
    assign carry_o = ((s3 & c3) | (s3 & w) | (c3 & w)) << 1;
  end else if (HJ == 3) begin : g_final3
    assign sum_o   = s3;
    assign carry_o = c3;
  end else begin : g_final2
    assign sum_o   = x;
    assign carry_o = y;
  end

endmodule
