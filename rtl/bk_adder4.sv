// bk_adder4: 4-bit Brent-Kung parallel-prefix adder.
//
// Three stages, as the design lays them out:
//  1. Pre-processing: per bit, G = a & b and P = a ^ b.
//  2. Carry network (Brent-Kung tree, two levels of prefix cells):
//       level 1: (1:0) = (1) o (0)        (3:2) = (3) o (2)
//       level 2: (3:0) = (3:2) o (1:0)    (2:0) = (2) o (1:0)
//     giving the group pairs (0:0), (1:0), (2:0), (3:0) with four cells, the
//     count and placement of the Brent-Kung tree for four bits.
//  3. Post-processing: the carry into bit i+1 is the group generate of bits
//     i..0 or the group propagate of bits i..0 ANDed with cin; the carry
//     into bit 0 is cin. Sum bit i = P_i ^ carry_i. cout is the carry into
//     bit 4.
// Folding cin in after the tree (instead of as an extra tree input) is this
// implementation's reading of the post-processing step. Purely combinational.
module bk_adder4
  import bcd_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);

  // Stage 1: bit-level propagate / generate
  pg_t [3:0] bit_pg;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      bit_pg[i].p = a[i] ^ b[i];
      bit_pg[i].g = a[i] & b[i];
    end
  end

  // Stage 2: Brent-Kung prefix tree
  pg_t grp_10, grp_32, grp_30, grp_20;

  bk_prefix_cell u_l1_10 (.hi(bit_pg[1]), .lo(bit_pg[0]), .out(grp_10));
  bk_prefix_cell u_l1_32 (.hi(bit_pg[3]), .lo(bit_pg[2]), .out(grp_32));
  bk_prefix_cell u_l2_30 (.hi(grp_32),    .lo(grp_10),    .out(grp_30));
  bk_prefix_cell u_l2_20 (.hi(bit_pg[2]), .lo(grp_10),    .out(grp_20));

  // Stage 3: carries with cin, then sum bits
  pg_t [3:0] prefix;   // prefix[i] covers bits i..0
  logic [4:0] carry;   // carry[i] enters bit i

  always_comb begin
    prefix[0] = bit_pg[0];
    prefix[1] = grp_10;
    prefix[2] = grp_20;
    prefix[3] = grp_30;
    carry[0]  = cin;
    for (int i = 0; i < 4; i++) begin
      carry[i+1] = prefix[i].g | (prefix[i].p & cin);
      sum[i]     = bit_pg[i].p ^ carry[i];
    end
    cout = carry[4];
  end

endmodule
