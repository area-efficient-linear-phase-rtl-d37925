// bec_csla_adder: W-bit carry-select adder using binary-to-excess-1 converters (BEC).
// Each block above the first has a single ripple-carry adder with carry-in 0. Its
// (BW+1)-bit result {carry, sum} is incremented by a BEC (bit i flips when all lower
// bits are 1), which gives the carry-in 1 result with far fewer gates than a second
// ripple adder. The incoming carry selects between the two. Blocks follow the
// square-root grouping 2,2,3,4,...; the grouping is this design's choice.
// Combinational; s + 2^W*cout = a + b + cin.
module bec_csla_adder #(
  parameter int unsigned W = symfir_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  import symfir_pkg::*;
  localparam int unsigned NB = sqrt_grp_count(W);

  logic [NB:0] c;
  assign c[0] = cin;
  assign cout = c[NB];

  for (genvar g = 0; g < NB; g++) begin : g_blk
    localparam int unsigned LO = sqrt_grp_lo(g);
    localparam int unsigned BW = sqrt_grp_w(g, W);
    if (g == 0) begin : g_first
      rca_adder #(.W(BW)) u_rca (
        .a(a[LO+:BW]), .b(b[LO+:BW]), .cin(c[0]), .s(s[LO+:BW]), .cout(c[1])
      );
    end else begin : g_sel
      logic [BW-1:0] s0;
      logic          c0;
      logic [BW:0]   r0, r1;  // {carry, sum} for carry-in 0 and 1
      rca_adder #(.W(BW)) u_rca0 (.a(a[LO+:BW]), .b(b[LO+:BW]), .cin(1'b0), .s(s0), .cout(c0));
      assign r0 = {c0, s0};
      // binary to excess-1: r1 = r0 + 1
      always_comb begin
        logic all1;
        all1 = 1'b1;
        for (int i = 0; i <= BW; i++) begin
          r1[i] = r0[i] ^ all1;
          all1  = all1 & r0[i];
        end
      end
      assign s[LO+:BW] = c[g] ? r1[BW-1:0] : r0[BW-1:0];
      assign c[g+1]    = c[g] ? r1[BW]     : r0[BW];
    end
  end
endmodule
