// sqrt_csla_adder: W-bit square-root carry-select adder.
// Same principle as the uniform carry-select adder (each block computed for carry-in
// 0 and 1, the incoming carry selects), but the blocks grow as 2,2,3,4,5,... bits so
// that a block's ripple time matches the time the select carry needs to reach it.
// Combinational; s + 2^W*cout = a + b + cin. The grouping is the usual one for this
// adder; it is this design's choice.
module sqrt_csla_adder #(
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
      logic [BW-1:0] s0, s1;
      logic          c0, c1;
      rca_adder #(.W(BW)) u_rca0 (.a(a[LO+:BW]), .b(b[LO+:BW]), .cin(1'b0), .s(s0), .cout(c0));
      rca_adder #(.W(BW)) u_rca1 (.a(a[LO+:BW]), .b(b[LO+:BW]), .cin(1'b1), .s(s1), .cout(c1));
      assign s[LO+:BW] = c[g] ? s1 : s0;
      assign c[g+1]    = c[g] ? c1 : c0;
    end
  end
endmodule
