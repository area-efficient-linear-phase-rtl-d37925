// csla_adder: W-bit carry-select adder with uniform blocks of BLK bits.
// The lowest block is a ripple-carry adder fed by cin. Every higher block holds two
// ripple-carry adders, one assuming carry-in 0 and one assuming carry-in 1; the carry
// out of the block below selects which sum and carry pass on, so the carry only
// crosses one multiplexer per block. Combinational; s + 2^W*cout = a + b + cin.
// The adder type is one of the four the sub-filters were evaluated with; the block
// size of 4 is this design's choice.
module csla_adder #(
  parameter int unsigned W   = symfir_pkg::ACC_W,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0] c;
  assign c[0] = cin;
  assign cout = c[NB];

  for (genvar g = 0; g < NB; g++) begin : g_blk
    localparam int unsigned LO = g * BLK;
    localparam int unsigned BW = ((LO + BLK) > W) ? (W - LO) : BLK;
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
