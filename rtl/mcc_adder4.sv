// mcc_adder4: 4-bit cascadable Manchester carry-chain adder slice.
//
// Each bit forms a propagate term P = a XOR b and a generate term G = a AND b.
// The carry chain passes the incoming carry through every bit whose P is set
// and creates a carry wherever G is set; the sum bit is P XOR carry-in of that
// bit. The enable input stands for the precharge phase of the dynamic chain:
// while it is low no carry is generated or passed on (the chain is precharged
// to "no carry"), so the sum is only meaningful while en is high.
// The 4-bit slice, the P/G definitions and the enable follow the source design;
// modelling the precharged chain as "carry = 0" is this design's choice.
// Purely combinational.
module mcc_adder4 (
  input  logic       en,    // adder enable (ADEN)
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] p, g;
  logic [4:0] c;   // c[i] is the carry into bit i

  assign p    = a ^ b;
  assign g    = a & b;
  assign c[0] = en & cin;
  for (genvar i = 0; i < 4; i++) begin : g_chain
    assign c[i+1] = en & (g[i] | (p[i] & c[i]));
  end
  assign s    = p ^ c[3:0];
  assign cout = c[4];
endmodule
