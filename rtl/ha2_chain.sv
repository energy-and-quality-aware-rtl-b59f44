// ha2_chain: half-adder (incrementer) chain made of merged 2-bit half-adder cells.
//
// Adds a single carry-in to a W-bit vector. Each 2-bit cell takes bits i and i+1
// and the incoming carry and produces both sum bits and its carry-out directly
// from the carry-in (carry-out = cin & x[i] & x[i+1]), so the ripple path per
// two bits is one gate level pair instead of two chained half-adder carries.
// The SAD accumulator uses a 6-bit chain (three cells) for its upper bits, as in
// the design description; W must be even.
//
// Purely combinational.
module ha2_chain #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] x,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned CELLS = W / 2;
  logic [CELLS:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < CELLS; k++) begin : g_cell
    // one merged 2-bit half adder
    assign sum[2*k]     = x[2*k] ^ c[k];
    assign sum[2*k+1]   = x[2*k+1] ^ (c[k] & x[2*k]);
    assign c[k+1]       = c[k] & x[2*k] & x[2*k+1];
  end

  assign cout = c[CELLS];

  initial begin
    assert (W % 2 == 0) else $error("ha2_chain: W must be even");
  end
endmodule
