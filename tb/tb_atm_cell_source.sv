// tb_atm_cell_source: stream of back-to-back ATM cells for the delineator
// testbenches, W bits per clock (W = 1: one bit, first bit of each octet
// first; W = 8: one octet). The stream starts with PRE random octets and,
// for W = 1, PREBITS further random bits, so the first header starts at an
// arbitrary bit. The HEC of cell c (c < 64) is corrupted when BAD_MASK[c] is
// set. Data change on the falling clock edge.
module tb_atm_cell_source
  import tb_atm_pkg::*;
#(
  parameter int unsigned W        = 1,
  parameter int          PRE      = 17,
  parameter int          PREBITS  = 3,
  parameter logic [31:0] SEED     = 32'h1,
  parameter logic [63:0] BAD_MASK = '0
) (
  input  logic         clk,
  input  logic         reset,
  output logic [W-1:0] data,
  output int           cell_idx    // index of the cell the current unit belongs to (-1 in prefix)
);

  int u;   // unit index since reset

  function automatic bit bad(int idx);
    int c;
    if (idx < PRE) return 1'b0;
    c = (idx - PRE) / 53;
    return (c < 64) && BAD_MASK[c];
  endfunction

  function automatic logic [W-1:0] unit_at(int k);
    logic [7:0] o;
    int j;
    if (W == 8) begin
      o = cell_octet(k, PRE, SEED, bad(k));
      return W'(o);
    end
    if (k < PREBITS) return W'(mix(SEED ^ 32'(k) ^ 32'h0B17_0000) & 1);
    j = k - PREBITS;
    o = cell_octet(j / 8, PRE, SEED, bad(j / 8));
    return W'(o[7 - (j % 8)]);
  endfunction

  function automatic int cell_of(int k);
    int oi;
    oi = (W == 8) ? k : (k < PREBITS ? -1 : (k - PREBITS) / 8);
    if (oi < PRE) return -1;
    return (oi - PRE) / 53;
  endfunction

  initial begin
    u = 0;
    data = unit_at(0);
    cell_idx = cell_of(0);
  end

  always @(negedge clk) begin
    if (reset) u = 0;
    else       u = u + 1;
    data = unit_at(u);
    cell_idx = cell_of(u);
  end

endmodule
