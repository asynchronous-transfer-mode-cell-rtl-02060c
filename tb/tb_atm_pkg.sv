// tb_atm_pkg: reference arithmetic and stimulus for the ATM delineator
// testbenches, written independently of the RTL's divider.
//
// ref_syndrome does schoolbook long division of a 40-bit header, first bit in
// bit 39, by the 9-bit generator 1_0000_0111 (x^8 + x^2 + x + 1) and returns
// the remainder. make_hec returns the octet that makes 32 header bits plus it
// divisible by the generator. mix is a small integer hash that gives
// repeatable pseudo-random octets for any stream position, so that a stream
// can be produced and checked in any order.
package tb_atm_pkg;

  localparam logic [8:0] GEN = 9'h107;

  function automatic logic [7:0] ref_syndrome(logic [39:0] h);
    logic [39:0] r;
    r = h;
    for (int i = 39; i >= 8; i--) begin
      if (r[i]) r[i -: 9] = r[i -: 9] ^ GEN;
    end
    return r[7:0];
  endfunction

  function automatic logic [7:0] make_hec(logic [31:0] m);
    return ref_syndrome({m, 8'h00});
  endfunction

  function automatic logic [31:0] mix(logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Octet idx of a stream of back-to-back cells that starts after `pre`
  // random octets. Cell c's header is bad (HEC bit 0 flipped) when bad_cell(c).
  function automatic logic [7:0] cell_octet(int idx, int pre, logic [31:0] seed,
                                            bit corrupt);
    int c, p;
    logic [31:0] m;
    logic [7:0]  hec;
    if (idx < pre) return 8'(mix(seed ^ 32'(idx) ^ 32'h5555_0000) >> 8);
    c = (idx - pre) / 53;
    p = (idx - pre) % 53;
    m = mix(seed ^ 32'(c) ^ 32'hC0DE_0000);
    hec = make_hec(m) ^ {7'b0, corrupt};
    case (p)
      0: return m[31:24];
      1: return m[23:16];
      2: return m[15:8];
      3: return m[7:0];
      4: return hec;
      default: return 8'(mix(seed ^ 32'(idx) ^ 32'hA5A5_0000) >> 4);
    endcase
  endfunction

endpackage
