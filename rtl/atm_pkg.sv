// atm_pkg: constants, types and CRC arithmetic shared by the ATM cell
// delineators.
//
// An ATM cell is 53 octets: a 5-octet header whose last octet is the HEC, then
// 48 octets of payload. The HEC makes the 40 header bits a codeword of the
// generator G(x) = x^8 + x^2 + x + 1, so dividing the 40 received header bits
// by G(x) leaves a zero syndrome. Bits are taken most significant first: bit 8
// of octet 1 is the first bit on the line and the highest power of x.
//
// The functions below are the arithmetic of the serial polynomial divider:
// crc_feed shifts n bits into the 8-bit remainder register (r0 is bit 0, r7
// bit 7; the feedback of r7 enters ahead of r0, r1 and r2), and mul_xn
// multiplies a remainder by x^n modulo G(x). They unroll into XOR networks,
// which is how the octet-parallel dividers process eight bits in one clock.
// No I.432 coset (0x55) is applied: a header is valid when its raw syndrome
// is zero.
package atm_pkg;

  localparam int unsigned HDR_BITS     = 40;   // 5 header octets
  localparam int unsigned CELL_BITS    = 424;  // 53 octets
  localparam int unsigned PAYLOAD_BITS = CELL_BITS - HDR_BITS;  // 48 octets

  // Low-order terms of G(x) = x^8 + x^2 + x + 1 (the x^8 term is implicit).
  localparam logic [7:0] G_LOW = 8'h07;

  // Delineation states of the I.432 hunting procedure.
  typedef enum logic [1:0] {
    ST_HUNT    = 2'd0,
    ST_PRESYNC = 2'd1,
    ST_SYNC    = 2'd2
  } state_e;

  // One step of the divider: shift bit b into remainder r.
  function automatic logic [7:0] crc_step(logic [7:0] r, logic b);
    return {r[6:0], b} ^ (r[7] ? G_LOW : 8'h00);
  endfunction

  // Shift the n low bits of d into r, d[n-1] first.
  function automatic logic [7:0] crc_feed(logic [7:0] r, logic [7:0] d, int unsigned n);
    logic [7:0] acc;
    acc = r;
    for (int i = 7; i >= 0; i--) begin
      if (i < int'(n)) acc = crc_step(acc, d[i]);
    end
    return acc;
  endfunction

  // r(x) * x^n mod G(x): n steps of the divider with zero input.
  function automatic logic [7:0] mul_xn(logic [7:0] r, int unsigned n);
    logic [7:0] acc;
    acc = r;
    for (int unsigned i = 0; i < n; i++) acc = crc_step(acc, 1'b0);
    return acc;
  endfunction

endpackage
