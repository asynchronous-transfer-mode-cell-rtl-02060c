// atm_hunt_window: HUNT sub-module of the moving-window delineators.
//
// One polynomial divider for G(x) = x^8 + x^2 + x + 1 slides a 40-bit window
// along the stream. Each clock the new W bits enter the divider (W = 1
// bit-serial, W = 8 octet-parallel) and the W bits that entered 40 bits
// earlier, taken from the end of a 40-bit delay line, are removed by adding
// their weight x^40 mod G(x) = x^6 + x^5 + x back in. For the serial circuit
// that is the delayed bit XORed ahead of r1, r5 and r6. The remainder is then
// always the syndrome of the last 40 bits, without clearing between checks.
//
// Interface: `en` is high only in the HUNT state; while low, the remainder,
// the delay line and the fill counter are held at zero. Timing: `found` is
// combinational, low for the first 39 bits (4 octets) after `en` rises, and
// high in any later clock whose new bits complete a 40-bit window with zero
// syndrome. The algorithm and delay-line length follow the document; the fill
// counter that masks the first windows and the use of a computed removal
// constant for the octet case are this design's.
module atm_hunt_window
  import atm_pkg::*;
#(
  parameter int unsigned W = 1   // bits per clock: 1 or 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic         found
);

  localparam int unsigned UNITS = HDR_BITS / W;   // delay-line depth: 40 or 5
  localparam int unsigned CW    = $clog2(UNITS);

  logic [UNITS-1:0][W-1:0] dly_q;   // dly_q[UNITS-1] entered 40 bits ago
  logic [7:0]              syn_q, syn_d;
  logic [CW-1:0]           cnt_q;   // saturates at UNITS-1
  logic                    full;

  always_comb begin
    syn_d = crc_feed(syn_q, 8'(din), W) ^ mul_xn(8'(dly_q[UNITS-1]), HDR_BITS);
    full  = (cnt_q == CW'(UNITS - 1));
    found = en && full && (syn_d == 8'h00);
  end

  always_ff @(posedge clk) begin
    if (reset || !en) begin
      syn_q <= '0;
      dly_q <= '0;
      cnt_q <= '0;
    end else begin
      syn_q <= syn_d;
      dly_q <= {dly_q[UNITS-2:0], din};
      if (!full) cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
