// atm_crc_detector: fixed-window HEC checker (the HUNT-CRC, PRESYNC-CRC and
// SYNC-CRC sub-modules).
//
// A polynomial divider for G(x) = x^8 + x^2 + x + 1 takes W bits per clock
// (W = 1 bit-serial, W = 8 octet-parallel) while `en` is high. After 40 bits
// (40 clocks serial, 5 clocks octet) it reports the syndrome of that window:
// `correct` if it is zero, `incorrect` otherwise, then clears its remainder and
// counter so the next clock starts a new 40-bit window. While `en` is low the
// remainder and counter are held at zero, which is how its users start it at a
// chosen bit.
//
// Timing: `correct`/`incorrect` are combinational and high for one clock, in
// the clock that presents the last (40th) bit or 5th octet of the window; they
// are low in every other clock. The window length, generator and reset-to-zero
// behaviour follow the document; the registered counter and the
// single-clock, same-cycle flags are this design's choices.
module atm_crc_detector
  import atm_pkg::*;
#(
  parameter int unsigned W = 1   // bits per clock: 1 or 8
) (
  input  logic         clk,
  input  logic         reset,     // synchronous, active high
  input  logic         en,        // low: held cleared
  input  logic [W-1:0] din,       // din[W-1] is the earlier bit on the line
  output logic         correct,   // window ended with zero syndrome
  output logic         incorrect  // window ended with non-zero syndrome
);

  localparam int unsigned UNITS = HDR_BITS / W;
  localparam int unsigned CW    = $clog2(UNITS);

  logic [7:0]    syn_q, syn_d;
  logic [CW-1:0] cnt_q;
  logic          last;

  initial begin
    assert (W == 1 || W == 8) else $fatal(1, "W must be 1 or 8");
  end

  always_comb begin
    syn_d     = crc_feed(syn_q, 8'(din), W);
    last      = en && (cnt_q == CW'(UNITS - 1));
    correct   = last && (syn_d == 8'h00);
    incorrect = last && (syn_d != 8'h00);
  end

  always_ff @(posedge clk) begin
    if (reset || !en || last) begin
      syn_q <= '0;
      cnt_q <= '0;
    end else begin
      syn_q <= syn_d;
      cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
