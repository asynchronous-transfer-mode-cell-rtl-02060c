// atm_hunt_fixed: HUNT sub-module of the fixed-boundary delineators.
//
// A fixed-window CRC detector only sees windows that start where it was
// enabled, so continuous searching needs one detector per possible header
// start: 40 for the bit-serial delineator (W = 1), 5 for the octet-parallel
// one (W = 8), where octet boundaries are known. Detector k is released k
// clocks after `en` rises, through a thermometer shift register, so each clock
// some detector completes a window over the most recent 40 bits. `found` is
// the OR of their `correct` flags.
//
// Interface: `en` is high only in the HUNT state; while it is low every
// detector and the stagger register are held cleared, so each search begins
// afresh. Timing: `found` is combinational and high in the clock that
// presents the last bit (or octet) of a header with a zero syndrome; it stays
// low for the first 39 bits (4 octets) after `en` rises. The detector count and
// the staggered enables follow the document; the thermometer register is this
// design's way of producing them. The detectors' `incorrect` outputs are left
// open on purpose: HUNT ignores windows that fail and simply keeps searching.
module atm_hunt_fixed
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

  localparam int unsigned N = HDR_BITS / W;   // 40 or 5 detectors

  logic [N-1:1] stag_q;   // stag_q[k]: detector k has been released
  logic [N-1:0] det_en;
  logic [N-1:0] det_ok;

  assign det_en = {N{en}} & {stag_q, 1'b1};

  always_ff @(posedge clk) begin
    if (reset || !en) stag_q <= '0;
    else              stag_q <= det_en[N-2:0];
  end

  for (genvar k = 0; k < N; k++) begin : g_det
    atm_crc_detector #(.W(W)) u_crc (
      .clk       (clk),
      .reset     (reset),
      .en        (det_en[k]),
      .din       (din),
      .correct   (det_ok[k]),
      .incorrect ()
    );
  end

  assign found = |det_ok;

endmodule
