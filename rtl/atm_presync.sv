// atm_presync: PRESYNC sub-module with its PRESYNC-CRC detector.
//
// Once HUNT has found a header, the next header is expected exactly one cell
// (424 bits) later. A cell-position counter starts at 0 in the first clock of
// PRESYNC, which carries the first payload bit (or octet) after the header that
// was found. The 48 payload octets are skipped and the CRC detector is
// enabled over the next 40 bits, so its verdict arrives on the last header
// bit, in the clock where the counter wraps back to 0. Correct verdicts are
// counted; the DELTA-th consecutive one raises `to_sync`. An incorrect verdict
// raises `to_hunt`.
//
// Interface: `en` is high only in the PRESYNC state and holds the counters
// cleared while low. `to_sync`, `to_hunt` are combinational one-clock pulses
// in the clock of the last header bit; the control block changes state on the
// following edge. The rule (DELTA consecutive correct HECs, return to HUNT on
// one incorrect HEC) follows the document; counting only the headers checked
// in PRESYNC, not the one HUNT found, is this design's reading.
module atm_presync
  import atm_pkg::*;
#(
  parameter int unsigned W     = 1,  // bits per clock: 1 or 8
  parameter int unsigned DELTA = 8   // consecutive correct HECs to reach SYNC
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic         to_sync,
  output logic         to_hunt
);

  localparam int unsigned CELL_UNITS = CELL_BITS / W;
  localparam int unsigned PAY_UNITS  = PAYLOAD_BITS / W;
  localparam int unsigned PW         = $clog2(CELL_UNITS);
  localparam int unsigned GW         = $clog2(DELTA + 1);

  logic [PW-1:0] pos_q;
  logic [GW-1:0] good_q;
  logic          crc_en, crc_ok, crc_bad;

  assign crc_en = en && (pos_q >= PW'(PAY_UNITS));

  atm_crc_detector #(.W(W)) u_crc (
    .clk       (clk),
    .reset     (reset),
    .en        (crc_en),
    .din       (din),
    .correct   (crc_ok),
    .incorrect (crc_bad)
  );

  assign to_sync = crc_ok && (good_q == GW'(DELTA - 1));
  assign to_hunt = crc_bad;

  always_ff @(posedge clk) begin
    if (reset || !en) begin
      pos_q  <= '0;
      good_q <= '0;
    end else begin
      pos_q <= (pos_q == PW'(CELL_UNITS - 1)) ? '0 : pos_q + 1'b1;
      if (crc_ok && !to_sync) good_q <= good_q + 1'b1;
    end
  end

  // A verdict can only arrive on the last unit of the cell.
  a_verdict_at_cell_end : assert property (@(posedge clk) disable iff (reset)
    (crc_ok || crc_bad) |-> (pos_q == PW'(CELL_UNITS - 1)));

endmodule
