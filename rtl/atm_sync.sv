// atm_sync: SYNC sub-module with its SYNC-CRC detector.
//
// In SYNC the cell boundaries are known. The same cell-position counter as in
// PRESYNC starts at 0 in the first clock of SYNC, which carries the first
// payload bit (or octet) after the last header confirmed in PRESYNC; the CRC
// detector is enabled over each following header. A correct HEC raises
// `cell_ok` and clears the count of consecutive incorrect HECs; an incorrect
// one increments it, and the ALPHA-th in a row raises `to_hunt`: delineation
// is lost.
//
// Interface: `en` is high only in the SYNC state and holds the counters
// cleared while low. `cell_ok` and `to_hunt` are combinational one-clock pulses
// in the clock of the last header bit (octet). The ALPHA rule follows the
// document; reporting each correct header on `cell_ok` is this design's.
module atm_sync
  import atm_pkg::*;
#(
  parameter int unsigned W     = 1,  // bits per clock: 1 or 8
  parameter int unsigned ALPHA = 7   // consecutive incorrect HECs to lose sync
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic         cell_ok,
  output logic         to_hunt
);

  localparam int unsigned CELL_UNITS = CELL_BITS / W;
  localparam int unsigned PAY_UNITS  = PAYLOAD_BITS / W;
  localparam int unsigned PW         = $clog2(CELL_UNITS);
  localparam int unsigned BW         = $clog2(ALPHA + 1);

  logic [PW-1:0] pos_q;
  logic [BW-1:0] bad_q;
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

  assign cell_ok = crc_ok;
  assign to_hunt = crc_bad && (bad_q == BW'(ALPHA - 1));

  always_ff @(posedge clk) begin
    if (reset || !en) begin
      pos_q <= '0;
      bad_q <= '0;
    end else begin
      pos_q <= (pos_q == PW'(CELL_UNITS - 1)) ? '0 : pos_q + 1'b1;
      if (crc_ok)                 bad_q <= '0;
      else if (crc_bad && !to_hunt) bad_q <= bad_q + 1'b1;
    end
  end

  a_verdict_at_cell_end : assert property (@(posedge clk) disable iff (reset)
    (crc_ok || crc_bad) |-> (pos_q == PW'(CELL_UNITS - 1)));

endmodule
