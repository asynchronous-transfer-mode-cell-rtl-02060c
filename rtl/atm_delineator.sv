// atm_delineator: one complete ATM cell delineator.
//
// Finds the cell boundaries in a stream of back-to-back 53-octet ATM cells
// by checking the HEC of each candidate 5-octet header. Four sub-modules
// share the work, as in the block partitioning of the design: CONTROL holds
// the HUNT/PRESYNC/SYNC state and enables exactly one of HUNT, PRESYNC and
// SYNC at a time; each of the last two has its own fixed-window CRC detector.
//
// Parameters select one of the four implementations:
//   W = 1, MOVING_WINDOW = 0  bit-serial fixed boundary (40 CRC detectors)
//   W = 1, MOVING_WINDOW = 1  bit-serial moving window (one detector + 40-bit delay)
//   W = 8, MOVING_WINDOW = 0  octet-parallel fixed boundary (5 CRC detectors)
//   W = 8, MOVING_WINDOW = 1  octet-parallel moving window (one detector + 5-octet delay)
// The octet-parallel versions need the octet boundaries to be known (as in an
// SDH payload); data_in[7] is the first bit of the octet.
//
// Interface: one bit or octet of the stream per clock on `data_in`, with no
// gaps. `data_out` is `data_in` one clock later; `correct_cell_out` marks the
// last header unit on `data_out` of each cell whose HEC checked correct in
// SYNC. `state` shows the delineation state.
// Timing from the first clock of HUNT: a header ending on line bit n is found
// in the clock of bit n, PRESYNC starts with bit n+1, and the checks of the
// next DELTA headers fall at bits n+424*k (k = 1..DELTA); SYNC starts with bit
// n+424*DELTA+1. In octet mode read octets for bits and 53 for 424.
module atm_delineator
  import atm_pkg::*;
#(
  parameter int unsigned W             = 1,  // bits per clock: 1 or 8
  parameter bit          MOVING_WINDOW = 1,  // HUNT method
  parameter int unsigned ALPHA         = 7,  // incorrect HECs to lose sync
  parameter int unsigned DELTA         = 8   // correct HECs to reach sync
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] data_out,
  output logic         correct_cell_out,
  output state_e       state
);

  logic hunt_en, presync_en, sync_en;
  logic hunt_found, ps_to_sync, ps_to_hunt, s_cell_ok, s_to_hunt;

  atm_control #(.W(W)) u_control (
    .clk              (clk),
    .reset            (reset),
    .data_in          (data_in),
    .hunt_found       (hunt_found),
    .presync_to_sync  (ps_to_sync),
    .presync_to_hunt  (ps_to_hunt),
    .sync_cell_ok     (s_cell_ok),
    .sync_to_hunt     (s_to_hunt),
    .hunt_en          (hunt_en),
    .presync_en       (presync_en),
    .sync_en          (sync_en),
    .state            (state),
    .data_out         (data_out),
    .correct_cell_out (correct_cell_out)
  );

  if (MOVING_WINDOW) begin : g_hunt
    atm_hunt_window #(.W(W)) u_hunt (
      .clk (clk), .reset (reset), .en (hunt_en), .din (data_in), .found (hunt_found)
    );
  end else begin : g_hunt
    atm_hunt_fixed #(.W(W)) u_hunt (
      .clk (clk), .reset (reset), .en (hunt_en), .din (data_in), .found (hunt_found)
    );
  end

  atm_presync #(.W(W), .DELTA(DELTA)) u_presync (
    .clk     (clk),
    .reset   (reset),
    .en      (presync_en),
    .din     (data_in),
    .to_sync (ps_to_sync),
    .to_hunt (ps_to_hunt)
  );

  atm_sync #(.W(W), .ALPHA(ALPHA)) u_sync (
    .clk     (clk),
    .reset   (reset),
    .en      (sync_en),
    .din     (data_in),
    .cell_ok (s_cell_ok),
    .to_hunt (s_to_hunt)
  );

endmodule
