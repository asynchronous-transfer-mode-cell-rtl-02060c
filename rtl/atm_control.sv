// atm_control: CONTROL block of a cell delineator.
//
// Holds the delineation state and moves it as the HUNT, PRESYNC and SYNC
// sub-modules report: HUNT -> PRESYNC on a header found, PRESYNC -> SYNC after
// DELTA consecutive correct HECs, PRESYNC -> HUNT on an incorrect HEC,
// SYNC -> HUNT after ALPHA consecutive incorrect HECs. Each sub-module is
// enabled only in its own state, which holds the others cleared.
//
// The received stream leaves through `data_out` one clock after it entered.
// `correct_cell_out` is high in the clock in which `data_out` carries the last
// bit (octet) of a header whose HEC was correct while in SYNC, so it marks the
// cells a following stage may accept; the cell's payload follows it.
//
// Timing: the state register changes on the edge that ends the clock in which
// a sub-module raised its pulse, so the first clock in the new state carries
// the first payload unit of the cell. The state diagram follows the document;
// the one-clock delay of the data path and the meaning of `correct_cell_out`
// are this design's choices.
module atm_control
  import atm_pkg::*;
#(
  parameter int unsigned W = 1   // bits per clock: 1 or 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] data_in,
  input  logic         hunt_found,
  input  logic         presync_to_sync,
  input  logic         presync_to_hunt,
  input  logic         sync_cell_ok,
  input  logic         sync_to_hunt,
  output logic         hunt_en,
  output logic         presync_en,
  output logic         sync_en,
  output state_e       state,
  output logic [W-1:0] data_out,
  output logic         correct_cell_out
);

  state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_HUNT:    if (hunt_found)           state_d = ST_PRESYNC;
      ST_PRESYNC: if (presync_to_hunt)      state_d = ST_HUNT;
                  else if (presync_to_sync) state_d = ST_SYNC;
      ST_SYNC:    if (sync_to_hunt)         state_d = ST_HUNT;
      default:                              state_d = ST_HUNT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q          <= ST_HUNT;
      data_out         <= '0;
      correct_cell_out <= 1'b0;
    end else begin
      state_q          <= state_d;
      data_out         <= data_in;
      correct_cell_out <= (state_q == ST_SYNC) && sync_cell_ok;
    end
  end

  assign state      = state_q;
  assign hunt_en    = (state_q == ST_HUNT);
  assign presync_en = (state_q == ST_PRESYNC);
  assign sync_en    = (state_q == ST_SYNC);

  // PRESYNC cannot report a correct and an incorrect HEC for the same cell.
  a_presync_exclusive : assert property (@(posedge clk) disable iff (reset)
    !(presync_to_sync && presync_to_hunt));

endmodule
