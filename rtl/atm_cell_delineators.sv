// atm_cell_delineators: the four ATM cell delineator implementations side by
// side, sharing only clock and reset.
//
//   sfb_*  bit-serial fixed boundary      (1 bit per clock, 40 CRC detectors)
//   smw_*  bit-serial moving window       (1 bit per clock, 1 detector + 40-bit delay)
//   ofb_*  octet-parallel fixed boundary  (8 bits per clock, 5 CRC detectors)
//   omw_*  octet-parallel moving window   (8 bits per clock, 1 detector + 5-octet delay)
//
// At a 160 MHz clock the serial ones take a 160 Mbit/s stream and the octet
// ones 1280 Mbit/s. Each has its own data input, delayed data output, correct
// cell marker and state (0 HUNT, 1 PRESYNC, 2 SYNC); see atm_delineator for
// their timing. ALPHA = 7 and DELTA = 8 are the recommended I.432 values.
module atm_cell_delineators
  import atm_pkg::*;
#(
  parameter int unsigned ALPHA = 7,
  parameter int unsigned DELTA = 8
) (
  input  logic       clk,
  input  logic       reset,
  // bit-serial fixed boundary
  input  logic       sfb_data_in,
  output logic       sfb_data_out,
  output logic       sfb_correct_cell_out,
  output logic [1:0] sfb_state,
  // bit-serial moving window
  input  logic       smw_data_in,
  output logic       smw_data_out,
  output logic       smw_correct_cell_out,
  output logic [1:0] smw_state,
  // octet-parallel fixed boundary
  input  logic [7:0] ofb_data_in,
  output logic [7:0] ofb_data_out,
  output logic       ofb_correct_cell_out,
  output logic [1:0] ofb_state,
  // octet-parallel moving window
  input  logic [7:0] omw_data_in,
  output logic [7:0] omw_data_out,
  output logic       omw_correct_cell_out,
  output logic [1:0] omw_state
);

  state_e sfb_st, smw_st, ofb_st, omw_st;

  atm_delineator #(.W(1), .MOVING_WINDOW(1'b0), .ALPHA(ALPHA), .DELTA(DELTA)) u_sfb (
    .clk (clk), .reset (reset), .data_in (sfb_data_in), .data_out (sfb_data_out),
    .correct_cell_out (sfb_correct_cell_out), .state (sfb_st)
  );

  atm_delineator #(.W(1), .MOVING_WINDOW(1'b1), .ALPHA(ALPHA), .DELTA(DELTA)) u_smw (
    .clk (clk), .reset (reset), .data_in (smw_data_in), .data_out (smw_data_out),
    .correct_cell_out (smw_correct_cell_out), .state (smw_st)
  );

  atm_delineator #(.W(8), .MOVING_WINDOW(1'b0), .ALPHA(ALPHA), .DELTA(DELTA)) u_ofb (
    .clk (clk), .reset (reset), .data_in (ofb_data_in), .data_out (ofb_data_out),
    .correct_cell_out (ofb_correct_cell_out), .state (ofb_st)
  );

  atm_delineator #(.W(8), .MOVING_WINDOW(1'b1), .ALPHA(ALPHA), .DELTA(DELTA)) u_omw (
    .clk (clk), .reset (reset), .data_in (omw_data_in), .data_out (omw_data_out),
    .correct_cell_out (omw_correct_cell_out), .state (omw_st)
  );

  assign sfb_state = sfb_st;
  assign smw_state = smw_st;
  assign ofb_state = ofb_st;
  assign omw_state = omw_st;

endmodule
