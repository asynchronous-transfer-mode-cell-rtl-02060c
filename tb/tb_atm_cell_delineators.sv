// tb_atm_cell_delineators: end-to-end test of the four delineators at their
// default parameters (ALPHA = 7, DELTA = 8). Each gets 60 back-to-back cells
// after a random prefix (serial streams also start 3 bits into an octet).
// Bad HECs at cell 3 (PRESYNC fails), cell 20 (tolerated in SYNC) and cells
// 30-36 (seven in a row: delineation lost) make every mechanism happen; each
// delineator is compared in every clock with the reference model and must
// show each mechanism at least once and pass correct cells afterwards.
module tb_atm_cell_delineators;

  localparam logic [63:0] BAD = (64'h1 << 3) | (64'h1 << 20) | (64'h7F << 30);
  localparam int PRE = 41;
  localparam int PREBITS = 3;

  logic clk = 1'b0;
  logic reset = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic       sfb_in, sfb_out, sfb_cco;
  logic       smw_in, smw_out, smw_cco;
  logic [7:0] ofb_in, ofb_out, omw_in, omw_out;
  logic       ofb_cco, omw_cco;
  logic [1:0] sfb_st, smw_st, ofb_st, omw_st;
  int         cell_s0, cell_s1, cell_o0, cell_o1;

  atm_cell_delineators dut (
    .clk, .reset,
    .sfb_data_in (sfb_in), .sfb_data_out (sfb_out), .sfb_correct_cell_out (sfb_cco), .sfb_state (sfb_st),
    .smw_data_in (smw_in), .smw_data_out (smw_out), .smw_correct_cell_out (smw_cco), .smw_state (smw_st),
    .ofb_data_in (ofb_in), .ofb_data_out (ofb_out), .ofb_correct_cell_out (ofb_cco), .ofb_state (ofb_st),
    .omw_data_in (omw_in), .omw_data_out (omw_out), .omw_correct_cell_out (omw_cco), .omw_state (omw_st)
  );

  tb_atm_cell_source #(.W(1), .PRE(PRE), .PREBITS(PREBITS), .SEED(32'hA7A7), .BAD_MASK(BAD))
    src_sfb (.clk, .reset, .data(sfb_in), .cell_idx(cell_s0));
  tb_atm_cell_source #(.W(1), .PRE(PRE), .PREBITS(PREBITS), .SEED(32'h5EED), .BAD_MASK(BAD))
    src_smw (.clk, .reset, .data(smw_in), .cell_idx(cell_s1));
  tb_atm_cell_source #(.W(8), .PRE(PRE), .PREBITS(0), .SEED(32'hA7A7), .BAD_MASK(BAD))
    src_ofb (.clk, .reset, .data(ofb_in), .cell_idx(cell_o0));
  tb_atm_cell_source #(.W(8), .PRE(PRE), .PREBITS(0), .SEED(32'h0C7E), .BAD_MASK(BAD))
    src_omw (.clk, .reset, .data(omw_in), .cell_idx(cell_o1));

  localparam int N = 4;
  int c_checks [N], c_fail [N];
  int e_found [N], e_pbad [N], e_sync [N], e_sbad [N], e_lost [N], e_ok [N], first_sync [N];

  tb_atm_checker #(.W(1), .NAME("serial fixed boundary")) chk0 (
    .clk, .reset, .data_in(sfb_in), .dut_state(sfb_st), .dut_data_out(sfb_out), .dut_cco(sfb_cco),
    .checks(c_checks[0]), .failures(c_fail[0]), .ev_found(e_found[0]), .ev_presync_bad(e_pbad[0]),
    .ev_sync(e_sync[0]), .ev_sync_bad(e_sbad[0]), .ev_lost(e_lost[0]), .ev_cell_ok(e_ok[0]),
    .first_sync_clk(first_sync[0]));
  tb_atm_checker #(.W(1), .NAME("serial moving window")) chk1 (
    .clk, .reset, .data_in(smw_in), .dut_state(smw_st), .dut_data_out(smw_out), .dut_cco(smw_cco),
    .checks(c_checks[1]), .failures(c_fail[1]), .ev_found(e_found[1]), .ev_presync_bad(e_pbad[1]),
    .ev_sync(e_sync[1]), .ev_sync_bad(e_sbad[1]), .ev_lost(e_lost[1]), .ev_cell_ok(e_ok[1]),
    .first_sync_clk(first_sync[1]));
  tb_atm_checker #(.W(8), .NAME("octet fixed boundary")) chk2 (
    .clk, .reset, .data_in(ofb_in), .dut_state(ofb_st), .dut_data_out(ofb_out), .dut_cco(ofb_cco),
    .checks(c_checks[2]), .failures(c_fail[2]), .ev_found(e_found[2]), .ev_presync_bad(e_pbad[2]),
    .ev_sync(e_sync[2]), .ev_sync_bad(e_sbad[2]), .ev_lost(e_lost[2]), .ev_cell_ok(e_ok[2]),
    .first_sync_clk(first_sync[2]));
  tb_atm_checker #(.W(8), .NAME("octet moving window")) chk3 (
    .clk, .reset, .data_in(omw_in), .dut_state(omw_st), .dut_data_out(omw_out), .dut_cco(omw_cco),
    .checks(c_checks[3]), .failures(c_fail[3]), .ev_found(e_found[3]), .ev_presync_bad(e_pbad[3]),
    .ev_sync(e_sync[3]), .ev_sync_bad(e_sbad[3]), .ev_lost(e_lost[3]), .ev_cell_ok(e_ok[3]),
    .first_sync_clk(first_sync[3]));

  localparam int RUN_CLKS = 60 * 424 + PRE * 8 + PREBITS;

  initial begin : watchdog
    repeat (RUN_CLKS + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    repeat (RUN_CLKS) @(negedge clk);
    for (int g = 0; g < N; g++) begin
      checks += c_checks[g];
      failures += c_fail[g];
      $display("design %0d: headers found %0d, PRESYNC failed %0d, SYNC reached %0d, bad HEC tolerated %0d, delineation lost %0d, correct cells %0d, first SYNC at clock %0d",
               g, e_found[g], e_pbad[g], e_sync[g], e_sbad[g], e_lost[g], e_ok[g], first_sync[g]);
      checks += 6;
      if (e_found[g] == 0) begin failures++; $display("FAIL design %0d never found a header", g); end
      if (e_pbad[g] == 0)  begin failures++; $display("FAIL design %0d never failed PRESYNC", g); end
      if (e_sync[g] < 2)   begin failures++; $display("FAIL design %0d reached SYNC %0d times", g, e_sync[g]); end
      if (e_sbad[g] == 0)  begin failures++; $display("FAIL design %0d never tolerated a bad HEC", g); end
      if (e_lost[g] == 0)  begin failures++; $display("FAIL design %0d never lost delineation", g); end
      if (e_ok[g] < 10)    begin failures++; $display("FAIL design %0d passed %0d cells", g, e_ok[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
