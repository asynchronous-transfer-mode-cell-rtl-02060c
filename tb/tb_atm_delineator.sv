// tb_atm_delineator: runs the four delineator configurations (serial and
// octet, fixed boundary and moving window) at ALPHA = 3, DELTA = 4 on streams
// of back-to-back cells that start at an arbitrary bit. Bad HECs at cell 2
// (while in PRESYNC), cell 12 (tolerated in SYNC) and cells 20-22 (loss of
// delineation) drive every transition. Each delineator is compared in every
// clock with the reference model, which takes one bit or octet per clock, so
// the data rate and every latency are checked too. Each must find a header,
// fail PRESYNC, reach SYNC, tolerate a bad HEC, lose and regain delineation,
// and the fixed-boundary and moving-window versions of the same width must
// reach SYNC in the same clock.
module tb_atm_delineator;

  localparam int ALPHA = 3;
  localparam int DELTA = 4;
  localparam logic [63:0] BAD = (64'h1 << 2) | (64'h1 << 12) | (64'h7 << 20);
  localparam int NCFG = 4;

  logic clk = 1'b0;
  logic reset = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  int c_checks [NCFG], c_fail [NCFG];
  int e_found [NCFG], e_pbad [NCFG], e_sync [NCFG], e_sbad [NCFG], e_lost [NCFG], e_ok [NCFG];
  int first_sync [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned W  = (g < 2) ? 1 : 8;
    localparam bit          MW = (g % 2) == 1;
    logic [W-1:0] din, dout;
    logic         cco;
    atm_pkg::state_e st;
    int           cell_idx;

    // serial streams start 5 bits into the octet-aligned stream of the octet runs
    tb_atm_cell_source #(.W(W), .PRE(23), .PREBITS(W == 1 ? 5 : 0), .SEED(32'h600D), .BAD_MASK(BAD))
      u_src (.clk, .reset, .data(din), .cell_idx);

    atm_delineator #(.W(W), .MOVING_WINDOW(MW), .ALPHA(ALPHA), .DELTA(DELTA)) dut (
      .clk, .reset, .data_in(din), .data_out(dout), .correct_cell_out(cco), .state(st)
    );

    tb_atm_checker #(.W(W), .ALPHA(ALPHA), .DELTA(DELTA), .NAME($sformatf("cfg%0d", g))) u_chk (
      .clk, .reset, .data_in(din), .dut_state(st), .dut_data_out(dout), .dut_cco(cco),
      .checks(c_checks[g]), .failures(c_fail[g]), .ev_found(e_found[g]), .ev_presync_bad(e_pbad[g]),
      .ev_sync(e_sync[g]), .ev_sync_bad(e_sbad[g]), .ev_lost(e_lost[g]), .ev_cell_ok(e_ok[g]),
      .first_sync_clk(first_sync[g])
    );
  end

  initial begin : watchdog
    repeat (40 * 424 + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    // 36 cells plus the prefix, in serial clocks
    repeat (36 * 424 + 23 * 8 + 5) @(negedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks += c_checks[g];
      failures += c_fail[g];
      $display("cfg%0d: found %0d presync_bad %0d sync %0d sync_bad %0d lost %0d cells_ok %0d first_sync_clk %0d",
               g, e_found[g], e_pbad[g], e_sync[g], e_sbad[g], e_lost[g], e_ok[g], first_sync[g]);
      checks += 6;
      if (e_found[g] == 0) begin failures++; $display("FAIL cfg%0d never found a header", g); end
      if (e_pbad[g] == 0)  begin failures++; $display("FAIL cfg%0d never failed PRESYNC", g); end
      if (e_sync[g] < 2)   begin failures++; $display("FAIL cfg%0d reached SYNC %0d times", g, e_sync[g]); end
      if (e_sbad[g] == 0)  begin failures++; $display("FAIL cfg%0d never tolerated a bad HEC", g); end
      if (e_lost[g] == 0)  begin failures++; $display("FAIL cfg%0d never lost delineation", g); end
      if (e_ok[g] == 0)    begin failures++; $display("FAIL cfg%0d passed no cell", g); end
    end
    // the same stream gives both HUNT methods the same timeline
    checks += 3;
    // this octet stream locks on the same headers as the serial one, which
    // carries 5 more leading bits: 8 serial clocks per octet clock
    if (first_sync[0] != 8 * first_sync[2] + 5) begin
      failures++;
      $display("FAIL clocks to SYNC: serial %0d, octet %0d", first_sync[0], first_sync[2]);
    end
    if (first_sync[1] != first_sync[0] || first_sync[3] != first_sync[2]) begin
      failures++;
      $display("FAIL fixed boundary and moving window disagree on time to SYNC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
