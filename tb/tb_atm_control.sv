// tb_atm_control: checks the CONTROL block with random sub-module pulses.
// A reference state machine tracks HUNT/PRESYNC/SYNC from the same pulses;
// in every clock the DUT's state and enables must match it, `data_out` must
// be the previous clock's `data_in`, and `correct_cell_out` must follow a
// `sync_cell_ok` seen in SYNC by one clock. Every transition of the state
// diagram must be taken at least once.
module tb_atm_control;
  import atm_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic [7:0] din, dout;
  logic found, ps_sync, ps_hunt, s_ok, s_hunt;
  logic hunt_en, presync_en, sync_en, cco;
  state_e state;
  int checks = 0, failures = 0;
  int n_hp = 0, n_ph = 0, n_ps = 0, n_sh = 0, n_cco = 0;

  always #5 clk = ~clk;

  atm_control #(.W(8)) dut (
    .clk, .reset, .data_in(din), .hunt_found(found), .presync_to_sync(ps_sync),
    .presync_to_hunt(ps_hunt), .sync_cell_ok(s_ok), .sync_to_hunt(s_hunt),
    .hunt_en, .presync_en, .sync_en, .state, .data_out(dout), .correct_cell_out(cco)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int ref_st;                 // 0 HUNT, 1 PRESYNC, 2 SYNC
    logic [7:0] prev_din;
    logic exp_cco;
    reset = 1'b1; din = '0; found = 0; ps_sync = 0; ps_hunt = 0; s_ok = 0; s_hunt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    ref_st = 0; prev_din = '0; exp_cco = 1'b0;
    for (int t = 0; t < 20000; t++) begin
      chk("state", 8'(state), 8'(ref_st));
      chk("enables", {5'b0, sync_en, presync_en, hunt_en}, 8'(1 << ref_st));
      chk("data_out", dout, prev_din);
      chk("correct_cell_out", 8'(cco), 8'(exp_cco));
      if (cco) n_cco++;
      // pulses as the sub-modules would raise them (only when enabled)
      din = 8'($urandom);
      found   = (ref_st == 0) && ($urandom_range(0, 19) == 0);
      ps_hunt = (ref_st == 1) && ($urandom_range(0, 29) == 0);
      ps_sync = (ref_st == 1) && !ps_hunt && ($urandom_range(0, 29) == 0);
      s_ok    = (ref_st == 2) && ($urandom_range(0, 3) == 0);
      s_hunt  = (ref_st == 2) && !s_ok && ($urandom_range(0, 59) == 0);
      @(negedge clk);
      prev_din = din;
      exp_cco  = (ref_st == 2) && s_ok;
      case (ref_st)
        0: if (found) begin ref_st = 1; n_hp++; end
        1: if (ps_hunt) begin ref_st = 0; n_ph++; end
           else if (ps_sync) begin ref_st = 2; n_ps++; end
        default: if (s_hunt) begin ref_st = 0; n_sh++; end
      endcase
    end
    // synchronous reset returns to HUNT
    reset = 1'b1; @(negedge clk); reset = 1'b0;
    chk("state after reset", 8'(state), 8'(0));
    checks++;
    if (n_hp == 0 || n_ph == 0 || n_ps == 0 || n_sh == 0 || n_cco == 0) begin
      failures++;
      $display("FAIL transitions not all taken %0d %0d %0d %0d %0d", n_hp, n_ph, n_ps, n_sh, n_cco);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
