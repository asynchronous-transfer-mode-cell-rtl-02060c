// tb_atm_crc_detector: checks the fixed-window HEC detector, bit-serial and
// octet-parallel. Random 40-bit words, about half of them valid headers, are
// fed back to back with `en` held high; the flags must stay low for the first
// 39 bits (4 octets) of each window and give the reference verdict exactly on
// the 40th. Dropping `en` in mid-window must restart the window.
module tb_atm_crc_detector;
  import tb_atm_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic en1, en8;
  logic d1;
  logic [7:0] d8;
  logic ok1, bad1, ok8, bad8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  atm_crc_detector #(.W(1)) dut1 (.clk, .reset, .en(en1), .din(d1), .correct(ok1), .incorrect(bad1));
  atm_crc_detector #(.W(8)) dut8 (.clk, .reset, .en(en8), .din(d8), .correct(ok8), .incorrect(bad8));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [39:0] rand_word(bit valid);
    logic [31:0] m;
    m = $urandom;
    if (valid) return {m, make_hec(m)};
    return {m, 8'($urandom)};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] w;
    logic exp_ok;
    int n_ok, n_bad;
    n_ok = 0; n_bad = 0;
    reset = 1'b1; en1 = 1'b0; en8 = 1'b0; d1 = 1'b0; d8 = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // bit-serial: 60 back-to-back windows
    @(negedge clk);
    en1 = 1'b1;
    for (int k = 0; k < 60; k++) begin
      w = rand_word($urandom_range(0, 1) == 1);
      exp_ok = (ref_syndrome(w) == 8'h00);
      if (exp_ok) n_ok++; else n_bad++;
      for (int i = 39; i >= 0; i--) begin
        d1 = w[i];
        #1;
        check("serial correct", ok1, (i == 0) && exp_ok);
        check("serial incorrect", bad1, (i == 0) && !exp_ok);
        @(negedge clk);
      end
    end
    // restart in mid-window: 17 junk bits, drop en, then a valid header
    for (int i = 0; i < 17; i++) begin d1 = 1'($urandom); @(negedge clk); end
    en1 = 1'b0; @(negedge clk); en1 = 1'b1;
    w = rand_word(1'b1);
    for (int i = 39; i >= 0; i--) begin
      d1 = w[i]; #1;
      check("serial restart", ok1, i == 0);
      @(negedge clk);
    end
    en1 = 1'b0;
    // octet-parallel: 60 back-to-back windows of 5 octets
    en8 = 1'b1;
    for (int k = 0; k < 60; k++) begin
      w = rand_word($urandom_range(0, 1) == 1);
      exp_ok = (ref_syndrome(w) == 8'h00);
      for (int i = 4; i >= 0; i--) begin
        d8 = w[i*8 +: 8];
        #1;
        check("octet correct", ok8, (i == 0) && exp_ok);
        check("octet incorrect", bad8, (i == 0) && !exp_ok);
        @(negedge clk);
      end
    end
    // held cleared while en is low
    en8 = 1'b0;
    for (int i = 0; i < 10; i++) begin
      d8 = 8'($urandom); #1;
      check("octet idle", ok8 | bad8, 1'b0);
      @(negedge clk);
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) begin failures++; $display("FAIL stimulus lacks a kind"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
