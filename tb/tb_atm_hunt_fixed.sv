// tb_atm_hunt_fixed: checks a HUNT sub-module, bit-serial and octet-parallel,
// against a reference that divides the most recent 40 bits by the generator
// in every clock. The stream is random with valid headers inserted at random
// offsets; `found` must equal the reference in every clock, be low for the
// first 39 bits (4 octets) after `en` rises and restart after `en` drops.
module tb_atm_hunt_fixed;
  import tb_atm_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic en;
  logic d1;
  logic [7:0] d8;
  logic f1, f8;
  int checks = 0, failures = 0;
  int hits1 = 0, hits8 = 0;

  always #5 clk = ~clk;

  atm_hunt_fixed #(.W(1)) dut1 (.clk, .reset, .en, .din(d1), .found(f1));
  atm_hunt_fixed #(.W(8)) dut8 (.clk, .reset, .en, .din(d8), .found(f8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: history since en rose, newest bit in bit 0.
  logic [39:0] hist1, hist8;
  int n1, n8;          // bits (octets) absorbed since en rose
  logic [39:0] q1;     // queued header bits still to be sent
  int q1n;
  logic [39:0] q8;
  int q8n;

  initial begin
    logic [31:0] m;
    logic exp1, exp8;
    reset = 1'b1; en = 1'b0; d1 = 1'b0; d8 = '0;
    hist1 = '0; hist8 = '0; n1 = 0; n8 = 0; q1n = 0; q8n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 6000; t++) begin
      // en drops for a few clocks now and then
      en = !((t % 1500) >= 1490) && (t >= 4);
      if (!en) begin
        n1 = 0; n8 = 0; hist1 = '0; hist8 = '0;
      end
      // choose the next bit / octet
      if (q1n == 0 && $urandom_range(0, 59) == 0) begin
        m = $urandom; q1 = {m, make_hec(m)}; q1n = 40;
      end
      if (q1n > 0) begin d1 = q1[q1n-1]; q1n--; end
      else d1 = 1'($urandom);
      if (q8n == 0 && $urandom_range(0, 9) == 0) begin
        m = $urandom; q8 = {m, make_hec(m)}; q8n = 5;
      end
      if (q8n > 0) begin d8 = q8[q8n*8-1 -: 8]; q8n--; end
      else d8 = 8'($urandom);
      #1;
      if (en) begin
        hist1 = {hist1[38:0], d1}; n1++;
        hist8 = {hist8[31:0], d8}; n8++;
      end
      exp1 = en && (n1 >= 40) && (ref_syndrome(hist1) == 8'h00);
      exp8 = en && (n8 >= 5)  && (ref_syndrome(hist8) == 8'h00);
      checks += 2;
      if (f1 !== exp1) begin failures++; $display("FAIL serial t=%0d got %0b exp %0b", t, f1, exp1); end
      if (f8 !== exp8) begin failures++; $display("FAIL octet t=%0d got %0b exp %0b", t, f8, exp8); end
      if (exp1) hits1++;
      if (exp8) hits8++;
      @(negedge clk);
    end
    checks++;
    if (hits1 < 10 || hits8 < 10) begin
      failures++;
      $display("FAIL too few headers found: %0d %0d", hits1, hits8);
    end
    $display("headers found: serial %0d octet %0d", hits1, hits8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
