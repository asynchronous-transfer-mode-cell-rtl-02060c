// tb_atm_presync: checks the PRESYNC sub-module, bit-serial and
// octet-parallel. Each scenario starts `en` on the first payload unit after a
// header and feeds back-to-back cells, some with a corrupted HEC. In every
// clock `to_sync` and `to_hunt` must match the expected pulses: `to_sync` on
// the last header unit of the DELTA-th consecutive good cell, `to_hunt` on
// the last header unit of a bad one, nothing anywhere else.
module tb_atm_presync;
  import tb_atm_pkg::*;

  localparam int DELTA = 8;

  logic clk = 1'b0;
  logic reset;
  logic en1, en8;
  logic d1;
  logic [7:0] d8;
  logic s1, h1, s8, h8;
  int checks = 0, failures = 0;
  int n_sync = 0, n_hunt = 0;

  always #5 clk = ~clk;

  atm_presync #(.W(1), .DELTA(DELTA)) dut1 (.clk, .reset, .en(en1), .din(d1), .to_sync(s1), .to_hunt(h1));
  atm_presync #(.W(8), .DELTA(DELTA)) dut8 (.clk, .reset, .en(en8), .din(d8), .to_sync(s8), .to_hunt(h8));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one scenario at width w; the header of cell `bad` (counted from 1 after
  // the one already found) is corrupted, none if bad = 0.
  task automatic scenario(int w, int bad, logic [31:0] seed);
    int cell_units = 424 / w;
    int good = 0;
    bit done = 0;
    int u = 0;
    logic [7:0] oct;
    logic es, eh, gs, gh;
    if (w == 1) en1 = 1'b1; else en8 = 1'b1;
    while (!done) begin
      int c;
      if (w == 1) begin
        int b = 40 + u;
        c = b / 424;
        oct = cell_octet(b / 8, 0, seed, c == bad);
        d1 = oct[7 - (b % 8)];
      end else begin
        c = (5 + u) / 53;
        d8 = cell_octet(5 + u, 0, seed, c == bad);
      end
      es = 1'b0; eh = 1'b0;
      if ((u + 1) % cell_units == 0) begin
        if (c == bad) begin eh = 1'b1; done = 1; end
        else begin
          good++;
          if (good == DELTA) begin es = 1'b1; done = 1; end
        end
      end
      #1;
      gs = (w == 1) ? s1 : s8;
      gh = (w == 1) ? h1 : h8;
      checks += 2;
      if (gs !== es || gh !== eh) begin
        failures++;
        $display("FAIL w=%0d u=%0d to_sync %0b/%0b to_hunt %0b/%0b", w, u, gs, es, gh, eh);
      end
      if (gs) n_sync++;
      if (gh) n_hunt++;
      u++;
      @(negedge clk);
    end
    en1 = 1'b0; en8 = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    reset = 1'b1; en1 = 1'b0; en8 = 1'b0; d1 = 1'b0; d8 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    scenario(1, 0, 32'h11);
    scenario(1, 3, 32'h22);
    scenario(1, 1, 32'h33);
    scenario(8, 0, 32'h44);
    scenario(8, 5, 32'h55);
    scenario(8, 8, 32'h66);
    scenario(8, 0, 32'h77);
    checks++;
    if (n_sync != 3 || n_hunt != 4) begin
      failures++;
      $display("FAIL pulse totals sync=%0d hunt=%0d", n_sync, n_hunt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
