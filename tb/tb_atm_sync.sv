// tb_atm_sync: checks the SYNC sub-module, bit-serial and octet-parallel.
// `en` starts on the first payload unit after a header and back-to-back cells
// follow, with bad HECs at cell 2, cells 4-9 (six in a row) and cells 11-17
// (seven in a row). Expected in every clock: `cell_ok` on the last header unit
// of each good cell, `to_hunt` only on the last header unit of cell 17, where
// ALPHA = 7 consecutive bad HECs are first reached.
module tb_atm_sync;
  import tb_atm_pkg::*;

  localparam int ALPHA = 7;

  logic clk = 1'b0;
  logic reset;
  logic en1, en8;
  logic d1;
  logic [7:0] d8;
  logic k1, h1, k8, h8;
  int checks = 0, failures = 0;
  int n_ok = 0, n_hunt = 0;

  always #5 clk = ~clk;

  atm_sync #(.W(1), .ALPHA(ALPHA)) dut1 (.clk, .reset, .en(en1), .din(d1), .cell_ok(k1), .to_hunt(h1));
  atm_sync #(.W(8), .ALPHA(ALPHA)) dut8 (.clk, .reset, .en(en8), .din(d8), .cell_ok(k8), .to_hunt(h8));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_bad(int c);
    return (c == 2) || (c >= 4 && c <= 9) || (c >= 11 && c <= 17);
  endfunction

  task automatic scenario(int w, logic [31:0] seed);
    int cell_units = 424 / w;
    int bad_run = 0;
    bit done = 0;
    int u = 0;
    logic [7:0] oct;
    logic ek, eh, gk, gh;
    if (w == 1) en1 = 1'b1; else en8 = 1'b1;
    while (!done) begin
      int c;
      if (w == 1) begin
        int b = 40 + u;
        c = b / 424;
        oct = cell_octet(b / 8, 0, seed, is_bad(c));
        d1 = oct[7 - (b % 8)];
      end else begin
        c = (5 + u) / 53;
        d8 = cell_octet(5 + u, 0, seed, is_bad(c));
      end
      ek = 1'b0; eh = 1'b0;
      if ((u + 1) % cell_units == 0) begin
        if (is_bad(c)) begin
          bad_run++;
          if (bad_run == ALPHA) begin eh = 1'b1; done = 1; end
        end else begin
          bad_run = 0;
          ek = 1'b1;
        end
      end
      #1;
      gk = (w == 1) ? k1 : k8;
      gh = (w == 1) ? h1 : h8;
      checks += 2;
      if (gk !== ek || gh !== eh) begin
        failures++;
        $display("FAIL w=%0d u=%0d cell_ok %0b/%0b to_hunt %0b/%0b", w, u, gk, ek, gh, eh);
      end
      if (gk) n_ok++;
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
    scenario(1, 32'h1234);
    scenario(8, 32'h4321);
    checks++;
    // good cells 1, 3, 10 in each run
    if (n_ok != 6 || n_hunt != 2) begin
      failures++;
      $display("FAIL pulse totals ok=%0d hunt=%0d", n_ok, n_hunt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
